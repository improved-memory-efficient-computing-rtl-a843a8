// Self-checking test of da_clut, the compressed look-up table.
//
// 1. The published seven-entry example table: every entry must decode to
//    the word of the example, and the compressed size must be 28 bits with
//    the improved index widths and 34 bits with full-width indices.
// 2. The low-pass and high-pass DA tables of this design (all sums of the
//    four taps): every entry must decode to the directly computed sum, and
//    the stored size must match a size computed here from the table.
module tb_da_clut;
  import da_dwt_pkg::*;

  int checks = 0, failures = 0;

  // --- published example, words written down from the example table
  localparam logic [7:0] EX [7] = '{8'h80, 8'hC3, 8'hC9, 8'hAB, 8'hAF, 8'hAB, 8'hB9};
  logic [2:0] ex_addr;
  logic [7:0] ex_imp, ex_old;
  da_clut dut_imp (.addr(ex_addr), .data(ex_imp));
  da_clut #(.IMPROVED(1'b0)) dut_old (.addr(ex_addr), .data(ex_old));

  // --- DA tables of this design
  function automatic logic [16*LP_LUT_W-1:0] lp_table();
    logic [16*LP_LUT_W-1:0] t;
    for (int a = 0; a < 16; a++) begin
      int s = 0;
      for (int k = 0; k < 4; k++) if (a[k]) s += LP_COEF[k];
      t[a*LP_LUT_W +: LP_LUT_W] = LP_LUT_W'(s);
    end
    return t;
  endfunction
  function automatic logic [16*HP_LUT_W-1:0] hp_table();
    logic [16*HP_LUT_W-1:0] t;
    for (int a = 0; a < 16; a++) begin
      int s = 0;
      for (int k = 0; k < 4; k++) if (a[k]) s += HP_COEF[k];
      t[a*HP_LUT_W +: HP_LUT_W] = HP_LUT_W'(s);
    end
    return t;
  endfunction
  localparam logic [16*LP_LUT_W-1:0] LPT = lp_table();
  localparam logic [16*HP_LUT_W-1:0] HPT = hp_table();

  logic [3:0] addr;
  logic [LP_LUT_W-1:0] lp_word;
  logic [HP_LUT_W-1:0] hp_word;
  da_clut #(.ADDR_W(4), .ENTRIES(16), .DATA_W(LP_LUT_W), .TABLE(LPT)) dut_lp (.addr(addr), .data(lp_word));
  da_clut #(.ADDR_W(4), .ENTRIES(16), .DATA_W(HP_LUT_W), .TABLE(HPT)) dut_hp (.addr(addr), .data(hp_word));

  // Compressed size of a table, counted column by column.
  function automatic int csize(int aw, int n, int w, logic [127:0] tab, bit imp);
    int total = 0;
    for (int c = 0; c < w; c++) begin
      int tg[$];
      logic prev;
      tg.delete();
      prev = 1'b0;
      for (int i = 0; i < n; i++) begin
        if (tab[i*w + c] != prev) tg.push_back(i);
        prev = tab[i*w + c];
      end
      if (tg.size() * aw < n) begin
        foreach (tg[j]) total += (imp && tg[j] < (1 << (aw - 1))) ? aw - 1 : aw;
      end else total += n;
    end
    return total;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(dut_imp.STORED_BITS == 28, $sformatf("improved example size %0d", dut_imp.STORED_BITS));
    chk(dut_old.STORED_BITS == 34, $sformatf("earlier example size %0d", dut_old.STORED_BITS));
    for (int a = 0; a < 7; a++) begin
      ex_addr = 3'(a); #1;
      chk(ex_imp == EX[a], $sformatf("example entry %0d improved got %h", a, ex_imp));
      chk(ex_old == EX[a], $sformatf("example entry %0d earlier got %h", a, ex_old));
    end
    for (int a = 0; a < 16; a++) begin
      int slp, shp;
      slp = 0; shp = 0;
      for (int k = 0; k < 4; k++) if (a[k]) begin slp += LP_COEF[k]; shp += HP_COEF[k]; end
      addr = 4'(a); #1;
      chk(int'(signed'(lp_word)) == slp, $sformatf("LP entry %0d got %0d want %0d", a, signed'(lp_word), slp));
      chk(int'(signed'(hp_word)) == shp, $sformatf("HP entry %0d got %0d want %0d", a, signed'(hp_word), shp));
    end
    chk(dut_lp.STORED_BITS == csize(4, 16, LP_LUT_W, 128'(LPT), 1'b1),
        $sformatf("LP size %0d", dut_lp.STORED_BITS));
    chk(dut_hp.STORED_BITS == csize(4, 16, HP_LUT_W, 128'(HPT), 1'b1),
        $sformatf("HP size %0d", dut_hp.STORED_BITS));
    $display("compressed sizes: LP %0d of %0d bits, HP %0d of %0d bits",
             dut_lp.STORED_BITS, 16*LP_LUT_W, dut_hp.STORED_BITS, 16*HP_LUT_W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of clut_col_decoder.
//
// Drives random column descriptions (raw or 0..MAX_TOG toggle indices) and
// every address, and compares the decoded bit with a reference that walks
// the column entry by entry, flipping at each listed toggle index.
module tb_clut_col_decoder;
  localparam int ADDR_W = 4, ENTRIES = 16, MAX_TOG = 3;

  logic [ADDR_W-1:0] addr;
  logic is_raw;
  logic [ENTRIES-1:0] raw_col;
  logic [1:0] ntog;
  logic [MAX_TOG-1:0][ADDR_W-1:0] tog_idx;
  logic bit_out;
  int checks = 0, failures = 0;

  clut_col_decoder #(.ADDR_W(ADDR_W), .ENTRIES(ENTRIES), .MAX_TOG(MAX_TOG)) dut (.*);

  function automatic logic ref_bit(int a);
    logic v = 1'b0;
    if (is_raw) return raw_col[a];
    for (int i = 0; i <= a; i++)
      for (int t = 0; t < int'(ntog); t++)
        if (int'(tog_idx[t]) == i) v = ~v;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // The published example: column 2 toggles at 1 and 3 -> 0110000.
    is_raw = 0; raw_col = '0; ntog = 2;
    tog_idx = '0; tog_idx[0] = 1; tog_idx[1] = 3;
    for (int a = 0; a < 7; a++) begin
      addr = ADDR_W'(a); #1;
      checks++;
      if (bit_out !== ((a == 1 || a == 2) ? 1'b1 : 1'b0)) begin
        failures++; $display("example column: addr %0d got %b", a, bit_out);
      end
    end
    for (int n = 0; n < 400; n++) begin
      is_raw  = ($urandom_range(0, 3) == 0);
      raw_col = ENTRIES'($urandom);
      ntog    = 2'($urandom_range(0, MAX_TOG));
      // increasing toggle indices
      begin
        int last, v;
        last = -1;
        for (int t = 0; t < MAX_TOG; t++) begin
          v = last + 1 + $urandom_range(0, 4);
          if (v > ENTRIES - 1) v = ENTRIES - 1;
          tog_idx[t] = ADDR_W'(v);
          last = v;
        end
      end
      for (int a = 0; a < ENTRIES; a++) begin
        addr = ADDR_W'(a); #1;
        checks++;
        if (bit_out !== ref_bit(a)) begin
          failures++;
          if (failures < 10) $display("raw=%b ntog=%0d addr=%0d got %b", is_raw, ntog, a, bit_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

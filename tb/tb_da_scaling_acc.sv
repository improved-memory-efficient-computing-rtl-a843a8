// Self-checking test of da_scaling_acc (5-bit LUT words, 2 bits per clock,
// 6-bit samples, so three slices per result).
//
// Random signed LUT words are fed slice by slice. The expected result is
// sum_j (w0_j + 2*w1_j) * 4^j, with the last slice's odd-weight word taken
// negative (the sign bit). Each result must appear on y with a one-clock
// y_valid pulse right after the last slice, i.e. once every three enabled
// clocks.
module tb_da_scaling_acc;
  localparam int LUT_W = 5, R = 2, IN_W = 6, OUT_W = 12, P = IN_W / R;
  logic clk = 0, reset, en, first, last;
  logic signed [R-1:0][LUT_W-1:0] lut;
  logic signed [OUT_W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0, results = 0;
  int j, expect_sum, last_cycle, cycle;

  da_scaling_acc #(.LUT_W(LUT_W), .DA_BITS(R), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 0; first = 0; last = 0; lut = '0; j = 0; expect_sum = 0; cycle = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    while (results < 200) begin
      en = 1'b1;
      first = (j == 0);
      last  = (j == P - 1);
      lut[0] = LUT_W'($urandom);
      lut[1] = LUT_W'($urandom);
      if (first) expect_sum = 0;
      expect_sum += int'(signed'(lut[0])) * (1 << (R * j));
      if (last) expect_sum -= 2 * int'(signed'(lut[1])) * (1 << (R * j));
      else      expect_sum += 2 * int'(signed'(lut[1])) * (1 << (R * j));
      @(posedge clk);
      #1;
      if (j == P - 1) begin
        checks++;
        if (!y_valid || int'(y) != expect_sum) begin
          failures++;
          $display("result %0d: got %0d valid %b, want %0d", results, y, y_valid, expect_sum);
        end
        results++;
        j = 0;
      end else begin
        checks++;
        if (y_valid) begin failures++; $display("unexpected y_valid"); end
        j++;
      end
      // an idle (stalled) clock now and then: nothing may change
      if ($urandom_range(0, 5) == 0) begin
        logic signed [OUT_W-1:0] hold;
        hold = y;
        en = 0; lut[0] = LUT_W'($urandom);
        @(posedge clk); #1;
        checks++;
        if (y != hold || y_valid) begin failures++; $display("stall changed output"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

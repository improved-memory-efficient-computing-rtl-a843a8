// Self-checking test of da_seq_ctrl for a three-slice period.
//
// With a random clock enable, the slice count must advance only on enabled
// clocks, wrap from P-1 to 0, and first/last must match the count.
module tb_da_seq_ctrl;
  localparam int P = 3;
  logic clk = 0, reset, en;
  logic [1:0] slice;
  logic first, last;
  int checks = 0, failures = 0, cycles = 0;
  int model;

  da_seq_ctrl #(.P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 0; model = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int n = 0; n < 300; n++) begin
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (int'(slice) != model || first != (model == 0) || last != (model == P - 1)) begin
        failures++;
        $display("cycle %0d: slice %0d first %b last %b, expected slice %0d", n, slice, first, last, model);
      end
      @(posedge clk);
      if (en) model = (model + 1) % P;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of da_input_regs (4 taps, 6-bit samples, 2 bits per
// clock).
//
// Samples are loaded every third enabled clock, with random stalls. Every
// cycle the two presented slices must equal bits 2j and 2j+1 of the last
// four loaded samples (x[n-k] on address bit k), j being the slice number
// within the period, taken from a reference history kept here.
module tb_da_input_regs;
  localparam int TAPS = 4, IN_W = 6, R = 2, P = IN_W / R;
  logic clk = 0, reset, en, load;
  logic [IN_W-1:0] din;
  logic [R-1:0][TAPS-1:0] slice;
  int checks = 0, failures = 0;
  logic [IN_W-1:0] hist [TAPS];
  int j;

  da_input_regs #(.TAPS(TAPS), .IN_W(IN_W), .DA_BITS(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 0; load = 0; din = '0; j = 0;
    foreach (hist[k]) hist[k] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int n = 0; n < 1000; n++) begin
      en   = ($urandom_range(0, 4) != 0);
      load = (j == P - 1);
      din  = IN_W'($urandom);
      #1;
      for (int r = 0; r < R; r++)
        for (int k = 0; k < TAPS; k++) begin
          checks++;
          if (slice[r][k] !== hist[k][R*j + r]) begin
            failures++;
            if (failures < 10) $display("n=%0d j=%0d r=%0d k=%0d got %b", n, j, r, k, slice[r][k]);
          end
        end
      @(posedge clk);
      if (en) begin
        if (j == P - 1) begin
          for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
          hist[0] = din;
          j = 0;
        end else j++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

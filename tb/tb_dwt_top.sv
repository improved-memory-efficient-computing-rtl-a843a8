// End-to-end test of dwt_top at its default parameters.
//
// Two independent random sample streams (4-bit low-pass input, 6-bit
// high-pass input) are applied whenever the design takes a sample, first
// with the clock enable held high and then with random clock-enable
// stalls. The reference computes the full-rate convolution of each stream
// with the Daubechies-4 taps of the design and keeps every second result,
// y[0], y[2], ...; each lpf_valid / hpf_valid output is compared with the
// next kept result. The sample period (2 and 3 clocks) and the decimated
// output period (4 and 6 clocks) are checked in the unstalled phase.
//
// Mechanisms that must occur at least once, each counted: stalled clocks,
// samples with the sign bit set (sign-slice subtraction), the most
// negative sample, outputs dropped by the decimation, outputs kept.
module tb_dwt_top;
  import da_dwt_pkg::*;

  logic clk = 0, clk_enable, reset;
  logic signed [LP_IN_W-1:0]  filter_in1;
  logic signed [HP_IN_W-1:0]  filter_in;
  logic lpf_take, hpf_take, lpf_valid, hpf_valid;
  logic signed [LP_OUT_W-1:0] LPF_OUT;
  logic signed [HP_OUT_W-1:0] HPF_OUT;

  dwt_top dut (.*);

  bit stalls;   // second phase: random clock-enable stalls

  always #5 clk = ~clk;

  // clock enable: held high, or randomly low in the stall phase
  always @(posedge clk) begin
    if (reset) clk_enable <= 1'b0;
    else       clk_enable <= stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  int checks = 0, failures = 0;
  int n_stall = 0, n_neg = 0, n_min = 0, n_drop = 0, n_keep_lp = 0, n_keep_hp = 0;
  int lp_h [4], hp_h [4];
  int lp_n, hp_n;              // samples taken so far
  int lp_q[$], hp_q[$];        // kept reference results
  int cycle, lp_last_take, hp_last_take, lp_last_v, hp_last_v;

  localparam int TARGET = 2000;  // decimated high-pass results per phase

  function automatic int conv(int h [4], coef4_t c);
    int s = 0;
    for (int k = 0; k < 4; k++) s += c[k] * h[k];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!reset) begin
      if (!clk_enable) n_stall++;
      // outputs
      if (lpf_valid) begin
        checks++;
        if (lp_q.size() == 0 || int'(LPF_OUT) != lp_q[0]) begin
          failures++; $display("LPF_OUT %0d, expected %0d", LPF_OUT, (lp_q.size() != 0) ? lp_q[0] : 0);
        end
        if (lp_q.size() != 0) void'(lp_q.pop_front());
        if (!stalls && n_keep_lp > 2) begin
          checks++;
          if (cycle - lp_last_v != 4) begin failures++; $display("LP output period %0d", cycle - lp_last_v); end
        end
        lp_last_v = cycle;
        n_keep_lp++;
      end
      if (hpf_valid) begin
        checks++;
        if (hp_q.size() == 0 || int'(HPF_OUT) != hp_q[0]) begin
          failures++; $display("HPF_OUT %0d, expected %0d", HPF_OUT, (hp_q.size() != 0) ? hp_q[0] : 0);
        end
        if (hp_q.size() != 0) void'(hp_q.pop_front());
        if (!stalls && n_keep_hp > 2) begin
          checks++;
          if (cycle - hp_last_v != 6) begin failures++; $display("HP output period %0d", cycle - hp_last_v); end
        end
        hp_last_v = cycle;
        n_keep_hp++;
      end
      if (dut.lp_y_valid && !lpf_valid) n_drop++;
      if (dut.hp_y_valid && !hpf_valid) n_drop++;
      // inputs taken at this edge
      if (lpf_take) begin
        for (int k = 3; k > 0; k--) lp_h[k] = lp_h[k-1];
        lp_h[0] = int'(filter_in1);
        if (lp_n % 2 == 0) lp_q.push_back(conv(lp_h, LP_COEF));
        if (filter_in1 < 0) n_neg++;
        if (filter_in1 == -8) n_min++;
        if (!stalls && lp_n > 1) begin
          checks++;
          if (cycle - lp_last_take != 2) begin failures++; $display("LP sample period %0d", cycle - lp_last_take); end
        end
        lp_last_take = cycle;
        lp_n++;
        filter_in1 <= ($urandom_range(0, 15) == 0) ? -8 : LP_IN_W'($urandom);
      end
      if (hpf_take) begin
        for (int k = 3; k > 0; k--) hp_h[k] = hp_h[k-1];
        hp_h[0] = int'(filter_in);
        if (hp_n % 2 == 0) hp_q.push_back(conv(hp_h, HP_COEF));
        if (filter_in < 0) n_neg++;
        if (filter_in == -32) n_min++;
        if (!stalls && hp_n > 1) begin
          checks++;
          if (cycle - hp_last_take != 3) begin failures++; $display("HP sample period %0d", cycle - hp_last_take); end
        end
        hp_last_take = cycle;
        hp_n++;
        filter_in <= ($urandom_range(0, 15) == 0) ? -32 : HP_IN_W'($urandom);
      end
    end
  end

  task automatic require(int count, string what);
    checks++;
    $display("%-28s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    reset = 1; filter_in1 = 0; filter_in = 0; stalls = 0; cycle = 0;
    lp_n = 0; hp_n = 0;
    foreach (lp_h[k]) begin lp_h[k] = 0; hp_h[k] = 0; end
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (n_keep_hp >= TARGET);
    @(posedge clk);
    stalls = 1;
    wait (n_keep_hp >= 2 * TARGET);
    repeat (20) @(posedge clk);
    require(n_keep_lp, "low-pass outputs kept");
    require(n_keep_hp, "high-pass outputs kept");
    require(n_drop, "outputs dropped (decimation)");
    require(n_stall, "stalled clocks");
    require(n_neg, "negative samples");
    require(n_min, "most negative samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

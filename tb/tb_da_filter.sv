// Self-checking test of da_filter in the two configurations of the DWT:
// low-pass (4-bit samples, 9-bit output, 2 clocks per sample) and
// high-pass (6-bit samples, 13-bit output, 3 clocks per sample), plus a
// high-pass copy that uses full-width LUT indices and a low-pass copy with
// 8-bit samples (4 clocks per sample).
//
// Random samples, including the most negative one, are applied whenever a
// filter takes an input. Each out_valid result is compared with the
// direct convolution sum_k c[k] x[n-k] of the samples taken so far. The
// sample period (clocks between results, clock enable held high) and the
// latency (result register loaded one period after the sample was taken,
// so out_valid is seen at the clock edge after that) are checked,
// then the test is repeated with random clock-enable stalls.
module tb_da_filter;
  import da_dwt_pkg::*;

  logic clk = 0, reset, clk_enable;
  int checks = 0, failures = 0;

  bit stalls;   // second phase: random clock-enable stalls

  always #5 clk = ~clk;

  // clock enable: held high, or randomly low in the stall phase
  always @(posedge clk) begin
    if (reset) clk_enable <= 1'b0;
    else       clk_enable <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  logic signed [LP_IN_W-1:0]  lp_in;
  logic signed [HP_IN_W-1:0]  hp_in;
  logic                       lp_take, hp_take, hp0_take;
  logic signed [LP_OUT_W-1:0] lp_out;
  logic signed [HP_OUT_W-1:0] hp_out, hp0_out;
  logic                       lp_v, hp_v, hp0_v;

  da_filter #(.TAPS(4), .IN_W(LP_IN_W), .LUT_W(LP_LUT_W), .OUT_W(LP_OUT_W),
              .DA_BITS(2), .COEF(LP_COEF)) dut_lp (
    .clk, .clk_enable, .reset, .filter_in(lp_in), .in_take(lp_take),
    .filter_out(lp_out), .out_valid(lp_v));
  da_filter #(.TAPS(4), .IN_W(HP_IN_W), .LUT_W(HP_LUT_W), .OUT_W(HP_OUT_W),
              .DA_BITS(2), .COEF(HP_COEF)) dut_hp (
    .clk, .clk_enable, .reset, .filter_in(hp_in), .in_take(hp_take),
    .filter_out(hp_out), .out_valid(hp_v));
  da_filter #(.TAPS(4), .IN_W(HP_IN_W), .LUT_W(HP_LUT_W), .OUT_W(HP_OUT_W),
              .DA_BITS(2), .COEF(HP_COEF), .IMPROVED(1'b0)) dut_hp0 (
    .clk, .clk_enable, .reset, .filter_in(hp_in), .in_take(hp0_take),
    .filter_out(hp0_out), .out_valid(hp0_v));

  // 8-bit samples with the low-pass taps: four clocks per sample.
  logic signed [7:0]  w8_in;
  logic               w8_take, w8_v;
  logic signed [12:0] w8_out;
  da_filter #(.TAPS(4), .IN_W(8), .LUT_W(LP_LUT_W), .OUT_W(13),
              .DA_BITS(2), .COEF(LP_COEF)) dut_w8 (
    .clk, .clk_enable, .reset, .filter_in(w8_in), .in_take(w8_take),
    .filter_out(w8_out), .out_valid(w8_v));
  int w8_h [4];
  int w8_q[$];
  int w8_results, w8_last_v;

  // Reference histories, newest first; taken-sample cycle stamps.
  int lp_h [4], hp_h [4];
  int cycle, lp_take_cyc, hp_take_cyc, lp_last_v, hp_last_v;
  int lp_results, hp_results;
  // expected results and the clock of the sample each one completes
  int lp_q[$], hp_q[$], lp_tq[$], hp_tq[$];

  function automatic int conv(int h [4], coef4_t c);
    int s = 0;
    for (int k = 0; k < 4; k++) s += c[k] * h[k];
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: new random sample after every take; extreme values now and then
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (lp_take) lp_in <= ($urandom_range(0, 7) == 0) ? -8 : LP_IN_W'($urandom);
    if (w8_take) w8_in <= ($urandom_range(0, 7) == 0) ? -128 : 8'($urandom);
    if (hp_take) hp_in <= ($urandom_range(0, 7) == 0) ? -32 : HP_IN_W'($urandom);
  end

  // reference model and checks
  always @(posedge clk) begin
    if (!reset) begin
      if (lp_v) begin
        checks++;
        lp_take_cyc = lp_tq.pop_front();
        if (int'(lp_out) != lp_q[0]) begin
          failures++; $display("LP got %0d want %0d", lp_out, lp_q[0]);
        end
        void'(lp_q.pop_front());
        if (!stalls && lp_results > 1) begin
          checks++;
          if (cycle - lp_last_v != 2) begin failures++; $display("LP period %0d", cycle - lp_last_v); end
          checks++;
          if (cycle - lp_take_cyc != 3) begin failures++; $display("LP latency %0d", cycle - lp_take_cyc); end
        end
        lp_last_v = cycle;
        lp_results++;
      end
      if (hp_v) begin
        checks++;
        hp_take_cyc = hp_tq.pop_front();
        if (int'(hp_out) != hp_q[0]) begin
          failures++; $display("HP got %0d want %0d", hp_out, hp_q[0]);
        end
        void'(hp_q.pop_front());
        checks++;
        if (!hp0_v || hp0_out != hp_out) begin
          failures++; $display("HP full-width-index copy differs");
        end
        if (!stalls && hp_results > 1) begin
          checks++;
          if (cycle - hp_last_v != 3) begin failures++; $display("HP period %0d", cycle - hp_last_v); end
          checks++;
          if (cycle - hp_take_cyc != 4) begin failures++; $display("HP latency %0d", cycle - hp_take_cyc); end
        end
        hp_last_v = cycle;
        hp_results++;
      end
      if (w8_v) begin
        checks++;
        if (int'(w8_out) != w8_q[0]) begin
          failures++; $display("8-bit got %0d want %0d", w8_out, w8_q[0]);
        end
        void'(w8_q.pop_front());
        if (!stalls && w8_results > 1) begin
          checks++;
          if (cycle - w8_last_v != 4) begin failures++; $display("8-bit period %0d", cycle - w8_last_v); end
        end
        w8_last_v = cycle;
        w8_results++;
      end
      if (w8_take) begin
        for (int k = 3; k > 0; k--) w8_h[k] = w8_h[k-1];
        w8_h[0] = int'(w8_in);
        w8_q.push_back(conv(w8_h, LP_COEF));
      end
      if (lp_take) begin
        for (int k = 3; k > 0; k--) lp_h[k] = lp_h[k-1];
        lp_h[0] = int'(lp_in);
        lp_q.push_back(conv(lp_h, LP_COEF));
        lp_tq.push_back(cycle);
      end
      if (hp_take) begin
        for (int k = 3; k > 0; k--) hp_h[k] = hp_h[k-1];
        hp_h[0] = int'(hp_in);
        hp_q.push_back(conv(hp_h, HP_COEF));
        hp_tq.push_back(cycle);
      end
    end
  end

  initial begin
    reset = 1; lp_in = 0; hp_in = 0; stalls = 0; cycle = 0;
    lp_results = 0; hp_results = 0; lp_last_v = 0; hp_last_v = 0;
    foreach (lp_h[k]) begin lp_h[k] = 0; hp_h[k] = 0; w8_h[k] = 0; end
    w8_in = 0; w8_results = 0; w8_last_v = 0; w8_q.push_back(0);
    // the first result after reset is that of the empty history
    lp_q.push_back(0); hp_q.push_back(0); lp_tq.push_back(0); hp_tq.push_back(0);
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (hp_results >= 300);
    @(posedge clk);
    stalls = 1;
    wait (hp_results >= 600);
    @(posedge clk);
    $display("results checked: LP %0d, HP %0d, 8-bit %0d", lp_results, hp_results, w8_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Single-level 1-D discrete wavelet transform built from two
// distributed-arithmetic filters with compressed look-up tables.
//
// The low-pass filter (instance f1) and the high-pass filter (instance f2)
// are da_filter instances that differ only in parameters: the low-pass one
// takes 4-bit samples on filter_in1 and gives 9-bit results on LPF_OUT, the
// high-pass one takes 6-bit samples on filter_in and gives 13-bit results
// on HPF_OUT. The two inputs, the port names and widths, clk, clk_enable
// and reset follow the synthesized DWT of the publication; the two filters
// run independently, each at its own sample period (2 clocks low-pass, 3
// clocks high-pass, at two bits per clock).
//
// Handshake (this design's own): lpf_take / hpf_take are high in the clock
// whose edge captures filter_in1 / filter_in. The DWT keeps every second
// filter output (dyadic decimation): lpf_valid / hpf_valid pulse with the
// outputs y[0], y[2], y[4], ..., counted from the first sample taken after
// reset; the odd outputs and the initial empty-history output are dropped.
//
// Taps: the Daubechies-4 low-pass taps scaled by 8 and the high-pass taps
// scaled by 64 (see da_dwt_pkg) - the choice of wavelet is this design's.
module dwt_top
  import da_dwt_pkg::*;
#(
  parameter coef4_t LP_TAPS_C = LP_COEF,
  parameter coef4_t HP_TAPS_C = HP_COEF,
  parameter bit     IMPROVED  = 1'b1
) (
  input  logic                       clk,
  input  logic                       clk_enable,
  input  logic                       reset,
  input  logic signed [LP_IN_W-1:0]  filter_in1,
  input  logic signed [HP_IN_W-1:0]  filter_in,
  output logic                       lpf_take,
  output logic                       hpf_take,
  output logic signed [LP_OUT_W-1:0] LPF_OUT,
  output logic signed [HP_OUT_W-1:0] HPF_OUT,
  output logic                       lpf_valid,
  output logic                       hpf_valid
);

  logic lp_y_valid, hp_y_valid;

  da_filter #(
    .TAPS    (DA_TAPS),
    .IN_W    (LP_IN_W),
    .LUT_W   (LP_LUT_W),
    .OUT_W   (LP_OUT_W),
    .DA_BITS (DA_BITS),
    .COEF    (LP_TAPS_C),
    .IMPROVED(IMPROVED)
  ) f1 (
    .clk       (clk),
    .clk_enable(clk_enable),
    .reset     (reset),
    .filter_in (filter_in1),
    .in_take   (lpf_take),
    .filter_out(LPF_OUT),
    .out_valid (lp_y_valid)
  );

  da_filter #(
    .TAPS    (DA_TAPS),
    .IN_W    (HP_IN_W),
    .LUT_W   (HP_LUT_W),
    .OUT_W   (HP_OUT_W),
    .DA_BITS (DA_BITS),
    .COEF    (HP_TAPS_C),
    .IMPROVED(IMPROVED)
  ) f2 (
    .clk       (clk),
    .clk_enable(clk_enable),
    .reset     (reset),
    .filter_in (filter_in),
    .in_take   (hpf_take),
    .filter_out(HPF_OUT),
    .out_valid (hp_y_valid)
  );

  // Decimation by two. Output number m after reset is y[m-1]; keep odd m.
  logic lp_odd, hp_odd;

  always_ff @(posedge clk) begin
    if (reset) begin
      lp_odd <= 1'b0;
      hp_odd <= 1'b0;
    end else begin
      if (lp_y_valid) lp_odd <= ~lp_odd;
      if (hp_y_valid) hp_odd <= ~hp_odd;
    end
  end

  assign lpf_valid = lp_y_valid && lp_odd;
  assign hpf_valid = hp_y_valid && hp_odd;

endmodule

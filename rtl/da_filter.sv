// Parallel distributed-arithmetic FIR filter with compressed LUTs.
//
// Computes y[n] = sum_k COEF[k] * x[n-k] over TAPS taps without any
// multiplier. The DA look-up table holds, for every TAPS-bit address a,
// the sum of the coefficients COEF[k] whose address bit a[k] is set; it is
// built from COEF at elaboration and stored compressed (da_clut). The
// input samples sit in a chain of circulating shift registers
// (da_input_regs) that present DA_BITS bit slices of all taps per clock,
// LSB first. One LUT copy per bit weight decodes its slice; the words are
// combined (odd-weight word shifted left) and accumulated in a
// right-shifting scaling accumulator (da_scaling_acc), the sign slice
// being subtracted.
//
// Timing: one sample period is P = IN_W / DA_BITS enabled clocks. in_take
// is high on the last clock of a period: filter_in is captured at that
// clock edge and must be valid then. The result y[n] that includes this
// sample appears on filter_out P enabled clocks later, at the edge that
// captures the next sample, and out_valid pulses for one clock after that
// edge. The first output after reset is y[-1] = 0 (empty history). With
// clk_enable low nothing advances. Reset is synchronous, active high.
//
// Following the publication: the DA structure, two LUTs per filter (bit
// slices split into even and odd bit weights), the <<, +, >> accumulation
// path, LSB-first processing and the compressed LUT. The handshake strobes
// (in_take, out_valid) and the sizes of the LUT words are this design's.
module da_filter #(
  parameter int TAPS     = 4,
  parameter int IN_W     = 4,
  parameter int LUT_W    = 5,
  parameter int OUT_W    = 9,
  parameter int DA_BITS  = 2,
  parameter int COEF [TAPS] = '{4, 7, 2, -1},
  parameter bit IMPROVED = 1'b1
) (
  input  logic                    clk,
  input  logic                    clk_enable,
  input  logic                    reset,
  input  logic signed [IN_W-1:0]  filter_in,
  output logic                    in_take,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    out_valid
);

  localparam int P       = IN_W / DA_BITS;
  localparam int ENTRIES = 1 << TAPS;
  localparam int CW      = (P > 1) ? $clog2(P) : 1;

  // DA look-up table: entry a = sum of COEF[k] for the set bits of a.
  function automatic int lut_sum(int a);
    int s = 0;
    for (int k = 0; k < TAPS; k++) if (a[k]) s += COEF[k];
    return s;
  endfunction

  function automatic logic [ENTRIES*LUT_W-1:0] build_lut();
    logic [ENTRIES*LUT_W-1:0] t = '0;
    for (int a = 0; a < ENTRIES; a++) t[a*LUT_W +: LUT_W] = LUT_W'(lut_sum(a));
    return t;
  endfunction

  function automatic bit lut_fits();
    for (int a = 0; a < ENTRIES; a++)
      if (lut_sum(a) >= (1 << (LUT_W - 1)) || lut_sum(a) < -(1 << (LUT_W - 1)))
        return 1'b0;
    return 1'b1;
  endfunction

  localparam logic [ENTRIES*LUT_W-1:0] LUT = build_lut();

  if (IN_W % DA_BITS != 0) begin : g_bad_width
    $error("IN_W must be a multiple of DA_BITS");
  end
  if (!lut_fits()) begin : g_bad_lut
    $error("a coefficient sum does not fit the LUT word");
  end

  logic [CW-1:0]                   slice_no;
  logic                            first, last;
  logic [DA_BITS-1:0][TAPS-1:0]    addr;
  logic signed [DA_BITS-1:0][LUT_W-1:0] word;

  da_seq_ctrl #(.P(P)) u_seq (
    .clk  (clk),
    .reset(reset),
    .en   (clk_enable),
    .slice(slice_no),
    .first(first),
    .last (last)
  );

  da_input_regs #(.TAPS(TAPS), .IN_W(IN_W), .DA_BITS(DA_BITS)) u_regs (
    .clk  (clk),
    .reset(reset),
    .en   (clk_enable),
    .load (last),
    .din  (filter_in),
    .slice(addr)
  );

  for (genvar r = 0; r < DA_BITS; r++) begin : g_lut
    da_clut #(
      .ADDR_W  (TAPS),
      .ENTRIES (ENTRIES),
      .DATA_W  (LUT_W),
      .TABLE   (LUT),
      .IMPROVED(IMPROVED)
    ) u_clut (
      .addr(addr[r]),
      .data(word[r])
    );
  end

  da_scaling_acc #(
    .LUT_W  (LUT_W),
    .DA_BITS(DA_BITS),
    .IN_W   (IN_W),
    .OUT_W  (OUT_W)
  ) u_acc (
    .clk    (clk),
    .reset  (reset),
    .en     (clk_enable),
    .first  (first),
    .last   (last),
    .lut    (word),
    .y      (filter_out),
    .y_valid(out_valid)
  );

  assign in_take = clk_enable && last;

  // slice_no is used only by the checks below.
  always_ff @(posedge clk) begin
    if (!reset && clk_enable) assert (32'(slice_no) < P);
  end

endmodule

// Scaling accumulator of a DA filter, with the two-bit-parallel combiner.
//
// Each clock the filter reads DA_BITS LUT words, one per bit weight r of the
// current slice. They are combined into the slice's partial sum
//   partial = sum_r (+/-) lut[r] << r
// where the word of the sign bit (r = DA_BITS-1 on the last slice) is
// subtracted, since the sample MSB has negative weight in two's complement.
// Slices arrive LSB first, so the accumulator shifts right:
//   acc <= (acc_in >>> DA_BITS) + (partial << (IN_W - DA_BITS)),
// with acc_in = 0 on the first slice. Every right shift drops only zero
// bits, so after IN_W/DA_BITS slices acc holds the exact inner product
// sum_k c[k] x[n-k]. It is copied to y on the last slice and y_valid
// pulses for one clock.
//
// The accumulator is IN_W+LUT_W+1 bits wide internally (the largest partial
// state needs IN_W+LUT_W); y keeps the OUT_W least significant bits, which
// hold every result of the filters this design uses. Reset is synchronous.
//
// The left shift of the odd-weight word, the add/subtract and the
// right-shifting accumulator follow the published structure; the exact
// placement of each partial at weight 2^(IN_W-DA_BITS) is this design's.
module da_scaling_acc #(
  parameter int LUT_W   = 5,
  parameter int DA_BITS = 2,
  parameter int IN_W    = 4,
  parameter int OUT_W   = 9
) (
  input  logic                            clk,
  input  logic                            reset,
  input  logic                            en,
  input  logic                            first,
  input  logic                            last,
  input  logic signed [DA_BITS-1:0][LUT_W-1:0] lut,
  output logic signed [OUT_W-1:0]         y,
  output logic                            y_valid
);

  localparam int ACC_W = IN_W + LUT_W + 1;
  localparam int PW    = LUT_W + DA_BITS + 1;

  logic signed [ACC_W-1:0] acc, acc_in, acc_next;
  logic signed [PW-1:0]    partial;

  always_comb begin
    partial = '0;
    for (int r = 0; r < DA_BITS; r++) begin
      if (last && r == DA_BITS - 1)
        partial = partial - (PW'(signed'(lut[r])) <<< r);
      else
        partial = partial + (PW'(signed'(lut[r])) <<< r);
    end
    acc_in   = first ? '0 : acc;
    acc_next = (acc_in >>> DA_BITS) + (ACC_W'(partial) <<< (IN_W - DA_BITS));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en && last;
      if (en) begin
        acc <= acc_next;
        if (last) y <= OUT_W'(acc_next);
      end
    end
  end

endmodule

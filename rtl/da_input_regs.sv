// Input register array of a DA filter: one circulating shift register per
// filter tap.
//
// Register k holds sample x[n-k]. During a sample period every register
// rotates right by DA_BITS bits per enabled clock, so its DA_BITS least
// significant bits are the current bit slice of that tap, LSB slice first.
// After IN_W/DA_BITS rotations a register is back in its original order;
// the rotation on the last slice is therefore combined with the move to
// the next register (register k takes the rotated register k-1, register 0
// takes the new sample). The oldest sample drops out of the last register.
// This is the shift-register chain with feedback loops of the parallel DA
// filter; IN_W must be a multiple of DA_BITS.
//
//   load   take din at this edge (asserted on the last slice of a period)
//   slice  slice[r][k] = bit r of the current slice of tap k; slice[r] is
//          the LUT address for bit weight r within the slice
// Reset (synchronous, active high) clears the history to zero.
//
// The register chain, the feedback loops and LSB-first reading follow the
// published parallel DA structure; the rotation scheme is this design's.
module da_input_regs #(
  parameter int TAPS    = 4,
  parameter int IN_W    = 4,
  parameter int DA_BITS = 2
) (
  input  logic                             clk,
  input  logic                             reset,
  input  logic                             en,
  input  logic                             load,
  input  logic [IN_W-1:0]                  din,
  output logic [DA_BITS-1:0][TAPS-1:0]     slice
);

  logic [TAPS-1:0][IN_W-1:0] sr;

  function automatic logic [IN_W-1:0] rot(logic [IN_W-1:0] v);
    return (v >> DA_BITS) | (v << (IN_W - DA_BITS));
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      sr <= '0;
    end else if (en) begin
      if (load) begin
        sr[0] <= din;
        for (int k = 1; k < TAPS; k++) sr[k] <= rot(sr[k-1]);
      end else begin
        for (int k = 0; k < TAPS; k++) sr[k] <= rot(sr[k]);
      end
    end
  end

  always_comb begin
    for (int r = 0; r < DA_BITS; r++)
      for (int k = 0; k < TAPS; k++) slice[r][k] = sr[k][r];
  end

endmodule

// Bit-slice sequencer of one DA filter.
//
// A sample of IN_W bits is processed DA_BITS bits per clock, so one sample
// period lasts P = IN_W / DA_BITS enabled clocks. The sequencer counts the
// slice number 0..P-1 and flags the first slice (the accumulator restarts)
// and the last slice (the sign slice is subtracted, the result is final and
// the next input sample is taken at this clock edge). All state advances
// only on clocks with en high, so en low stalls the whole filter.
// Reset is synchronous and active high; it returns the count to slice 0.
//
// The published architecture shows only a sequencing block in front of the
// shift registers; this modulo-P counter is the simplest form of it.
module da_seq_ctrl #(
  parameter int P    = 2,
  localparam int CW  = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          en,
  output logic [CW-1:0] slice,
  output logic          first,
  output logic          last
);

  always_ff @(posedge clk) begin
    if (reset)          slice <= '0;
    else if (en) begin
      if (last)         slice <= '0;
      else              slice <= slice + 1'b1;
    end
  end

  assign first = (slice == '0);
  assign last  = (slice == CW'(P - 1));

endmodule

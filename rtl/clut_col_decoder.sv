// One column decoder of a compressed look-up table.
//
// A LUT column (one bit position of every LUT word, read down the entries)
// is stored either raw, one bit per entry, or as the list of entry indices
// at which the column toggles, starting from 0 before entry 0. Decoding a
// compressed column compares the address with each stored index: an address
// greater than or equal to an index contributes a '1', a smaller one a '0',
// and the column bit is the parity (XOR) of these comparisons, i.e. the
// number of toggles passed so far. With one index this is exactly "address
// >= index"; with two it gives a pulse between them. A raw column is simply
// indexed by the address.
//
// The comparison rule is the published decoding rule; combining several
// indices by parity is this design's reading of it. Purely combinational.
//
//   addr     LUT address (the bit slice of the filter taps)
//   is_raw   1: column stored raw in raw_col; 0: stored as toggle indices
//   ntog     number of valid entries in tog_idx (0..MAX_TOG)
//   bit_out  the decoded column bit
module clut_col_decoder #(
  parameter int ADDR_W  = 3,
  parameter int ENTRIES = 7,
  parameter int MAX_TOG = 2,
  localparam int NT_W   = $clog2(MAX_TOG + 1)
) (
  input  logic [ADDR_W-1:0]              addr,
  input  logic                           is_raw,
  input  logic [ENTRIES-1:0]             raw_col,
  input  logic [NT_W-1:0]                ntog,
  input  logic [MAX_TOG-1:0][ADDR_W-1:0] tog_idx,
  output logic                           bit_out
);

  logic cmp_bit;

  always_comb begin
    cmp_bit = 1'b0;
    for (int t = 0; t < MAX_TOG; t++) begin
      if (NT_W'(t) < ntog && addr >= tog_idx[t]) cmp_bit = ~cmp_bit;
    end
  end

  always_comb begin
    if (is_raw) bit_out = (32'(addr) < ENTRIES) ? raw_col[addr] : 1'b0;
    else        bit_out = cmp_bit;
  end

endmodule

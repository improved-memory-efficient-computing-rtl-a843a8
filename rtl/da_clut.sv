// Compressed distributed-arithmetic look-up table (ROM plus decoder).
//
// The uncompressed table TABLE holds ENTRIES words of DATA_W bits (entry i
// at TABLE[i*DATA_W +: DATA_W]). At elaboration it is compressed column by
// column: the toggles of each column are counted (the column is taken to
// be 0 before entry 0) and, if storing their indices costs fewer bits than
// the column itself (ntog * ADDR_W < ENTRIES), only the indices are kept;
// otherwise the column is kept raw. With IMPROVED set, an index below
// 2^(ADDR_W-1) is stored with ADDR_W-1 bits (its zero MSB dropped) and the
// others with ADDR_W bits; with IMPROVED clear every index takes ADDR_W
// bits (the earlier scheme). The packed result is the constant ROM, of
// STORED_BITS bits, laid out column 0 (word LSB) first; within a column the
// indices follow in toggle order, or the raw bits follow in entry order.
//
// Reading: every column has a clut_col_decoder that rebuilds its bit from
// the address and the ROM bits of that column, so data is combinational in
// addr. Because the index widths are fixed when the ROM is built, the
// decoder knows where every stored field starts and how wide it is.
//
// The default TABLE is the seven-entry, eight-bit example table of the
// published compression example: it compresses to 34 bits with full-width
// indices and to 28 bits with the improved widths. The compression rule,
// the improved index widths and the decoding rule follow the publication;
// the bit-level layout of the ROM is this design's own.
module da_clut #(
  parameter int ADDR_W  = 3,
  parameter int ENTRIES = 7,
  parameter int DATA_W  = 8,
  parameter logic [ENTRIES*DATA_W-1:0] TABLE =
    {8'hB9, 8'hAB, 8'hAF, 8'hAB, 8'hC9, 8'hC3, 8'h80},
  parameter bit IMPROVED = 1'b1
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  // Most toggles a compressed column may have.
  localparam int MAX_TOG_RAW = (ENTRIES - 1) / ADDR_W;
  localparam int MAX_TOG     = (MAX_TOG_RAW < 1) ? 1 : MAX_TOG_RAW;
  localparam int NT_W        = $clog2(MAX_TOG + 1);
  localparam int FULL_W      = ENTRIES * DATA_W;

  function automatic logic tbit(int c, int i);
    return TABLE[i*DATA_W + c];
  endfunction

  function automatic int ntog(int c);
    int n = 0;
    logic prev = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (tbit(c, i) != prev) n++;
      prev = tbit(c, i);
    end
    return n;
  endfunction

  function automatic bit is_comp(int c);
    return ntog(c) * ADDR_W < ENTRIES;
  endfunction

  // Entry index of the t-th toggle of column c.
  function automatic int tog_at(int c, int t);
    int n = 0;
    logic prev = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (tbit(c, i) != prev) begin
        if (n == t) return i;
        n++;
      end
      prev = tbit(c, i);
    end
    return 0;
  endfunction

  function automatic int idx_w(int c, int t);
    if (IMPROVED && tog_at(c, t) < (1 << (ADDR_W - 1))) return ADDR_W - 1;
    return ADDR_W;
  endfunction

  function automatic int col_bits(int c);
    int b = 0;
    if (!is_comp(c)) return ENTRIES;
    for (int t = 0; t < ntog(c); t++) b += idx_w(c, t);
    return b;
  endfunction

  function automatic int col_off(int c);
    int o = 0;
    for (int k = 0; k < c; k++) o += col_bits(k);
    return o;
  endfunction

  function automatic int tog_off(int c, int t);
    int o = col_off(c);
    for (int k = 0; k < t; k++) o += idx_w(c, k);
    return o;
  endfunction

  function automatic logic [FULL_W-1:0] build_rom();
    logic [FULL_W-1:0] r = '0;
    int o = 0;
    for (int c = 0; c < DATA_W; c++) begin
      if (is_comp(c)) begin
        for (int t = 0; t < ntog(c); t++) begin
          for (int b = 0; b < idx_w(c, t); b++) r[o + b] = tog_at(c, t)[b];
          o += idx_w(c, t);
        end
      end else begin
        for (int i = 0; i < ENTRIES; i++) r[o + i] = tbit(c, i);
        o += ENTRIES;
      end
    end
    return r;
  endfunction

  // Size of the compressed table in bits, and the table itself.
  localparam int STORED_BITS = col_off(DATA_W);
  localparam int ROM_W       = (STORED_BITS < 1) ? 1 : STORED_BITS;
  localparam logic [FULL_W-1:0] ROM_FULL = build_rom();
  localparam logic [ROM_W-1:0]  ROM      = ROM_FULL[ROM_W-1:0];

  for (genvar c = 0; c < DATA_W; c++) begin : g_col
    localparam bit COMP = is_comp(c);
    localparam int NT   = COMP ? ntog(c) : 0;

    logic [ENTRIES-1:0]             raw;
    logic [MAX_TOG-1:0][ADDR_W-1:0] tidx;

    if (!COMP) begin : g_raw
      assign raw  = ROM[col_off(c) +: ENTRIES];
      assign tidx = '0;
    end else begin : g_cmp
      assign raw = '0;
      for (genvar t = 0; t < MAX_TOG; t++) begin : g_t
        if (t < NT) begin : g_used
          localparam int W  = idx_w(c, t);
          localparam int TO = tog_off(c, t);
          assign tidx[t] = ADDR_W'(ROM[TO +: W]);
        end else begin : g_unused
          assign tidx[t] = '0;
        end
      end
    end

    clut_col_decoder #(
      .ADDR_W (ADDR_W),
      .ENTRIES(ENTRIES),
      .MAX_TOG(MAX_TOG)
    ) u_dec (
      .addr   (addr),
      .is_raw (!COMP),
      .raw_col(raw),
      .ntog   (NT_W'(NT)),
      .tog_idx(tidx),
      .bit_out(data[c])
    );
  end

endmodule

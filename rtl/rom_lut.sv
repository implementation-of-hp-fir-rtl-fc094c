// rom_lut: one partition of the distributed-arithmetic look-up table.
//
// Distributed arithmetic replaces the multiplications of an inner product
// sum(h(i) * x(i)) by a table F indexed by one bit plane of the inputs:
//   F(a) = sum over j of a[j] * h(BASE + j),   j = 0 .. ADDR_W-1.
// A single table over all 18 taps would need 2^18 words, so the table is
// split into three tables of ADDR_W = 6 address bits (64 words each), one per
// group of six consecutive coefficients, and their outputs are added later by
// the shift-accumulator. The contents are computed at elaboration time from
// the coefficient list in fir_hp_pkg, so changing a coefficient needs no
// regenerated table. The read is combinational (a distributed ROM): data
// follows addr in the same cycle.
//
// The three-way split into 64-word tables follows the filter's description.
// The description gives two of the tables 12-bit words and one 17-bit words;
// with the coefficients as exact integers two groups need 13 bits, so every
// table here uses DATA_W = 17 by default and holds its sums exactly. An
// elaboration check rejects a DATA_W that is too small for its group.
module rom_lut
  import fir_hp_pkg::*;
#(
  parameter int ADDR_W = 6,
  parameter int DATA_W = 17,
  parameter int BASE   = 0
) (
  input  logic        [ADDR_W-1:0] addr,
  output logic signed [DATA_W-1:0] data
);

  localparam int DEPTH = 2 ** ADDR_W;

  typedef logic signed [DATA_W-1:0] table_t [DEPTH];

  // Sum of the selected coefficients, at integer precision.
  function automatic longint entry(int a);
    longint s = 0;
    for (int j = 0; j < ADDR_W; j++)
      if (a[j]) s += longint'(H[BASE + j]);
    return s;
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < DEPTH; a++) t[a] = DATA_W'(entry(a));
    return t;
  endfunction

  // Largest positive and most negative entry, for the width check.
  function automatic longint max_entry();
    longint m = 0;
    for (int a = 0; a < DEPTH; a++) if (entry(a) > m) m = entry(a);
    return m;
  endfunction

  function automatic longint min_entry();
    longint m = 0;
    for (int a = 0; a < DEPTH; a++) if (entry(a) < m) m = entry(a);
    return m;
  endfunction

  if (BASE < 0 || BASE + ADDR_W > TAPS) begin : g_bad_base
    $error("rom_lut: coefficients BASE .. BASE+ADDR_W-1 out of range");
  end
  if (max_entry() > (longint'(1) <<< (DATA_W-1)) - 1 ||
      min_entry() < -(longint'(1) <<< (DATA_W-1))) begin : g_too_narrow
    $error("rom_lut: DATA_W too small for the coefficient group");
  end

  localparam table_t TABLE = build_table();

  always_comb data = TABLE[addr];

endmodule

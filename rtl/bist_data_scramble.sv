// bist_data_scramble: the BIST scramble table. A test algorithm is written in
// terms of the physical values the cells should hold (a solid or checkerboard
// background, or its complement); this block returns the logical data word the
// BIST must write, or expect back, at a given logical address.
//
// How it works: for each bit of the word it forms the physical value of the
// background and XORs it with the cell's polarity.
//  * Solid background: every cell physical 0.
//  * Checkerboard: physical (row + column) parity. With the distributed folding
//    of the thesis (bit i of word j sits next to bit i of word j+1), all bits
//    of one word share a physical column parity, so the value is
//    prow[0] ^ col[0], where prow is the physical row (edram_pkg::wl_swap).
//  * inv selects the complement background ("b" in the march notation).
//  * Polarity is edram_pkg::scramble_inv: a small two-level function of the two
//    least significant word-line address bits, the most significant one, and
//    the bit position, as the thesis describes. The exact table of the
//    thesis' core is not given; this one is a folded bit-line layout with a
//    mid-bank twist on odd bit positions.
// Purely combinational.
module bist_data_scramble
  import edram_pkg::*;
#(
  parameter int unsigned BANKS = 128,
  parameter int unsigned WLS   = 64,
  parameter int unsigned COLS  = 64,
  parameter int unsigned HW    = 16,
  localparam int unsigned DW    = 2 * HW,
  localparam int unsigned CW    = $clog2(COLS),
  localparam int unsigned WW    = $clog2(WLS),
  localparam int unsigned BW    = $clog2(BANKS),
  localparam int unsigned AW    = CW + WW + BW
) (
  input  logic [AW-1:0] addr,
  input  background_e   bg,
  input  logic          inv,
  output logic [DW-1:0] data
);

  logic [15:0] prow;
  logic        phys;

  assign prow = wl_swap(16'(addr[CW +: WW]));
  assign phys = ((bg == BG_CHK) && (prow[0] ^ addr[0])) ^ inv;

  always_comb begin
    for (int b = 0; b < int'(DW); b++)
      data[b] = phys ^ scramble_inv(prow, 5'(b % int'(HW)), WLS);
  end

endmodule

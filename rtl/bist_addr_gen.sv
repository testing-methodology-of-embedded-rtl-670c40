// bist_addr_gen: address generator of the BIST, including the
// physical-address mapping that a Y-direction march needs.
//
// A counter walks the N = BANKS*WLS*COLS word addresses once per march element.
//  * X-direction (order = ORD_X): the logical address sequence 0,1,2,...,N-1
//    (column fastest, then word-line, then bank).
//  * Y-direction (order = ORD_Y): word-line fastest, in physical word-line order,
//    so that consecutive operations hit physically adjacent word-lines (the
//    condition for word-line coupling faults). The counter bits are read as
//    {col, bank, physical row} and the physical row is turned into the logical
//    word-line with edram_pkg::wl_swap (physical sequence WL 0,2,1,3,4,6,5,7...).
//  * down = 1 walks the same sequence backwards.
// The thesis asks for the physical word-line sequence in Y-direction; the
// exact mapping for this core is not given and the one used is the thesis'
// example. All sizes must be powers of two.
//
// Timing: `start` clears the counter; each `step` advances it by one. `addr` and
// `last` are combinational from the counter; `last` flags the final address.
module bist_addr_gen
  import edram_pkg::*;
#(
  parameter int unsigned BANKS = 128,
  parameter int unsigned WLS   = 64,
  parameter int unsigned COLS  = 64,
  localparam int unsigned CW    = $clog2(COLS),
  localparam int unsigned WW    = $clog2(WLS),
  localparam int unsigned BW    = $clog2(BANKS),
  localparam int unsigned AW    = CW + WW + BW
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        step,
  input  addr_order_e order,
  input  logic        down,
  output logic [AW-1:0] addr,
  output logic        last
);

  logic [AW-1:0] cnt, idx;
  logic [WW-1:0] prow, lrow;
  logic [BW-1:0] bank;
  logic [CW-1:0] col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (start) cnt <= '0;
    else if (step)  cnt <= cnt + AW'(1);
  end

  assign idx  = down ? ~cnt : cnt;
  assign last = &cnt;

  // Y-direction view of the counter: {col, bank, physical row}.
  assign prow = idx[WW-1:0];
  assign bank = idx[WW +: BW];
  assign col  = idx[WW+BW +: CW];
  assign lrow = WW'(wl_swap(16'(prow)));

  always_comb begin
    if (order == ORD_Y) addr = {bank, lrow, col};
    else                addr = idx;
  end

endmodule

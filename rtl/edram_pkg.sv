// edram_pkg: types, constants and scramble functions shared by the eDRAM
// core, its controller and the built-in self-test (BIST).
//
// Geometry (from the thesis): two symmetric 8Mb arrays, each of 128 banks x 64
// word-lines x 64 half-words x 16 bits. A 32-bit word takes its low half from
// array 0 and its high half from array 1. Word address = {bank, wl, col},
// column (half-word slot on the word-line) in the least significant bits; this
// bit order is a design choice.
//
// Array scrambling (a design choice modelled on the thesis' example):
//  * Word-line order: the physical position of a word-line inside a bank is its
//    logical index with the two least significant bits swapped, giving the
//    physical sequence WL 0,2,1,3,4,6,5,7,... The mapping is its own inverse.
//  * Cell polarity: a cell on a physical row whose index mod 4 is 1 or 2 hangs
//    on the bit-line-bar (folded bit-line, half the cells on each line), and
//    odd bit positions have a bit-line twist half way down the bank that
//    reverses the relation for the rows below it. The physical value of a cell
//    is its logical value XOR scramble_inv().
package edram_pkg;

  // Operation of one March step.
  typedef enum logic [1:0] {
    OP_NONE  = 2'd0,
    OP_READ  = 2'd1,
    OP_WRITE = 2'd2
  } op_kind_e;

  typedef struct packed {
    op_kind_e kind;
    logic     inv;   // 0: background "a", 1: complement "b"
  } march_op_t;

  // Kind of test element.
  typedef enum logic [1:0] {
    EL_MARCH = 2'd0,  // sweep the address space applying 1..3 operations
    EL_SR    = 2'd1,  // self-refresh
    EL_DEL   = 2'd2,  // delay for the retention time
    EL_END   = 2'd3
  } elem_kind_e;

  typedef enum logic {
    ORD_X = 1'b0,     // logical address order
    ORD_Y = 1'b1      // physical word-line order, word-line fastest
  } addr_order_e;

  typedef enum logic {
    BG_SOLID = 1'b0,
    BG_CHK   = 1'b1   // physical checkerboard
  } background_e;

  typedef struct packed {
    elem_kind_e  kind;
    addr_order_e order;
    logic        down;     // 1: descending addresses
    background_e bg;
    logic [1:0]  nops;     // 1..3
    march_op_t   op0;
    march_op_t   op1;
    march_op_t   op2;
    logic        algo;     // 0: March C- part, 1: MATS part
  } march_elem_t;

  localparam int unsigned NUM_ELEMS = 16;

  localparam march_op_t RA = '{kind: OP_READ,  inv: 1'b0};
  localparam march_op_t RB = '{kind: OP_READ,  inv: 1'b1};
  localparam march_op_t WA = '{kind: OP_WRITE, inv: 1'b0};
  localparam march_op_t WB = '{kind: OP_WRITE, inv: 1'b1};
  localparam march_op_t NO = '{kind: OP_NONE,  inv: 1'b0};

  // The proposed test program.
  //   X-direction extended March C-, solid background (11N):
  //     up(wa); up(ra,wb,rb); SR; up(rb,wa); down(ra,wb); down(rb,wa); SR; up(ra)
  //   Y-direction MATS, checkerboard background (4N):
  //     up(wa); SR; del; up(ra,wb); SR; del; down(rb)
  function automatic march_elem_t program_elem(input logic [3:0] idx);
    march_elem_t e;
    e = '{kind: EL_END, order: ORD_X, down: 1'b0, bg: BG_SOLID, nops: 2'd0,
          op0: NO, op1: NO, op2: NO, algo: 1'b0};
    unique case (idx)
      4'd0:  e = '{EL_MARCH, ORD_X, 1'b0, BG_SOLID, 2'd1, WA, NO, NO, 1'b0};
      4'd1:  e = '{EL_MARCH, ORD_X, 1'b0, BG_SOLID, 2'd3, RA, WB, RB, 1'b0};
      4'd2:  e = '{EL_SR,    ORD_X, 1'b0, BG_SOLID, 2'd0, NO, NO, NO, 1'b0};
      4'd3:  e = '{EL_MARCH, ORD_X, 1'b0, BG_SOLID, 2'd2, RB, WA, NO, 1'b0};
      4'd4:  e = '{EL_MARCH, ORD_X, 1'b1, BG_SOLID, 2'd2, RA, WB, NO, 1'b0};
      4'd5:  e = '{EL_MARCH, ORD_X, 1'b1, BG_SOLID, 2'd2, RB, WA, NO, 1'b0};
      4'd6:  e = '{EL_SR,    ORD_X, 1'b0, BG_SOLID, 2'd0, NO, NO, NO, 1'b0};
      4'd7:  e = '{EL_MARCH, ORD_X, 1'b0, BG_SOLID, 2'd1, RA, NO, NO, 1'b0};
      4'd8:  e = '{EL_MARCH, ORD_Y, 1'b0, BG_CHK,   2'd1, WA, NO, NO, 1'b1};
      4'd9:  e = '{EL_SR,    ORD_Y, 1'b0, BG_CHK,   2'd0, NO, NO, NO, 1'b1};
      4'd10: e = '{EL_DEL,   ORD_Y, 1'b0, BG_CHK,   2'd0, NO, NO, NO, 1'b1};
      4'd11: e = '{EL_MARCH, ORD_Y, 1'b0, BG_CHK,   2'd2, RA, WB, NO, 1'b1};
      4'd12: e = '{EL_SR,    ORD_Y, 1'b0, BG_CHK,   2'd0, NO, NO, NO, 1'b1};
      4'd13: e = '{EL_DEL,   ORD_Y, 1'b0, BG_CHK,   2'd0, NO, NO, NO, 1'b1};
      4'd14: e = '{EL_MARCH, ORD_Y, 1'b1, BG_CHK,   2'd1, RB, NO, NO, 1'b1};
      default: ;
    endcase
    return e;
  endfunction

  // Physical <-> logical word-line position inside a bank (an involution).
  function automatic logic [15:0] wl_swap(input logic [15:0] wl);
    return {wl[15:2], wl[0], wl[1]};
  endfunction

  // 1 when the cell at physical row prow (inside its bank, of wls rows) and
  // bit position bitpos of its half-word is stored inverted.
  function automatic logic scramble_inv(input logic [15:0] prow,
                                        input logic [4:0]  bitpos,
                                        input int unsigned wls);
    logic lower_half;
    lower_half = (32'(prow) >= wls / 2);
    return prow[0] ^ prow[1] ^ (bitpos[0] & lower_half);
  endfunction

endpackage

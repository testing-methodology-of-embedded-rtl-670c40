// edram_array: behavioural model of the two 8Mb eDRAM cell arrays with their
// address decoder, word-line drivers and local/global sense amplifiers. It is a
// model of a process-specific macro, not synthesizable logic: the cell charge
// loss it reproduces has no gate-level equivalent.
//
// Organisation (from the thesis): ROWS = BANKS*WLS word-lines, each holding COLS words
// of 2*HW bits; bits [HW-1:0] live in array 0 and [2*HW-1:HW] in array 1, both
// selected by the same decoded word-line.
//
// Behaviour:
//  * Access port: en/we/be/addr/wdata. A read returns rdata one clock after it
//    is sampled. A write updates only the bytes whose be bit is set.
//  * Refresh port: ref_en/ref_row activates a whole word-line through the local
//    sense amplifiers in one cycle, which restores all its cells.
//  * Any activation of a word-line (read, write or refresh) restores its cells.
//    The model remembers the cycle of the last restore of every word-line.
//    A lost weak cell is kept as a flag next to the data array, so that the
//    array itself has a single plain write port.
//  * Charge loss (own choice of fault model): healthy cells never lose data. A
//    weak cell, entered with inject_weak(), loses its charge when its word-line
//    is next activated more than `limit` cycles after the previous restore; it
//    then holds physical 0, whose logical value is given by the array scramble
//    (edram_pkg::scramble_inv). A stuck cell, entered with inject_stuck(),
//    always reads a fixed logical value.
//  * The caller must not use both ports in the same cycle (asserted).
module edram_array
  import edram_pkg::*;
#(
  parameter int unsigned BANKS = 128,
  parameter int unsigned WLS   = 64,
  parameter int unsigned COLS  = 64,
  parameter int unsigned HW    = 16,
  parameter int unsigned NFLT  = 4,
  localparam int unsigned DW    = 2 * HW,
  localparam int unsigned BEW   = DW / 8,
  localparam int unsigned ROWS  = BANKS * WLS,
  localparam int unsigned WORDS = ROWS * COLS,
  localparam int unsigned CW    = $clog2(COLS),
  localparam int unsigned WW    = $clog2(WLS),
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic           clk,
  input  logic           en,
  input  logic           we,
  input  logic [BEW-1:0] be,
  input  logic [AW-1:0]  addr,
  input  logic [DW-1:0]  wdata,
  output logic [DW-1:0]  rdata,
  input  logic           ref_en,
  input  logic [RW-1:0]  ref_row
);

  logic [DW-1:0] mem   [WORDS];
  logic [31:0]   stamp [ROWS];
  logic [31:0]   now;

  // Fault tables, loaded by the tasks below.
  logic          stk_valid [NFLT];
  logic [AW-1:0] stk_addr  [NFLT];
  logic [4:0]    stk_bit   [NFLT];
  logic          stk_val   [NFLT];
  logic          wk_valid  [NFLT];
  logic [AW-1:0] wk_addr   [NFLT];
  logic [4:0]    wk_bit    [NFLT];
  logic [31:0]   wk_limit  [NFLT];
  logic          wk_lost   [NFLT];   // the weak cell has lost its charge

  initial begin
    now = '0;
    for (int r = 0; r < int'(ROWS); r++) stamp[r] = '0;
    for (int k = 0; k < int'(NFLT); k++) begin
      stk_valid[k] = 1'b0; stk_addr[k] = '0; stk_bit[k] = '0; stk_val[k] = 1'b0;
      wk_valid[k]  = 1'b0; wk_addr[k]  = '0; wk_bit[k]  = '0; wk_limit[k] = '0;
      wk_lost[k]   = 1'b0;
    end
  end

  // Fault injection for testbenches. Clear a weak-cell entry (clear_faults)
  // and let a clock pass before loading a new cell into it.
  task automatic inject_stuck(input int k, input logic [AW-1:0] a,
                              input int b, input logic v);
    stk_valid[k] = 1'b1; stk_addr[k] = a; stk_bit[k] = 5'(b); stk_val[k] = v;
  endtask

  task automatic inject_weak(input int k, input logic [AW-1:0] a,
                             input int b, input logic [31:0] limit);
    wk_valid[k] = 1'b1; wk_addr[k] = a; wk_bit[k] = 5'(b); wk_limit[k] = limit;
  endtask

  task automatic clear_faults();
    for (int k = 0; k < int'(NFLT); k++) begin
      stk_valid[k] = 1'b0;
      wk_valid[k]  = 1'b0;
    end
  endtask

  // Logical value a weak cell falls to: its physical 0.
  function automatic logic discharged_value(input logic [AW-1:0] a, input logic [4:0] b);
    logic [15:0] prow;
    prow = wl_swap(16'(a[CW +: WW]));
    return scramble_inv(prow, 5'(32'(b) % HW), WLS);
  endfunction

  // Word-line activated this cycle (refresh or access) and its idle time.
  logic          act;
  logic [RW-1:0] act_row;
  logic [31:0]   idle_time;
  logic          lose    [NFLT];   // weak cell loses its charge now
  logic          dis_val [NFLT];
  logic          cur_val [NFLT];   // current logical value of the weak cell

  assign act       = ref_en || en;
  assign act_row   = ref_en ? ref_row : addr[AW-1:CW];
  assign idle_time = now - stamp[act_row];

  always_comb begin
    for (int k = 0; k < int'(NFLT); k++) begin
      dis_val[k] = discharged_value(wk_addr[k], wk_bit[k]);
      cur_val[k] = wk_lost[k] ? dis_val[k] : mem[wk_addr[k]][wk_bit[k]];
      lose[k]    = wk_valid[k] && act && (wk_addr[k][AW-1:CW] == act_row) &&
                   (idle_time > wk_limit[k]) && (cur_val[k] != dis_val[k]);
    end
  end

  always @(posedge clk) begin
    now <= now + 32'd1;
    if (act) stamp[act_row] <= now;
    if (en && we) begin
      for (int i = 0; i < int'(BEW); i++)
        if (be[i]) mem[addr][i*8 +: 8] <= wdata[i*8 +: 8];
    end
    for (int k = 0; k < int'(NFLT); k++) begin
      if (!wk_valid[k])
        wk_lost[k] <= 1'b0;
      else if (en && we && addr == wk_addr[k] && be[wk_bit[k] / 8])
        wk_lost[k] <= 1'b0;
      else if (lose[k])
        wk_lost[k] <= 1'b1;
    end
  end

  // Read path through the sense amplifiers, with the fault overrides.
  always @(posedge clk) begin
    if (en && !we) begin
      logic [DW-1:0] d;
      d = mem[addr];
      for (int k = 0; k < int'(NFLT); k++)
        if (wk_valid[k] && wk_addr[k] == addr && (wk_lost[k] || lose[k]))
          d[wk_bit[k]] = dis_val[k];
      for (int k = 0; k < int'(NFLT); k++)
        if (stk_valid[k] && stk_addr[k] == addr) d[stk_bit[k]] = stk_val[k];
      rdata <= d;
    end
  end

  property p_one_port;
    @(posedge clk) !(en && ref_en);
  endproperty
  a_one_port: assert property (p_one_port)
    else $error("edram_array: access and refresh in the same cycle");

endmodule

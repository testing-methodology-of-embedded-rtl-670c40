// bist_ctrl: memory BIST controller for the eDRAM core. It runs the thesis'
// proposed eDRAM test approach and checks every read:
//
//   X-direction extended March C-, solid background (11N):
//     up(wa); up(ra,wb,rb); SR; up(rb,wa); down(ra,wb); down(rb,wa); SR; up(ra)
//   Y-direction MATS, checkerboard background (4N), with two retention tests:
//     up(wa); SR; del; up(ra,wb); SR; del; down(rb)
//
// "a" is the background in physical values, "b" its complement; SR is a
// self-refresh command to the core, del waits del_cycles (the retention time of
// the specification, or its equivalent at the test temperature). Auto-refresh
// stays on in the core throughout. The element list is the table
// edram_pkg::program_elem. run_march / run_mats select the two parts;
// march_sr_en = 0 drops the two SR elements of the March C- part, which the
// thesis says serve only diagnosis (telling self-refresh faults from
// retention faults).
//
// How it works: a small state machine fetches one element per cycle from the
// table. In a march element it issues one core operation per cycle while the
// core is ready, looping over the element's 1..3 operations at each address of
// bist_addr_gen before stepping to the next address; bist_data_scramble turns
// the physical background into the logical data word. The expected data of a
// read is held one cycle and compared with the core's rdata when rvalid comes
// back. SR pulses sr_req and waits for the core's self-refresh burst to end.
//
// Results: fail_count counts failing reads (saturating), first_fail_* record the
// first one, fail_elem has one bit per element index with a failing read.
// `done` rises when the program has ended and the last read has been compared
// and stays high until the next `start`.
module bist_ctrl
  import edram_pkg::*;
#(
  parameter int unsigned BANKS = 128,
  parameter int unsigned WLS   = 64,
  parameter int unsigned COLS  = 64,
  parameter int unsigned HW    = 16,
  localparam int unsigned DW    = 2 * HW,
  localparam int unsigned BEW   = DW / 8,
  localparam int unsigned CW    = $clog2(COLS),
  localparam int unsigned WW    = $clog2(WLS),
  localparam int unsigned BW    = $clog2(BANKS),
  localparam int unsigned AW    = CW + WW + BW
) (
  input  logic           clk,
  input  logic           rst_n,
  // test control
  input  logic           start,
  input  logic           run_march,
  input  logic           run_mats,
  input  logic           march_sr_en,
  input  logic [31:0]    del_cycles,
  output logic           busy,
  output logic           done,
  output logic           fail,
  output logic [31:0]    fail_count,
  output logic [AW-1:0]  first_fail_addr,
  output logic [3:0]     first_fail_elem,
  output logic [DW-1:0]  first_fail_syndrome,
  output logic [NUM_ELEMS-1:0] fail_elem,
  output logic [3:0]     cur_elem,
  // eDRAM core port
  output logic           c_req,
  output logic           c_we,
  output logic [BEW-1:0] c_be,
  output logic [AW-1:0]  c_addr,
  output logic [DW-1:0]  c_wdata,
  input  logic           c_ready,
  input  logic           c_rvalid,
  input  logic [DW-1:0]  c_rdata,
  output logic           c_sr_req,
  input  logic           c_sr_active
);

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_FETCH   = 3'd1,
    S_MARCH   = 3'd2,
    S_SR_REQ  = 3'd3,
    S_SR_WAIT = 3'd4,
    S_DEL     = 3'd5,
    S_DRAIN   = 3'd6,
    S_DONE    = 3'd7
  } bist_state_e;

  bist_state_e  state;
  logic [3:0]   elem_idx;
  march_elem_t  elem;
  logic [1:0]   op_idx;
  march_op_t    op;
  logic [31:0]  del_cnt;
  logic         skip;
  logic         last_op;
  logic         accept;

  logic          ag_start, ag_step, ag_last;
  logic [AW-1:0] ag_addr;
  logic [DW-1:0] pat;

  // expected-data pipeline (one read in flight at most per cycle)
  logic          exp_valid;
  logic [DW-1:0] exp_data;
  logic [AW-1:0] exp_addr;
  logic [3:0]    exp_elem;

  assign elem = program_elem(elem_idx);

  always_comb begin
    unique case (op_idx)
      2'd0:    op = elem.op0;
      2'd1:    op = elem.op1;
      default: op = elem.op2;
    endcase
  end

  assign skip = (!elem.algo && !run_march) || (elem.algo && !run_mats) ||
                (elem.kind == EL_SR && !elem.algo && !march_sr_en);
  assign last_op = (op_idx == elem.nops - 2'd1);
  assign accept  = (state == S_MARCH) && c_ready;

  assign ag_start = (state == S_FETCH);
  assign ag_step  = accept && last_op && !ag_last;

  bist_addr_gen #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS)) u_addr (
    .clk, .rst_n,
    .start (ag_start),
    .step  (ag_step),
    .order (elem.order),
    .down  (elem.down),
    .addr  (ag_addr),
    .last  (ag_last)
  );

  bist_data_scramble #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) u_scr (
    .addr (ag_addr),
    .bg   (elem.bg),
    .inv  (op.inv),
    .data (pat)
  );

  assign c_req    = (state == S_MARCH);
  assign c_we     = (op.kind == OP_WRITE);
  assign c_be     = '1;
  assign c_addr   = ag_addr;
  assign c_wdata  = pat;
  assign c_sr_req = (state == S_SR_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      elem_idx <= '0;
      op_idx   <= '0;
      del_cnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state    <= S_FETCH;
            elem_idx <= '0;
          end
        end
        S_FETCH: begin
          op_idx  <= '0;
          del_cnt <= '0;
          if (elem.kind == EL_END)  state <= S_DRAIN;
          else if (skip)            elem_idx <= elem_idx + 4'd1;
          else if (elem.kind == EL_MARCH) state <= S_MARCH;
          else if (elem.kind == EL_SR)    state <= S_SR_REQ;
          else                            state <= S_DEL;
        end
        S_MARCH: begin
          if (c_ready) begin
            if (last_op) begin
              op_idx <= '0;
              if (ag_last) begin
                elem_idx <= elem_idx + 4'd1;
                state    <= S_FETCH;
              end
            end else begin
              op_idx <= op_idx + 2'd1;
            end
          end
        end
        S_SR_REQ: state <= S_SR_WAIT;
        S_SR_WAIT: begin
          if (!c_sr_active) begin
            elem_idx <= elem_idx + 4'd1;
            state    <= S_FETCH;
          end
        end
        S_DEL: begin
          del_cnt <= del_cnt + 32'd1;
          if (del_cnt + 32'd1 >= del_cycles) begin
            elem_idx <= elem_idx + 4'd1;
            state    <= S_FETCH;
          end
        end
        S_DRAIN: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Response comparison.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_valid           <= 1'b0;
      exp_data            <= '0;
      exp_addr            <= '0;
      exp_elem            <= '0;
      fail_count          <= '0;
      first_fail_addr     <= '0;
      first_fail_elem     <= '0;
      first_fail_syndrome <= '0;
      fail_elem           <= '0;
    end else begin
      exp_valid <= accept && (op.kind == OP_READ);
      exp_data  <= pat;
      exp_addr  <= ag_addr;
      exp_elem  <= elem_idx;
      if (start && (state == S_IDLE || state == S_DONE)) begin
        fail_count          <= '0;
        first_fail_addr     <= '0;
        first_fail_elem     <= '0;
        first_fail_syndrome <= '0;
        fail_elem           <= '0;
      end else if (exp_valid && (c_rdata != exp_data)) begin
        if (fail_count == '0) begin
          first_fail_addr     <= exp_addr;
          first_fail_elem     <= exp_elem;
          first_fail_syndrome <= c_rdata ^ exp_data;
        end
        if (fail_count != '1) fail_count <= fail_count + 32'd1;
        fail_elem[exp_elem] <= 1'b1;
      end
    end
  end

  assign busy     = (state != S_IDLE) && (state != S_DONE);
  assign done     = (state == S_DONE);
  assign fail     = (fail_count != '0);
  assign cur_elem = elem_idx;

  // The core must answer every accepted read exactly one cycle later.
  property p_read_latency;
    @(posedge clk) disable iff (!rst_n) exp_valid |-> c_rvalid;
  endproperty
  a_read_latency: assert property (p_read_latency)
    else $error("bist_ctrl: read data not returned one cycle after the request");

endmodule

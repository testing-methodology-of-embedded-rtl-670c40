// edram_ctl: control circuit (CTL) of the eDRAM core. It gives the core an
// SRAM-like interface and hides the DRAM nature of the cells behind it: reads,
// byte-maskable writes, self-refresh and auto-refresh.
//
// How it works (from the thesis): a refresh activates one word-line per cycle through
// the local sense amplifiers, so refreshing the whole core takes BANKS*WLS
// cycles (64 x 128 = 8192 at the default size). Auto-refresh, when enabled,
// refreshes every word-line once per retention period; a self-refresh command
// refreshes every word-line at once and restarts the auto-refresh period
// counter.
//
// Own choices: the retention period is a run-time input (ret_cycles) so that a
// tester can set the equivalent retention time of the test temperature. A
// refresh is done as one burst of BANKS*WLS consecutive cycles, starting exactly
// ret_cycles after the start of the previous refresh; during a burst `ready` is
// low and host accesses wait. A self-refresh command is taken in any state and
// restarts the refresh from row 0. Burst-mode access is not provided.
//
// Timing: a request is accepted in a cycle where req && ready. Read data appears
// on rdata with rvalid exactly one cycle later. Writes complete in the cycle of
// acceptance (a read of the same word in the next cycle sees the new value).
module edram_ctl
#(
  parameter int unsigned BANKS = 128,
  parameter int unsigned WLS   = 64,
  parameter int unsigned COLS  = 64,
  parameter int unsigned HW    = 16,
  localparam int unsigned DW    = 2 * HW,
  localparam int unsigned BEW   = DW / 8,
  localparam int unsigned ROWS  = BANKS * WLS,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned AW    = $clog2(ROWS * COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host port
  input  logic           req,
  input  logic           we,
  input  logic [BEW-1:0] be,
  input  logic [AW-1:0]  addr,
  input  logic [DW-1:0]  wdata,
  output logic           ready,
  output logic           rvalid,
  output logic [DW-1:0]  rdata,
  // refresh control
  input  logic           sr_req,
  input  logic           ar_en,
  input  logic [31:0]    ret_cycles,
  output logic           sr_active,
  output logic           ar_active,
  // cell-array port
  output logic           arr_en,
  output logic           arr_we,
  output logic [BEW-1:0] arr_be,
  output logic [AW-1:0]  arr_addr,
  output logic [DW-1:0]  arr_wdata,
  input  logic [DW-1:0]  arr_rdata,
  output logic           arr_ref_en,
  output logic [RW-1:0]  arr_ref_row
);

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_SR   = 2'd1,
    ST_AR   = 2'd2
  } ctl_state_e;

  ctl_state_e      state;
  logic [RW-1:0]   row;
  logic [31:0]     timer;   // cycles since the start of the last refresh
  logic            ar_due;
  logic            last_row;

  assign ar_due   = ar_en && (timer >= ret_cycles - 32'd1);
  assign last_row = (row == RW'(ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      row   <= '0;
      timer <= '0;
    end else if (sr_req) begin
      state <= ST_SR;
      row   <= '0;
      timer <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (ar_due) begin
            state <= ST_AR;
            row   <= '0;
            timer <= '0;
          end else begin
            timer <= timer + 32'd1;
          end
        end
        ST_SR, ST_AR: begin
          timer <= timer + 32'd1;
          row   <= row + RW'(1);
          if (last_row) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign ready       = (state == ST_IDLE);
  assign sr_active   = (state == ST_SR);
  assign ar_active   = (state == ST_AR);

  assign arr_ref_en  = (state != ST_IDLE);
  assign arr_ref_row = row;
  assign arr_en      = req && ready;
  assign arr_we      = we;
  assign arr_be      = be;
  assign arr_addr    = addr;
  assign arr_wdata   = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= req && ready && !we;
  end
  assign rdata = arr_rdata;

endmodule

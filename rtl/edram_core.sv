// edram_core: the eDRAM core as seen by a system on chip, a "1T-SRAM": DRAM
// cells behind an SRAM interface. It joins the control circuit (edram_ctl),
// which turns host requests and refresh work into cycles on the cell array,
// with the cell arrays (edram_array, a behavioural model).
//
// Interface and timing are those of edram_ctl: a request is taken when
// req && ready, read data follows one cycle later with rvalid, and ready is
// low while a self-refresh or auto-refresh burst of BANKS*WLS cycles runs.
// At 100 MHz the 32-bit port peaks at 32 bits x 100 MHz = 3.2 Gb/s; the thesis
// quotes the same product as 3.125 Gb/s.
module edram_core #(
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
  input  logic           req,
  input  logic           we,
  input  logic [BEW-1:0] be,
  input  logic [AW-1:0]  addr,
  input  logic [DW-1:0]  wdata,
  output logic           ready,
  output logic           rvalid,
  output logic [DW-1:0]  rdata,
  input  logic           sr_req,
  input  logic           ar_en,
  input  logic [31:0]    ret_cycles,
  output logic           sr_active,
  output logic           ar_active
);

  logic           arr_en, arr_we, arr_ref_en;
  logic [BEW-1:0] arr_be;
  logic [AW-1:0]  arr_addr;
  logic [DW-1:0]  arr_wdata, arr_rdata;
  logic [RW-1:0]  arr_ref_row;

  edram_ctl #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) u_ctl (
    .clk, .rst_n, .req, .we, .be, .addr, .wdata, .ready, .rvalid, .rdata,
    .sr_req, .ar_en, .ret_cycles, .sr_active, .ar_active,
    .arr_en, .arr_we, .arr_be, .arr_addr, .arr_wdata, .arr_rdata,
    .arr_ref_en, .arr_ref_row
  );

  edram_array #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) u_array (
    .clk,
    .en      (arr_en),
    .we      (arr_we),
    .be      (arr_be),
    .addr    (arr_addr),
    .wdata   (arr_wdata),
    .rdata   (arr_rdata),
    .ref_en  (arr_ref_en),
    .ref_row (arr_ref_row)
  );

endmodule

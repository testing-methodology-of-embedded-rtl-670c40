// edram_bist_top: a 16Mb embedded-DRAM core with the memory BIST that tests it
// the way the thesis proposes.
//
// The core (edram_core) is DRAM behind an SRAM interface: 2 x 8Mb arrays of 128
// banks x 64 word-lines, 64 words of 32 bits per word-line, with a controller
// doing self-refresh and auto-refresh one word-line per cycle. The BIST
// (bist_ctrl) runs an X-direction extended March C- with a solid background and
// a Y-direction MATS with a physical checkerboard, with self-refresh and
// retention-delay elements, and compares every read.
//
// The retention period, which sets both the BIST delay element and the
// auto-refresh interval, comes from eqv_ret_table: ret_ref_cycles is the
// retention specification at 85 C in clock cycles (16 ms at 50 MHz is 800000),
// temp_sel the test temperature (85 C + 5 C * temp_sel). A hotter test uses the
// equivalent, shorter retention time.
//
// test_mode = 1 hands the core to the BIST; test_mode = 0 gives it to the host
// port (h_*), whose timing is that of edram_core: a request is taken when
// h_req && h_ready, read data follows one cycle later with h_rvalid. The mode
// multiplexer and the port grouping are this design's choices.
module edram_bist_top
  import edram_pkg::*;
#(
  parameter int unsigned BANKS = 128,
  parameter int unsigned WLS   = 64,
  parameter int unsigned COLS  = 64,
  parameter int unsigned HW    = 16,
  localparam int unsigned DW    = 2 * HW,
  localparam int unsigned BEW   = DW / 8,
  localparam int unsigned AW    = $clog2(BANKS * WLS * COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           test_mode,
  // host port (mission mode)
  input  logic           h_req,
  input  logic           h_we,
  input  logic [BEW-1:0] h_be,
  input  logic [AW-1:0]  h_addr,
  input  logic [DW-1:0]  h_wdata,
  output logic           h_ready,
  output logic           h_rvalid,
  output logic [DW-1:0]  h_rdata,
  input  logic           h_sr_req,
  // refresh configuration and status
  input  logic           ar_en,
  input  logic [31:0]    ret_ref_cycles,
  input  logic [2:0]     temp_sel,
  output logic [31:0]    ret_cycles,
  output logic           sr_active,
  output logic           ar_active,
  // BIST
  input  logic           bist_start,
  input  logic           run_march,
  input  logic           run_mats,
  input  logic           march_sr_en,
  output logic           bist_busy,
  output logic           bist_done,
  output logic           bist_fail,
  output logic [31:0]    fail_count,
  output logic [AW-1:0]  first_fail_addr,
  output logic [3:0]     first_fail_elem,
  output logic [DW-1:0]  first_fail_syndrome,
  output logic [NUM_ELEMS-1:0] fail_elem,
  output logic [3:0]     cur_elem
);

  logic           c_req, c_we, c_ready, c_rvalid, c_sr_req;
  logic [BEW-1:0] c_be;
  logic [AW-1:0]  c_addr;
  logic [DW-1:0]  c_wdata, c_rdata;

  logic           b_req, b_we, b_sr_req;
  logic [BEW-1:0] b_be;
  logic [AW-1:0]  b_addr;
  logic [DW-1:0]  b_wdata;

  eqv_ret_table u_eqv (
    .ref_cycles (ret_ref_cycles),
    .temp_sel   (temp_sel),
    .eqv_cycles (ret_cycles)
  );

  bist_ctrl #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) u_bist (
    .clk, .rst_n,
    .start       (bist_start && test_mode),
    .run_march, .run_mats, .march_sr_en,
    .del_cycles  (ret_cycles),
    .busy        (bist_busy),
    .done        (bist_done),
    .fail        (bist_fail),
    .fail_count, .first_fail_addr, .first_fail_elem, .first_fail_syndrome,
    .fail_elem, .cur_elem,
    .c_req       (b_req),
    .c_we        (b_we),
    .c_be        (b_be),
    .c_addr      (b_addr),
    .c_wdata     (b_wdata),
    .c_ready     (c_ready && test_mode),
    .c_rvalid    (c_rvalid),
    .c_rdata     (c_rdata),
    .c_sr_req    (b_sr_req),
    .c_sr_active (sr_active)
  );

  always_comb begin
    if (test_mode) begin
      c_req = b_req; c_we = b_we; c_be = b_be; c_addr = b_addr; c_wdata = b_wdata;
      c_sr_req = b_sr_req;
    end else begin
      c_req = h_req; c_we = h_we; c_be = h_be; c_addr = h_addr; c_wdata = h_wdata;
      c_sr_req = h_sr_req;
    end
  end

  assign h_ready  = c_ready && !test_mode;
  assign h_rvalid = c_rvalid && !test_mode;
  assign h_rdata  = c_rdata;

  edram_core #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) u_core (
    .clk, .rst_n,
    .req        (c_req),
    .we         (c_we),
    .be         (c_be),
    .addr       (c_addr),
    .wdata      (c_wdata),
    .ready      (c_ready),
    .rvalid     (c_rvalid),
    .rdata      (c_rdata),
    .sr_req     (c_sr_req),
    .ar_en,
    .ret_cycles (ret_cycles),
    .sr_active,
    .ar_active
  );

endmodule

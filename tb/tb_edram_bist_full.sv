// tb_edram_bist_full: one complete run of the test program on the full-size
// core (16Mb, 8192 word-lines, N = 524288 words) at the default parameters,
// with the 16 ms retention specification at 50 MHz (800000 cycles) and 85 C.
// One stuck-at cell and one weak cell (charge lost after 700000 cycles) are
// injected. Checks:
//  * both faults are reported; the stuck-at cell is the first failure;
//  * the run takes exactly 16 + 15N + 4*(8192+2) + 2*800000 + 1 cycles plus the
//    cycles stalled behind auto-refresh bursts, each stall being a whole burst
//    of 8192 cycles or part of one;
//  * at 50 MHz the run takes about 193.9 ms (within 3%), the test time the
//    component formulas give for this core: 32 ms of retention delay, 15N
//    read/write cycles, 4 self-refreshes and the auto-refreshes.
module tb_edram_bist_full;
  import edram_pkg::*;
  localparam int BANKS = 128, WLS = 64, COLS = 64, HW = 16;
  localparam int ROWS = BANKS * WLS, N = ROWS * COLS;
  localparam int AW = $clog2(N), DW = 2 * HW;

  logic clk = 1'b0, rst_n = 1'b0, test_mode = 1'b1;
  logic h_req = 1'b0, h_we = 1'b0, h_sr_req = 1'b0;
  logic [3:0] h_be = 4'hf;
  logic [AW-1:0] h_addr = '0;
  logic [DW-1:0] h_wdata = '0, h_rdata;
  logic h_ready, h_rvalid;
  logic ar_en = 1'b1;
  logic [31:0] ret_ref_cycles = 32'd800000, ret_cycles;
  logic [2:0] temp_sel = 3'd0;
  logic sr_active, ar_active;
  logic bist_start = 1'b0, run_march = 1'b1, run_mats = 1'b1, march_sr_en = 1'b1;
  logic bist_busy, bist_done, bist_fail;
  logic [31:0] fail_count;
  logic [AW-1:0] first_fail_addr;
  logic [3:0] first_fail_elem, cur_elem;
  logic [DW-1:0] first_fail_syndrome;
  logic [NUM_ELEMS-1:0] fail_elem;

  int checks = 0, failures = 0;
  longint busy_cycles = 0, stall_cycles = 0, ar_bursts = 0;
  logic prev_ar = 1'b0;

  edram_bist_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && bist_busy) begin
      busy_cycles++;
      if (dut.u_bist.c_req && !dut.c_ready) stall_cycles++;
      if (ar_active && !prev_ar) ar_bursts++;
    end
    prev_ar <= ar_active;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real ms;
    longint base;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    dut.u_core.u_array.inject_stuck(0, AW'(1000), 9, 1'b1);
    dut.u_core.u_array.inject_weak(0, AW'(300000), 20, 32'd700000);
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    while (!bist_done) @(negedge clk);
    base = 16 + 15 * longint'(N) + 4 * (ROWS + 2) + 2 * 800000 + 1;
    ms = real'(busy_cycles) * 20.0e-6;
    $display("run: %0d cycles (%0d stalled, %0d auto-refresh bursts) = %0.2f ms at 50 MHz; failures %0d, elements %h",
             busy_cycles, stall_cycles, ar_bursts, ms, fail_count, fail_elem);
    expect_true("stuck-at cell first", bist_fail && first_fail_addr == AW'(1000) && first_fail_elem == 4'd1);
    expect_true("weak cell found", fail_count > 3 && (fail_elem & 16'h4800) != 0);
    expect_true("cycle count", busy_cycles == base + stall_cycles);
    expect_true("stalls bounded by bursts", stall_cycles <= ar_bursts * ROWS && ar_bursts >= 8);
    expect_true("about 193.9 ms", ms > 193.9 * 0.97 && ms < 193.9 * 1.03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

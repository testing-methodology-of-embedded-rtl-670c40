// tb_bist_ctrl: runs the BIST controller against the eDRAM core on a reduced
// geometry (2 banks x 8 word-lines x 4 words, N = 64, 16 word-lines) and checks:
//  * a fault-free run passes, in exactly 16 + 15N + 4*(ROWS+2) + 2*del + 1 busy
//    cycles when no auto-refresh intervenes (one operation per cycle), with 7N
//    writes and 8N reads;
//  * after the first element every cell holds physical 0 (solid background),
//    and after the first MATS element a physical checkerboard; both are read
//    straight from the cell array and decoded with a polarity computed here;
//  * the Y-direction element visits word-lines in physical order (0,2,1,3,..);
//  * a stuck-at cell is caught in the first read element and reported with its
//    address;
//  * a weak cell (charge lost after 320 cycles) is caught by the MATS retention
//    test when the retention period is 400 cycles and only there, and escapes
//    when the period is 300 cycles;
//  * auto-refresh stalls lengthen the run by exactly the stalled cycles;
//  * march_sr_en = 0 / run_mats = 0 shorten the program as expected.
module tb_bist_ctrl;
  import edram_pkg::*;
  localparam int BANKS = 2, WLS = 8, COLS = 4, HW = 16;
  localparam int ROWS = BANKS * WLS, N = ROWS * COLS;
  localparam int AW = $clog2(N), DW = 2 * HW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, run_march = 1'b1, run_mats = 1'b1, march_sr_en = 1'b1;
  logic [31:0] del_cycles = 32'd50;
  logic busy, done, fail;
  logic [31:0] fail_count;
  logic [AW-1:0] first_fail_addr;
  logic [3:0] first_fail_elem, cur_elem;
  logic [DW-1:0] first_fail_syndrome;
  logic [NUM_ELEMS-1:0] fail_elem;
  logic c_req, c_we, c_ready, c_rvalid, c_sr_req, sr_active, ar_active, ar_en = 1'b0;
  logic [3:0] c_be;
  logic [AW-1:0] c_addr;
  logic [DW-1:0] c_wdata, c_rdata;
  int checks = 0, failures = 0;
  int busy_cycles, stall_cycles, n_wr, n_rd;
  int y_seq [$];
  int dn_seq [$];
  bit checked_chk;

  bist_ctrl #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) dut (
    .clk, .rst_n, .start, .run_march, .run_mats, .march_sr_en, .del_cycles,
    .busy, .done, .fail, .fail_count, .first_fail_addr, .first_fail_elem,
    .first_fail_syndrome, .fail_elem, .cur_elem,
    .c_req, .c_we, .c_be, .c_addr, .c_wdata, .c_ready, .c_rvalid, .c_rdata,
    .c_sr_req, .c_sr_active(sr_active));

  edram_core #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) u_core (
    .clk, .rst_n, .req(c_req), .we(c_we), .be(c_be), .addr(c_addr), .wdata(c_wdata),
    .ready(c_ready), .rvalid(c_rvalid), .rdata(c_rdata), .sr_req(c_sr_req),
    .ar_en, .ret_cycles(del_cycles), .sr_active, .ar_active);

  always #5 clk = ~clk;

  function automatic int prow_of(input int a);
    int wl;
    wl = (a / COLS) % WLS;
    return (wl % 4 == 1) ? wl + 1 : (wl % 4 == 2) ? wl - 1 : wl;
  endfunction

  function automatic int pol(input int a, input int b);
    int prow, p;
    prow = prow_of(a);
    p = ((prow % 4 == 1) || (prow % 4 == 2)) ? 1 : 0;
    if (((b % HW) % 2 == 1) && (prow >= WLS / 2)) p ^= 1;
    return p;
  endfunction

  // physical content of the whole array against a background
  task automatic check_background(input bit chk);
    int bad;
    bad = 0;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < DW; b++) begin
        int phys, expp;
        phys = int'(u_core.u_array.mem[a][b]) ^ pol(a, b);
        expp = chk ? ((prow_of(a) + a % COLS) % 2) : 0;
        if (phys != expp) bad++;
      end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL background chk=%0b: %0d cells", chk, bad); end
  endtask

  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (c_req && !c_ready) stall_cycles++;
    if (c_req && c_ready) begin
      if (c_we) n_wr++; else n_rd++;
      if (cur_elem == 4'd8 && y_seq.size() < 8) y_seq.push_back(int'(c_addr));
      if (cur_elem == 4'd4 && dn_seq.size() < 4) dn_seq.push_back(int'(c_addr));
    end
  end

  always @(negedge clk) begin
    if (busy && run_mats && cur_elem == 4'd9 && !checked_chk) begin
      checked_chk = 1;
      check_background(1'b1);
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run();
    busy_cycles = 0; stall_cycles = 0; n_wr = 0; n_rd = 0;
    y_seq.delete();
    dn_seq.delete();
    checked_chk = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  task automatic expect_eq(input string what, input int got, input int expv);
    checks++;
    if (got != expv) begin
      failures++; $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1. fault-free, no auto-refresh: exact length and operation mix
    run();
    expect_eq("pass", fail_count, 0);
    expect_eq("cycles", busy_cycles, 16 + 15 * N + 4 * (ROWS + 2) + 2 * 50 + 1);
    expect_eq("writes", n_wr, 7 * N);
    expect_eq("reads", n_rd, 8 * N);
    expect_eq("y order 1", y_seq[1], 2 * COLS);
    expect_eq("down order 0", dn_seq[0], N - 1);
    expect_eq("down order 2", dn_seq[2], N - 2);
    expect_eq("y order 2", y_seq[2], 1 * COLS);
    expect_eq("y order 3", y_seq[3], 3 * COLS);
    expect_eq("y order 4", y_seq[4], 4 * COLS);
    // last MATS element read b, nothing written after it: complement checkerboard
    // 2. only the March C- part, without its SR elements: solid background left
    run_mats = 1'b0; march_sr_en = 1'b0;
    run();
    expect_eq("march only cycles", busy_cycles, 16 + 11 * N + 1);
    expect_eq("march only pass", fail_count, 0);
    check_background(1'b0);
    run_mats = 1'b1; march_sr_en = 1'b1;
    // 3. stuck-at-1 cell
    u_core.u_array.inject_stuck(0, AW'(10), 0, 1'b1);
    run();
    checks++;
    if (!fail || first_fail_addr != AW'(10) || first_fail_elem != 4'd1 || !fail_elem[1] ||
        first_fail_syndrome != 32'h1) begin
      failures++;
      $display("FAIL stuck: fail=%0b addr=%0d elem=%0d mask=%h syn=%h", fail, first_fail_addr,
               first_fail_elem, fail_elem, first_fail_syndrome);
    end
    u_core.u_array.clear_faults();
    // 4. weak cell, retention period 400 > 320: caught by the retention test only
    ar_en = 1'b1; del_cycles = 32'd400;
    u_core.u_array.inject_weak(0, AW'(37), 5, 32'd320);
    run();
    checks++;
    if (!fail || (fail_elem & 16'h00ff) != 0 || (fail_elem & 16'h4800) == 0 ||
        first_fail_addr != AW'(37)) begin
      failures++;
      $display("FAIL retention: count=%0d mask=%h addr=%0d", fail_count, fail_elem, first_fail_addr);
    end
    expect_eq("cycles with AR stalls", busy_cycles,
              16 + 15 * N + 4 * (ROWS + 2) + 2 * 400 + 1 + stall_cycles);
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL no AR stall seen"); end
    // 5. same weak cell, period 300 < 320: escapes
    del_cycles = 32'd300;
    run();
    expect_eq("retention escape", fail_count, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_edram_bist_top: end-to-end test of the eDRAM core with its BIST on a
// reduced geometry (2 banks x 8 word-lines x 4 words). It uses the host port in
// mission mode, hands the core to the BIST, runs the full test program
// fault-free and with injected faults, changes the test temperature, and goes
// back to mission mode to read what the BIST left in the array.
//
// Every mechanism of the design is counted and must happen at least once:
// host byte writes, host self-refresh, auto-refresh stalls of the host and of
// the BIST, mode switches, self-refresh and delay elements, Y-direction and
// descending sweeps, stuck-at detection, retention detection, retention escape
// with a too-short delay, and temperature scaling of the retention period.
module tb_edram_bist_top;
  import edram_pkg::*;
  localparam int BANKS = 2, WLS = 8, COLS = 4, HW = 16;
  localparam int ROWS = BANKS * WLS, N = ROWS * COLS;
  localparam int AW = $clog2(N), DW = 2 * HW;

  logic clk = 1'b0, rst_n = 1'b0, test_mode = 1'b0;
  logic h_req = 1'b0, h_we = 1'b0, h_sr_req = 1'b0;
  logic [3:0] h_be = 4'hf;
  logic [AW-1:0] h_addr = '0;
  logic [DW-1:0] h_wdata = '0, h_rdata;
  logic h_ready, h_rvalid;
  logic ar_en = 1'b1;
  logic [31:0] ret_ref_cycles = 32'd400, ret_cycles;
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
  int busy_cycles;
  logic [DW-1:0] model [N];

  // mechanism counters
  int n_byte_write = 0, n_host_sr = 0, n_host_stall = 0, n_mode_switch = 0;
  int n_bist_stall = 0, n_sr_elem = 0, n_del_cycles = 0, n_y_ops = 0, n_down_ops = 0;
  int n_stuck_det = 0, n_ret_det = 0, n_ret_escape = 0, n_temp_scale = 0;

  edram_bist_top #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) dut (.*);

  always #5 clk = ~clk;

  logic prev_sr = 1'b0;
  always @(posedge clk) begin
    if (h_req && !h_ready && !test_mode) n_host_stall++;
    if (bist_busy) begin
      busy_cycles++;
      if (dut.u_bist.c_req && !dut.c_ready) n_bist_stall++;
      if (sr_active && !prev_sr) n_sr_elem++;
      if (dut.u_bist.state == 3'd5) n_del_cycles++;
      if (dut.u_bist.accept && dut.u_bist.elem.order == ORD_Y) n_y_ops++;
      if (dut.u_bist.accept && dut.u_bist.elem.down) n_down_ops++;
    end
    prev_sr <= sr_active;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host(input logic w, input int a, input logic [DW-1:0] d, input logic [3:0] m);
    @(negedge clk);
    h_req = 1'b1; h_we = w; h_addr = AW'(a); h_wdata = d; h_be = m;
    while (!h_ready) @(negedge clk);
    @(negedge clk);
    h_req = 1'b0;
    if (w) begin
      if (m != 4'hf) n_byte_write++;
      for (int i = 0; i < 4; i++) if (m[i]) model[a][i*8 +: 8] = d[i*8 +: 8];
    end else begin
      checks++;
      if (!h_rvalid || h_rdata !== model[a]) begin
        failures++; $display("FAIL host read a=%0d got=%h exp=%h", a, h_rdata, model[a]);
      end
    end
  endtask

  task automatic set_mode(input logic m);
    @(negedge clk);
    if (test_mode != m) n_mode_switch++;
    test_mode = m;
  endtask

  task automatic run_bist();
    busy_cycles = 0;
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    while (!bist_done) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---- mission mode: host traffic with auto-refresh every 400 cycles
    @(negedge clk) h_sr_req = 1'b1;
    @(negedge clk) h_sr_req = 1'b0;
    n_host_sr++;
    for (int a = 0; a < N; a++) host(1'b1, a, DW'($urandom), 4'hf);
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(0, N - 1);
      if (i % 3 == 0) host(1'b1, a, DW'($urandom), 4'($urandom_range(1, 14)));
      else host(1'b0, a, '0, 4'hf);
    end
    // ---- test mode: the host port is shut
    set_mode(1'b1);
    @(negedge clk);
    expect_true("host port closed in test mode", !h_ready);
    // 1. fault-free run at 85 C
    run_bist();
    expect_true("fault-free run passes", !bist_fail && fail_count == 0);
    expect_true("run length", busy_cycles == 16 + 15 * N + 4 * (ROWS + 2) + 2 * 400 + 1 + n_bist_stall);
    expect_true("four SR elements", n_sr_elem == 4);
    expect_true("two delay elements", n_del_cycles == 2 * 400);
    expect_true("Y-direction ops 4N", n_y_ops == 4 * N);
    expect_true("descending ops 5N", n_down_ops == 5 * N);
    // 2. stuck-at-0 cell in the top half of an upper word
    dut.u_core.u_array.inject_stuck(0, AW'(45), 30, 1'b0);
    run_bist();
    if (bist_fail && first_fail_addr == AW'(45)) n_stuck_det++;
    expect_true("stuck-at cell found at its address", bist_fail && first_fail_addr == AW'(45) &&
                first_fail_syndrome == 32'h4000_0000);
    dut.u_core.u_array.clear_faults();
    // 3. weak cell, charge lost after 320 cycles; period 400 at 85 C
    dut.u_core.u_array.inject_weak(0, AW'(22), 7, 32'd320);
    run_bist();
    if (bist_fail && (fail_elem & 16'h00ff) == 0) n_ret_det++;
    expect_true("weak cell caught by the retention test only",
                bist_fail && (fail_elem & 16'h00ff) == 0 && first_fail_addr == AW'(22));
    // 4. at 115 C the period becomes 400 * 6.30 / 16 = 157.5 cycles
    temp_sel = 3'd6;
    @(negedge clk);
    if (ret_cycles == 32'd158) n_temp_scale++;
    expect_true("equivalent retention period at 115 C", ret_cycles == 32'd158);
    n_del_cycles = 0;
    run_bist();
    expect_true("delay elements follow the temperature", n_del_cycles == 2 * 158);
    // the model's weak cell does not speed up with temperature, so it escapes
    if (!bist_fail) n_ret_escape++;
    expect_true("weak cell escapes a shorter delay", !bist_fail);
    dut.u_core.u_array.clear_faults();
    temp_sel = 3'd0;
    // ---- back to mission mode: read what the BIST left (complement checkerboard)
    set_mode(1'b0);
    model[0] = 32'hffff_ffff;   // row 0, col 0: physical 1, no inversion
    model[1] = 32'h0000_0000;   // row 0, col 1: physical 0
    model[4] = 32'h0000_0000;   // logical WL 1 = physical row 2: physical 1, inverted
    model[5] = 32'hffff_ffff;
    host(1'b0, 0, '0, 4'hf);
    host(1'b0, 1, '0, 4'hf);
    host(1'b0, 4, '0, 4'hf);
    host(1'b0, 5, '0, 4'hf);
    // ---- every mechanism happened
    expect_true("host byte write",   n_byte_write > 0);
    expect_true("host self-refresh", n_host_sr > 0);
    expect_true("host AR stall",     n_host_stall > 0);
    expect_true("mode switch",       n_mode_switch >= 2);
    expect_true("BIST AR stall",     n_bist_stall > 0);
    expect_true("SR element",        n_sr_elem > 0);
    expect_true("delay element",     n_del_cycles > 0);
    expect_true("Y-direction sweep", n_y_ops > 0);
    expect_true("descending sweep",  n_down_ops > 0);
    expect_true("stuck-at detect",   n_stuck_det > 0);
    expect_true("retention detect",  n_ret_det > 0);
    expect_true("retention escape",  n_ret_escape > 0);
    expect_true("temperature scale", n_temp_scale > 0);
    $display("mechanisms: byte_wr=%0d host_sr=%0d host_stall=%0d mode=%0d bist_stall=%0d sr=%0d del=%0d y=%0d down=%0d stuck=%0d ret=%0d escape=%0d temp=%0d",
             n_byte_write, n_host_sr, n_host_stall, n_mode_switch, n_bist_stall, n_sr_elem,
             n_del_cycles, n_y_ops, n_down_ops, n_stuck_det, n_ret_det, n_ret_escape, n_temp_scale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_edram_ctl: checks the eDRAM controller on a reduced geometry (16
// word-lines) with a simple memory in the testbench on its array port:
//  * host reads and writes reach the array; read data returns one cycle later;
//  * a self-refresh command refreshes word-lines 0..15 on 16 consecutive cycles
//    with `ready` low, and restarts the auto-refresh period;
//  * auto-refresh bursts start exactly ret_cycles after the previous refresh
//    start, and a host request waiting on a burst is taken right after it;
//  * a self-refresh command during an auto-refresh burst restarts from row 0;
//  * the array never sees an access and a refresh in the same cycle.
module tb_edram_ctl;
  localparam int BANKS = 2, WLS = 8, COLS = 4, HW = 16;
  localparam int ROWS = BANKS * WLS, N = ROWS * COLS;
  localparam int AW = $clog2(N), RW = $clog2(ROWS), DW = 2 * HW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, we = 1'b0, sr_req = 1'b0, ar_en = 1'b0;
  logic [3:0] be = 4'hf;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic ready, rvalid, sr_active, ar_active;
  logic [31:0] ret_cycles = 32'd100;
  logic arr_en, arr_we, arr_ref_en;
  logic [3:0] arr_be;
  logic [AW-1:0] arr_addr;
  logic [DW-1:0] arr_wdata, arr_rdata;
  logic [RW-1:0] arr_ref_row;
  logic [DW-1:0] mem [N];
  int checks = 0, failures = 0;
  int cycle = 0;
  int burst_start [$];
  logic prev_ref = 1'b0;
  logic [RW-1:0] prev_row = '0;

  edram_ctl #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) dut (.*);

  always #5 clk = ~clk;

  // array stand-in: synchronous read, byte-masked write
  always @(posedge clk) begin
    if (arr_en && arr_we) begin
      for (int i = 0; i < 4; i++) if (arr_be[i]) mem[arr_addr][i*8 +: 8] <= arr_wdata[i*8 +: 8];
    end else if (arr_en) begin
      arr_rdata <= mem[arr_addr];
    end
  end

  // protocol monitor
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (arr_en && arr_ref_en) begin
        failures++; $display("FAIL access during refresh at %0d", cycle);
      end
      if (arr_ref_en && arr_ref_row == '0) burst_start.push_back(cycle);
      if (arr_ref_en && prev_ref && arr_ref_row != '0 && arr_ref_row != prev_row + 1'b1) begin
        failures++; $display("FAIL refresh row order %0d after %0d", arr_ref_row, prev_row);
      end
      if (ready == arr_ref_en) begin
        failures++; $display("FAIL ready=%0b while refresh=%0b", ready, arr_ref_en);
      end
      prev_ref <= arr_ref_en;
      prev_row <= arr_ref_row;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host(input logic w, input int a, input logic [DW-1:0] d, output int waited);
    waited = 0;
    @(negedge clk);
    req = 1'b1; we = w; addr = AW'(a); wdata = d;
    while (!ready) begin
      @(negedge clk);
      waited++;
    end
    @(negedge clk);
    req = 1'b0;
    if (!w) begin
      checks++;
      if (!rvalid || rdata !== mem[a]) begin
        failures++; $display("FAIL read a=%0d rvalid=%0b got=%h exp=%h", a, rvalid, rdata, mem[a]);
      end
    end
  endtask

  initial begin
    int w, t0, nb;
    for (int a = 0; a < N; a++) mem[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // plain host traffic, no refresh
    for (int a = 0; a < N; a++) host(1'b1, a, DW'(a * 32'h01010101 + 7), w);
    for (int a = 0; a < N; a++) host(1'b0, a, '0, w);
    checks++;
    if (burst_start.size() != 0) begin failures++; $display("FAIL refresh without command"); end
    // self-refresh
    @(negedge clk); sr_req = 1'b1;
    @(negedge clk); sr_req = 1'b0;
    checks++;
    if (!sr_active) begin failures++; $display("FAIL sr_active"); end
    repeat (ROWS + 2) @(negedge clk);
    checks++;
    if (burst_start.size() != 1 || !ready) begin failures++; $display("FAIL SR burst"); end
    // auto-refresh every 100 cycles from now on
    @(negedge clk); sr_req = 1'b1; ar_en = 1'b1;
    @(negedge clk); sr_req = 1'b0;
    @(negedge clk);
    t0 = burst_start[$];
    repeat (349) @(negedge clk);
    nb = burst_start.size();
    checks++;
    if (nb != 5 || burst_start[2] != t0 + 100 || burst_start[3] != t0 + 200 ||
        burst_start[4] != t0 + 300) begin
      failures++; $display("FAIL AR period: %p (t0=%0d)", burst_start, t0);
    end
    // a host read arriving during an auto-refresh burst waits for its end
    while (!ar_active) @(negedge clk);
    repeat (3) @(negedge clk);
    host(1'b0, 9, '0, w);
    checks++;
    if (w != ROWS - 4) begin failures++; $display("FAIL waited %0d", w); end
    // self-refresh command in the middle of an auto-refresh burst
    while (!ar_active) @(negedge clk);
    repeat (5) @(negedge clk);
    nb = burst_start.size();
    sr_req = 1'b1;
    @(negedge clk); sr_req = 1'b0;
    @(negedge clk);
    checks++;
    if (!sr_active || arr_ref_row != RW'(1) || burst_start.size() != nb + 1) begin
      failures++; $display("FAIL SR over AR");
    end
    t0 = burst_start[$];
    repeat (119) @(negedge clk);
    checks++;
    if (burst_start[$] != t0 + 100) begin failures++; $display("FAIL AR after SR restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

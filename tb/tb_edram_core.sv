// tb_edram_core: checks the eDRAM core (controller plus cell arrays) on a
// reduced geometry (16 word-lines x 4 words): random host reads and writes with
// byte enables against a reference copy, with auto-refresh running every 150
// cycles so that requests stall behind refresh bursts; read latency of one
// cycle; and data retention: a weak cell (charge lost after 120 cycles) keeps
// its data while auto-refresh runs every 100 cycles, and loses it when
// auto-refresh is off and its word-line sits idle for 200 cycles.
module tb_edram_core;
  localparam int BANKS = 2, WLS = 8, COLS = 4, HW = 16;
  localparam int ROWS = BANKS * WLS, N = ROWS * COLS;
  localparam int AW = $clog2(N), DW = 2 * HW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, we = 1'b0, sr_req = 1'b0, ar_en = 1'b0;
  logic [3:0] be = 4'hf;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic ready, rvalid, sr_active, ar_active;
  logic [31:0] ret_cycles = 32'd150;
  logic [DW-1:0] model [N];
  int checks = 0, failures = 0, stalls = 0;

  edram_core #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (req && !ready) stalls++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic w, input int a, input logic [DW-1:0] d, input logic [3:0] m);
    @(negedge clk);
    req = 1'b1; we = w; addr = AW'(a); wdata = d; be = m;
    while (!ready) @(negedge clk);
    @(negedge clk);
    req = 1'b0;
    if (w) begin
      for (int i = 0; i < 4; i++) if (m[i]) model[a][i*8 +: 8] = d[i*8 +: 8];
    end else begin
      checks++;
      if (!rvalid || rdata !== model[a]) begin
        failures++; $display("FAIL read a=%0d got=%h exp=%h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    logic [DW-1:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N; a++) access(1'b1, a, DW'($urandom), 4'hf);
    ar_en = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom_range(0, N - 1);
      if ($urandom_range(0, 1) == 1) access(1'b1, a, DW'($urandom), 4'($urandom));
      else access(1'b0, a, '0, 4'hf);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no refresh stall"); end
    // retention with auto-refresh every 100 cycles: a weak cell survives
    ret_cycles = 32'd100;
    @(negedge clk) sr_req = 1'b1;
    @(negedge clk) sr_req = 1'b0;
    d = model[20];
    dut.u_array.inject_weak(0, AW'(20), 2, 32'd120);
    d[2] = 1'b1; access(1'b1, 20, d, 4'hf);      // store both values across runs
    repeat (400) @(negedge clk);
    access(1'b0, 20, '0, 4'hf);
    d[2] = 1'b0; access(1'b1, 20, d, 4'hf);
    repeat (400) @(negedge clk);
    access(1'b0, 20, '0, 4'hf);
    // auto-refresh off: the word-line idles 200 cycles and the cell discharges
    ar_en = 1'b0;
    // word 20 is on logical word-line 5, physical row 6: polarity 1 for bit 2
    d[2] = 1'b0; access(1'b1, 20, d, 4'hf);      // logical 0 = physical 1
    repeat (200) @(negedge clk);
    model[20][2] = 1'b1;                         // physical 0 = logical 1
    access(1'b0, 20, '0, 4'hf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_edram_workloads: runs the complete test program on the full-size core
// (default parameters) for the retention specifications, clock rates and test
// temperatures whose total test times are tabulated for this core, and checks
// the simulated test time against them (within 3%):
//
//   spec  clock  temp   total test time (ms)
//   16 ms  50    85 C   193.9        32 ms  50    85 C   224.9
//   16 ms 100    85 C   112.5        32 ms 100    85 C   144.3
//   16 ms 200    85 C    72.2        32 ms 200    85 C   104.2
//   16 ms 100   105 C    97.8        32 ms 200    95 C    86.4
//   16 ms 200   115 C    53.1        32 ms 200   105 C    74.1
//                                    32 ms 200   115 C    65.4
//
// The retention specification is given to the design in cycles
// (spec_ms * clock_MHz * 1000); the test temperature selects the equivalent
// retention time. Each run must pass (no faults are injected) and a hotter run
// must be shorter than the 85 C run with the same specification and clock.
module tb_edram_workloads;
  import edram_pkg::*;
  localparam int N = 128 * 64 * 64, AW = $clog2(N), DW = 32;

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
  longint busy_cycles = 0;

  edram_bist_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && bist_busy) busy_cycles++;

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int  spec_ms;
    int  mhz;
    int  tsel;
    real ref_ms;
  } workload_t;

  workload_t wl [11] = '{
    '{16,  50, 0, 193.9}, '{16, 100, 0, 112.5}, '{16, 200, 0, 72.2},
    '{32,  50, 0, 224.9}, '{32, 100, 0, 144.3}, '{32, 200, 0, 104.2},
    '{16, 100, 4,  97.8}, '{16, 200, 6,  53.1},
    '{32, 200, 2,  86.4}, '{32, 200, 4,  74.1}, '{32, 200, 6,  65.4}};

  real at85 [3][2];   // [clock index][spec index] test time at 85 C

  initial begin
    real ms, err;
    int ci, si;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (wl[i]) begin
      ret_ref_cycles = 32'(wl[i].spec_ms * wl[i].mhz * 1000);
      temp_sel = 3'(wl[i].tsel);
      busy_cycles = 0;
      @(negedge clk) bist_start = 1'b1;
      @(negedge clk) bist_start = 1'b0;
      while (!bist_done) @(negedge clk);
      ms = real'(busy_cycles) / (real'(wl[i].mhz) * 1000.0);
      err = (ms - wl[i].ref_ms) / wl[i].ref_ms;
      ci = (wl[i].mhz == 50) ? 0 : (wl[i].mhz == 100) ? 1 : 2;
      si = (wl[i].spec_ms == 16) ? 0 : 1;
      $display("spec %0d ms, %0d MHz, %0d C: %0d cycles = %0.2f ms (table %0.1f ms, %0.1f%%)",
               wl[i].spec_ms, wl[i].mhz, 85 + 5 * wl[i].tsel, busy_cycles, ms, wl[i].ref_ms,
               err * 100.0);
      checks++;
      if (bist_fail) begin failures++; $display("FAIL run %0d reported a failure", i); end
      checks++;
      if (err > 0.03 || err < -0.03) begin failures++; $display("FAIL run %0d test time", i); end
      if (wl[i].tsel == 0) at85[ci][si] = ms;
      else begin
        checks++;
        if (!(ms < at85[ci][si])) begin failures++; $display("FAIL run %0d not shorter", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

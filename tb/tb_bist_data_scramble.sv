// tb_bist_data_scramble: checks the scramble table bit by bit against a
// reference written here with integer arithmetic: physical row = logical
// word-line with bits 0 and 1 swapped; a cell is inverted when (prow mod 4) is
// 1 or 2, and again for odd bit positions in the lower half of the bank;
// checkerboard physical value = (prow + col) mod 2; "b" inverts the background.
// Sweeps every address of a reduced array and every background at the default
// word width.
module tb_bist_data_scramble;
  import edram_pkg::*;
  localparam int BANKS = 4, WLS = 16, COLS = 8, HW = 16;
  localparam int AW = $clog2(BANKS * WLS * COLS);
  logic [AW-1:0]   addr;
  background_e     bg;
  logic            inv;
  logic [2*HW-1:0] data;
  int checks = 0, failures = 0;

  bist_data_scramble #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) dut (.addr, .bg, .inv, .data);

  function automatic int phys_row(input int wl);
    int lo;
    lo = wl % 4;
    if (lo == 1) return wl + 1;
    if (lo == 2) return wl - 1;
    return wl;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col, wl, prow, phys, pol, expb;
    logic [2*HW-1:0] expw;
    for (int a = 0; a < BANKS * WLS * COLS; a++) begin
      for (int m = 0; m < 4; m++) begin
        addr = AW'(a);
        bg   = (m[1]) ? BG_CHK : BG_SOLID;
        inv  = m[0];
        #1;
        col  = a % COLS;
        wl   = (a / COLS) % WLS;
        prow = phys_row(wl);
        for (int b = 0; b < 2 * HW; b++) begin
          phys = (m[1] ? ((prow + col) % 2) : 0) ^ int'(m[0]);
          pol  = ((prow % 4 == 1) || (prow % 4 == 2)) ? 1 : 0;
          if (((b % HW) % 2 == 1) && (prow >= WLS / 2)) pol = pol ^ 1;
          expb = phys ^ pol;
          expw[b] = expb[0];
        end
        checks++;
        if (data !== expw) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d m=%0d got=%h exp=%h", a, m, data, expw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_edram_array: checks the cell-array model on a reduced geometry (2 banks x
// 8 word-lines x 4 words): full write/read-back against a reference copy, the
// one-cycle read latency, byte-enable writes, a stuck-at cell, and the charge
// loss of a weak cell: left unrefreshed longer than its limit it reads back as
// physical 0, while a weak cell whose word-line is refreshed in time keeps its
// value. Cell polarity is recomputed here (rows with index mod 4 of 1 or 2, and
// odd bits in the lower half of a bank, are inverted).
module tb_edram_array;
  localparam int BANKS = 2, WLS = 8, COLS = 4, HW = 16;
  localparam int N = BANKS * WLS * COLS, ROWS = BANKS * WLS;
  localparam int AW = $clog2(N), RW = $clog2(ROWS), DW = 2 * HW;
  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0, ref_en = 1'b0;
  logic [3:0] be = '0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [RW-1:0] ref_row = '0;
  logic [DW-1:0] model [N];
  int checks = 0, failures = 0;

  edram_array #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS), .HW(HW)) dut (
    .clk, .en, .we, .be, .addr, .wdata, .rdata, .ref_en, .ref_row);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pol(input int a, input int b);
    int wl, prow, p;
    wl = (a / COLS) % WLS;
    prow = (wl % 4 == 1) ? wl + 1 : (wl % 4 == 2) ? wl - 1 : wl;
    p = ((prow % 4 == 1) || (prow % 4 == 2)) ? 1 : 0;
    if (((b % HW) % 2 == 1) && (prow >= WLS / 2)) p ^= 1;
    return p;
  endfunction

  task automatic wr(input int a, input logic [DW-1:0] d, input logic [3:0] m);
    @(negedge clk);
    en = 1'b1; we = 1'b1; addr = AW'(a); wdata = d; be = m;
    @(negedge clk);
    en = 1'b0; we = 1'b0;
  endtask

  task automatic rd_check(input int a, input logic [DW-1:0] e);
    @(negedge clk);
    en = 1'b1; we = 1'b0; addr = AW'(a);
    @(negedge clk);
    en = 1'b0;
    // data must be present right after the sampling edge
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL rd a=%0d got=%h exp=%h", a, rdata, e);
    end
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    logic [DW-1:0] d;
    int wa, wb, wbit;
    idle(2);
    for (int a = 0; a < N; a++) begin
      model[a] = $urandom;
      wr(a, model[a], 4'hf);
    end
    for (int a = 0; a < N; a++) rd_check(a, model[a]);
    // byte enables
    for (int i = 0; i < 40; i++) begin
      int a;
      logic [3:0] m;
      a = $urandom_range(0, N - 1);
      m = 4'($urandom);
      d = $urandom;
      for (int b = 0; b < 4; b++) if (m[b]) model[a][b*8 +: 8] = d[b*8 +: 8];
      wr(a, d, m);
      rd_check(a, model[a]);
    end
    // back-to-back write then read of the same word
    @(negedge clk); en = 1'b1; we = 1'b1; addr = 7; wdata = 32'hdead_beef; be = 4'hf;
    @(negedge clk); we = 1'b0;
    @(negedge clk); en = 1'b0;
    model[7] = 32'hdead_beef;
    checks++; if (rdata !== 32'hdead_beef) failures++;
    // stuck-at-1 on bit 3 of word 5
    dut.inject_stuck(0, AW'(5), 3, 1'b1);
    wr(5, 32'h0, 4'hf); model[5] = 32'h8;
    rd_check(5, 32'h8);
    dut.clear_faults();
    model[5] = 32'h0;
    // weak cell left alone: word 13 (row 3), bit 4, limit 50 cycles
    wa = 13; wbit = 4;
    d = model[wa];
    d[wbit] = ~1'(pol(wa, wbit));           // physical 1
    model[wa] = d;
    wr(wa, d, 4'hf);
    dut.inject_weak(0, AW'(wa), wbit, 32'd50);
    // weak cell on row 9 (word 37), bit 17, refreshed every 30 cycles
    wb = 37;
    d = model[wb];
    d[17] = ~1'(pol(wb, 17));
    model[wb] = d;
    wr(wb, d, 4'hf);
    dut.inject_weak(1, AW'(wb), 17, 32'd50);
    for (int i = 0; i < 4; i++) begin
      idle(29);
      @(negedge clk); ref_en = 1'b1; ref_row = 9;
      @(negedge clk); ref_en = 1'b0;
    end
    rd_check(wb, model[wb]);          // kept
    model[wa][wbit] = 1'(pol(wa, wbit));
    rd_check(wa, model[wa]);          // lost: physical 0
    rd_check(wa, model[wa]);          // and stays lost
    // a cell already at physical 0 is not disturbed
    wr(wa, model[wa], 4'hf);
    idle(80);
    rd_check(wa, model[wa]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

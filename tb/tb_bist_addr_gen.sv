// tb_bist_addr_gen: checks the four address sequences of the BIST address
// generator (X up, X down, Y up, Y down) on a reduced array against sequences
// built here: X is 0..N-1; Y visits, for each column and bank, the word-lines
// in physical order 0,2,1,3,4,6,5,7,... Also checks that `last` is set on the
// N-th address only and that `start` restarts the sweep.
module tb_bist_addr_gen;
  import edram_pkg::*;
  localparam int BANKS = 4, WLS = 8, COLS = 4;
  localparam int N  = BANKS * WLS * COLS;
  localparam int AW = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, step = 1'b0, down = 1'b0, last;
  addr_order_e order = ORD_X;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  int expseq [N];
  int phys2log [8] = '{0, 2, 1, 3, 4, 6, 5, 7};

  bist_addr_gen #(.BANKS(BANKS), .WLS(WLS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .step, .order, .down, .addr, .last);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(input addr_order_e o, input logic d);
    int k;
    k = 0;
    if (o == ORD_X) begin
      for (int a = 0; a < N; a++) expseq[k++] = a;
    end else begin
      for (int c = 0; c < COLS; c++)
        for (int b = 0; b < BANKS; b++)
          for (int p = 0; p < WLS; p++)
            expseq[k++] = (b * WLS + phys2log[p]) * COLS + c;
    end
    order = o; down = d;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < N; i++) begin
      int e;
      e = d ? expseq[N - 1 - i] : expseq[i];
      checks++;
      if (int'(addr) != e || last != (i == N - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL o=%0d d=%0d i=%0d addr=%0d exp=%0d last=%0b", o, d, i, addr, e, last);
      end
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      // an idle cycle now and then must not move the counter
      if (i % 7 == 3) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sweep(ORD_X, 1'b0);
    sweep(ORD_X, 1'b1);
    sweep(ORD_Y, 1'b0);
    sweep(ORD_Y, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

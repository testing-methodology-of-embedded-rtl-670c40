// tb_eqv_ret_table: checks the equivalent-retention-time table against the
// thesis' figures for a 16 ms specification at 85 C, at 50, 100 and 200 MHz,
// and for a 32 ms specification, plus random specification lengths. The
// expected values are recomputed here in real arithmetic from the millisecond
// values: T_eqv = T_ref * ms(temp) / 16.
module tb_eqv_ret_table;
  logic [31:0] ref_cycles, eqv_cycles;
  logic [2:0]  temp_sel;
  int checks = 0, failures = 0;

  eqv_ret_table dut (.ref_cycles, .temp_sel, .eqv_cycles);

  real ms_tab [8] = '{16.0, 13.57, 11.55, 9.87, 8.47, 7.29, 6.30, 5.47};

  task automatic check(input logic [31:0] r, input int t);
    real expv, diff;
    ref_cycles = r; temp_sel = 3'(t);
    #1;
    expv = real'(r) * ms_tab[t] / 16.0;
    diff = real'(eqv_cycles) - expv;
    if (diff < 0) diff = -diff;
    checks++;
    if (diff > real'(r) / 65536.0 + 1.0) begin
      failures++;
      $display("FAIL ref=%0d temp=%0d got=%0d exp=%f", r, t, eqv_cycles, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 16 ms at 50/100/200 MHz, 32 ms at 50 MHz
    for (int t = 0; t < 8; t++) begin
      check(32'd800000, t);
      check(32'd1600000, t);
      check(32'd3200000, t);
      check(32'd1600000 * 2, t);
    end
    // spot values from the thesis' tables at 50 MHz (16 ms spec)
    ref_cycles = 32'd800000; temp_sel = 3'd4; #1;  // 105 C -> 8.47 ms = 423500
    checks++; if (eqv_cycles < 32'd423490 || eqv_cycles > 32'd423510) failures++;
    temp_sel = 3'd2; #1;                             // 95 C -> 11.55 ms = 577500
    checks++; if (eqv_cycles < 32'd577490 || eqv_cycles > 32'd577510) failures++;
    temp_sel = 3'd0; #1;                             // 85 C -> unchanged
    checks++; if (eqv_cycles != 32'd800000) failures++;
    for (int i = 0; i < 200; i++) check($urandom_range(1, 32'h0fff_ffff), $urandom_range(0, 7));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

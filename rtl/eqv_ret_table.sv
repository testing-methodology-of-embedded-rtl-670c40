// eqv_ret_table: equivalent retention time for a raised test temperature.
//
// A cell's data-retention time shrinks as temperature rises because the
// sub-threshold leakage of its switch transistor grows. Testing at a higher
// temperature with a proportionally shorter delay element catches the same
// retention faults in less time. The equivalent time scales linearly with the
// specification: T_eqv = T_ref * I_leak(85 C) / I_leak(T). The thesis computes
// the ratio for a 16 ms specification at 85 C:
//
//   temp_sel   0     1      2      3     4     5     6     7
//   temp (C)   85    90     95     100   105   110   115   120
//   T_eqv (ms) 16    13.57  11.55  9.87  8.47  7.29  6.30  5.47
//
// This block holds those ratios as 16-bit fractions, round(T_eqv/16 * 65536),
// and returns eqv_cycles = round(ref_cycles * ratio / 65536), the retention
// period in clock cycles to program into the delay element and the
// auto-refresh counter. Storing the ratios rather than cycle counts is this
// design's choice; it serves any clock rate and any 85 C specification.
// Combinational; the error is below ref_cycles / 65536 + 1 cycles.
module eqv_ret_table (
  input  logic [31:0] ref_cycles,   // specified retention time at 85 C, in cycles
  input  logic [2:0]  temp_sel,     // test temperature, 85 C + 5 C * temp_sel
  output logic [31:0] eqv_cycles
);

  logic [16:0] ratio;     // Q0.16, 65536 = 1.0
  logic [48:0] product;

  always_comb begin
    unique case (temp_sel)
      3'd0: ratio = 17'd65536;   // 16.00 ms
      3'd1: ratio = 17'd55583;   // 13.57 ms
      3'd2: ratio = 17'd47309;   // 11.55 ms
      3'd3: ratio = 17'd40428;   //  9.87 ms
      3'd4: ratio = 17'd34693;   //  8.47 ms
      3'd5: ratio = 17'd29860;   //  7.29 ms
      3'd6: ratio = 17'd25805;   //  6.30 ms
      default: ratio = 17'd22405; // 5.47 ms
    endcase
  end

  assign product    = 49'(ref_cycles) * 49'(ratio) + 49'd32768;
  assign eqv_cycles = product[47:16];

endmodule

// pot_decoder: power-of-two (PoT4) code to sign and unsigned 8-bit magnitude.
//
// A PoT4 operand is a 4-bit sign-magnitude code: bit 3 is the sign and bits
// [2:0] an exponent code e. Code e = 0 is the value zero; e = 1..7 stands for
// 2^(e-1), so the magnitudes are 0, 1, 2, 4, ..., 64. The magnitude is formed by
// shifting a one left, which is the "<<" of the PoT decoder; it always fits the
// 8-bit unsigned multiplier input of a PE.
// That the decoder yields a sign and an unsigned INT8 value by a shift follows
// the design description; the exact code-to-exponent mapping is this design's
// choice. Purely combinational.
module pot_decoder (
  input  logic [3:0] code,   // PoT4 code {sign, e[2:0]}
  output logic       sign,   // 1 = negative
  output logic [7:0] mag     // unsigned magnitude
);

  always_comb begin
    sign = code[3];
    if (code[2:0] == 3'd0) mag = 8'd0;
    else                   mag = 8'd1 << (code[2:0] - 3'd1);
  end

endmodule

// mp_pe: mixed-precision processing element.
//
// The PE shares one datapath between 8-bit and 4-bit operation. The 8-bit
// unsigned activation magnitude a is multiplied by both nibbles of the 8-bit
// unsigned weight operand w in two 8x4 unsigned multipliers (12-bit results).
//   8x8 modes (d-mode 0, 3): w is one magnitude. The high product is shifted
//     left by 4 and added to the low one, giving the 16-bit product |a*w|.
//     That value, zero-extended to 32 bits, is bitwise inverted when the
//     product is negative, and added to the 32-bit accumulator with the sign
//     bit as carry-in, i.e. acc += -|a*w| = ~|a*w| + 1. The lower 16-bit adder
//     gets "carry low" and passes its carry-out to the upper adder.
//   4-bit modes (d-mode 1, 2): w holds two packed INT4 magnitudes of two
//     different weights. Each 12-bit product is zero-extended to 16 bits,
//     inverted on its own sign, the two are concatenated, and the upper and
//     lower 16-bit accumulator halves are updated independently, each with its
//     own sign as carry-in ("carry high", "carry low"). The PE thus produces
//     two 16-bit signed dot products at once.
// Signs of the products are the XOR of the activation sign and the weight
// sign(s) delivered by the edge decoders.
//
// Timing: one multiply-accumulate per cycle. acc updates on the clock edge
// after the operands are presented; clear zeroes it (it wins over the update).
// The operands are registered and passed on (a_out to the PE below, w_out to
// the PE on the right), one cycle later, forming a systolic array.
// The datapath (two unsigned multipliers, <<4 and add, bitwise NOT, mux,
// split 16/16 adders with carry high/low, 32-bit output register) follows the
// design description and figure. The carry chaining between the halves in the
// 8x8 modes, the wrap-around of the 16-bit halves and reset are this design's
// choices.
module mp_pe
  import mpa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,     // zero the accumulator
  input  logic        mode8,     // 1: one 8x8 product, 0: two 8x4 products
  input  dec_op_t     a_in,      // decoded activation (sign_hi == sign_lo)
  input  dec_op_t     w_in,      // decoded weight (packed pair in 4-bit modes)
  output dec_op_t     a_out,     // registered activation to the next row
  output dec_op_t     w_out,     // registered weight to the next column
  output logic [31:0] acc        // {upper 16, lower 16} or one 32-bit sum
);

  logic [11:0] p_hi, p_lo;       // a * w[7:4], a * w[3:0]
  logic [15:0] p8;               // (p_hi << 4) + p_lo
  logic        s_hi, s_lo;       // product signs = carry high / carry low
  logic [31:0] inv8, inv4, addend;
  logic [16:0] sum_lo;
  logic [15:0] sum_hi;
  logic        c_hi;

  always_comb begin
    p_hi = 12'(a_in.mag * w_in.mag[7:4]);
    p_lo = 12'(a_in.mag * w_in.mag[3:0]);
    p8   = {p_hi, 4'b0} + {4'b0, p_lo};

    s_hi = a_in.sign_hi ^ w_in.sign_hi;
    s_lo = a_in.sign_lo ^ w_in.sign_lo;

    // bitwise NOT stage on both candidate addends, then the mode mux
    inv8   = s_lo ? ~{16'd0, p8} : {16'd0, p8};
    inv4   = {(s_hi ? ~{4'd0, p_hi} : {4'd0, p_hi}),
              (s_lo ? ~{4'd0, p_lo} : {4'd0, p_lo})};
    addend = mode8 ? inv8 : inv4;

    sum_lo = {1'b0, acc[15:0]} + {1'b0, addend[15:0]} + 17'(s_lo);
    c_hi   = mode8 ? sum_lo[16] : s_hi;
    sum_hi = acc[31:16] + addend[31:16] + 16'(c_hi);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      a_out <= DEC_ZERO;
      w_out <= DEC_ZERO;
    end else begin
      a_out <= a_in;
      w_out <= w_in;
      if (clear) acc <= '0;
      else       acc <= {sum_hi, sum_lo[15:0]};
    end
  end

  // In the 8x8 modes a weight is a single value with a single sign.
  a_single_sign_8x8 : assert property (@(posedge clk) disable iff (!rst_n)
    mode8 |-> (w_in.sign_hi == w_in.sign_lo));
  a_single_sign_act : assert property (@(posedge clk) disable iff (!rst_n)
    a_in.sign_hi == a_in.sign_lo);

endmodule

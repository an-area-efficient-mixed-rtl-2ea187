// operand_decoder: one edge decoder of the PE array.
//
// It consists of a PoT decoder and a sign decoder, both fed with the same raw
// 8-bit buffer word; the sign decoder picks, by d-mode, between its own
// two's-complement-to-sign-magnitude result and the PoT decoder's output.
// The array has one decoder per PE row on the weight side (IS_WEIGHT = 1) and
// one per PE column on the activation side (IS_WEIGHT = 0). A zero word decodes
// to magnitude zero with positive signs in every d-mode, which is how idle
// cycles feed the array. Purely combinational; the composition follows the
// design description.
module operand_decoder
  import mpa_pkg::*;
#(
  parameter bit IS_WEIGHT = 1'b0
) (
  input  dmode_e     dmode,
  input  logic [7:0] data,
  output dec_op_t    op
);

  logic       pot_sign;
  logic [7:0] pot_mag;
  logic [7:0] out;
  logic       s_hi, s_lo;

  pot_decoder u_pot (
    .code (data[3:0]),
    .sign (pot_sign),
    .mag  (pot_mag)
  );

  sign_decoder #(.IS_WEIGHT(IS_WEIGHT)) u_sign (
    .dmode    (dmode),
    .data     (data),
    .pot_sign (pot_sign),
    .pot_mag  (pot_mag),
    .out      (out),
    .sign_hi  (s_hi),
    .sign_lo  (s_lo)
  );

  assign op = '{mag: out, sign_hi: s_hi, sign_lo: s_lo};

endmodule

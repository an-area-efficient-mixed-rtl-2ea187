// sign_decoder: turns a buffer word into an unsigned 8-bit operand plus the
// high and low sign bits the PE needs, according to the d-mode.
//
// Two's-complement integers are converted to sign and magnitude:
//   INT8         -> out = |x| (0..128), sign_hi = sign_lo = sign of x
//   INT4 (single)-> out = |x[3:0]| zero-extended (0..8)
//   packed INT4  -> out = {|x[7:4]|, |x[3:0]|}, sign_hi / sign_lo per nibble
//   PoT4         -> out and sign taken from the PoT decoder
// Which of these applies depends on the d-mode and on the side the decoder
// serves (IS_WEIGHT): only weights are packed (d-modes 1 and 2), and the PoT4
// operand of d-mode 2 is the activation. The roles of the two sign outputs and
// of packing follow the design description; the magnitude arithmetic is the
// plain one. Purely combinational.
module sign_decoder
  import mpa_pkg::*;
#(
  parameter bit IS_WEIGHT = 1'b0   // 1: row (weight) decoder, 0: column (activation) decoder
) (
  input  dmode_e     dmode,
  input  logic [7:0] data,       // raw buffer word
  input  logic       pot_sign,   // from the PoT decoder
  input  logic [7:0] pot_mag,    // from the PoT decoder
  output logic [7:0] out,        // unsigned operand for the multipliers
  output logic       sign_hi,
  output logic       sign_lo
);

  logic [7:0] abs8;
  logic [3:0] abs_hi4, abs_lo4;

  always_comb begin
    abs8    = data[7]    ? 8'(-data)      : data;
    abs_hi4 = data[7]    ? 4'(-data[7:4]) : data[7:4];
    abs_lo4 = data[3]    ? 4'(-data[3:0]) : data[3:0];

    out     = abs8;
    sign_hi = data[7];
    sign_lo = data[7];
    unique case (dmode)
      DMODE_INT8: begin
        out     = abs8;
        sign_hi = data[7];
        sign_lo = data[7];
      end
      DMODE_INT4, DMODE_POT4_INT4: begin
        if (IS_WEIGHT) begin
          out     = {abs_hi4, abs_lo4};
          sign_hi = data[7];
          sign_lo = data[3];
        end else if (dmode == DMODE_INT4) begin
          out     = {4'd0, abs_lo4};
          sign_hi = data[3];
          sign_lo = data[3];
        end else begin
          out     = pot_mag;
          sign_hi = pot_sign;
          sign_lo = pot_sign;
        end
      end
      DMODE_POT4: begin
        out     = pot_mag;
        sign_hi = pot_sign;
        sign_lo = pot_sign;
      end
      default: ;
    endcase
  end

endmodule

// mpa_pkg: types and helpers shared by the mixed-precision ViT accelerator.
//
// The accelerator runs one of four decode modes (d-modes), which tell every
// edge decoder how to read the 8-bit words held in the activation and weight
// buffers and tell every PE whether it performs one 8x8 product or two 8x4
// products per cycle:
//   d-mode 0  INT8 activation  x INT8 weight          (one 8x8 product)
//   d-mode 1  INT4 activation  x packed 2 x INT4 weight (two 8x4 products)
//   d-mode 2  PoT4 activation  x packed 2 x INT4 weight (two 8x4 products)
//   d-mode 3  PoT4 activation  x PoT4 weight           (one 8x8 product)
// The four modes and their meaning follow the design description; the 2-bit
// binary encoding, the sign-magnitude PoT4 code and the placement of a single
// 4-bit value in bits [3:0] of a buffer word are this design's choices.
package mpa_pkg;

  typedef enum logic [1:0] {
    DMODE_INT8      = 2'd0,
    DMODE_INT4      = 2'd1,
    DMODE_POT4_INT4 = 2'd2,
    DMODE_POT4      = 2'd3
  } dmode_e;

  // Decoded operand in sign-magnitude form, as it travels from an edge
  // decoder into the PE array. For a packed INT4 weight pair mag[7:4] is the
  // magnitude of the high weight and mag[3:0] that of the low weight, with
  // their own signs; for every other operand sign_hi equals sign_lo.
  typedef struct packed {
    logic [7:0] mag;
    logic       sign_hi;
    logic       sign_lo;
  } dec_op_t;

  localparam dec_op_t DEC_ZERO = '{mag: 8'd0, sign_hi: 1'b0, sign_lo: 1'b0};

  // True in the modes where each PE performs one 8-bit x 8-bit product.
  function automatic logic is_8x8(dmode_e m);
    return (m == DMODE_INT8) || (m == DMODE_POT4);
  endfunction

endpackage

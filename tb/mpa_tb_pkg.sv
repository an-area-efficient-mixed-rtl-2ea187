// mpa_tb_pkg: reference arithmetic for the accelerator testbenches.
//
// Gives the signed integer value that a raw 8-bit buffer word stands for in
// each d-mode, computed directly from the number formats (two's-complement
// INT8/INT4, sign-magnitude PoT4 with code e -> 2^(e-1), e = 0 -> 0), without
// using any of the design's decoders.
package mpa_tb_pkg;

  function automatic int int4_val(logic [3:0] n);
    return int'($signed(n));
  endfunction

  function automatic int int8_val(logic [7:0] n);
    return int'($signed(n));
  endfunction

  function automatic int pot4_val(logic [3:0] n);
    int m;
    m = (n[2:0] == 3'd0) ? 0 : (1 << (int'(n[2:0]) - 1));
    return n[3] ? -m : m;
  endfunction

  // activation value: d-mode 0 INT8, 1 INT4, 2 and 3 PoT4
  function automatic int act_val(int mode, logic [7:0] w);
    case (mode)
      0:       return int8_val(w);
      1:       return int4_val(w[3:0]);
      default: return pot4_val(w[3:0]);
    endcase
  endfunction

  // weight value for the high (hi=1) or low (hi=0) lane. In the 8x8 modes
  // (0 and 3) there is one weight, returned for hi=0; hi=1 returns 0.
  function automatic int wgt_val(int mode, logic [7:0] w, bit hi);
    case (mode)
      0:       return hi ? 0 : int8_val(w);
      3:       return hi ? 0 : pot4_val(w[3:0]);
      default: return hi ? int4_val(w[7:4]) : int4_val(w[3:0]);
    endcase
  endfunction

  function automatic bit mode_is_8x8(int mode);
    return (mode == 0) || (mode == 3);
  endfunction

endpackage

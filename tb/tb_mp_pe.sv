// tb_mp_pe: random multiply-accumulate sequences through one PE in both
// precisions, against a reference model built from signed integers.
// 8x8 mode:  acc (32-bit) += (+/-) a*w
// 4-bit mode: acc[31:16] += (+/-) a*w[7:4], acc[15:0] += (+/-) a*w[3:0],
//             each half wrapping modulo 2^16 on its own.
// It also checks the one-cycle operand pass-through, clear, the single-cycle
// MAC rate, and counts the sign carries and the lower-to-upper carry.
module tb_mp_pe;
  import mpa_pkg::*;

  logic        clk = 0, rst_n = 0, clear = 0, mode8 = 0;
  dec_op_t     a_in, w_in, a_out, w_out;
  logic [31:0] acc;
  int checks = 0, failures = 0;
  int n_neg_hi = 0, n_neg_lo = 0, n_chain = 0;

  mp_pe dut (.clk(clk), .rst_n(rst_n), .clear(clear), .mode8(mode8),
             .a_in(a_in), .w_in(w_in), .a_out(a_out), .w_out(w_out), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t acc=%h", what, $time, acc);
    end
  endtask

  initial begin
    logic [31:0] ref32;
    logic [15:0] ref_hi, ref_lo;
    dec_op_t     pa, pw;
    a_in = DEC_ZERO;
    w_in = DEC_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(acc == 0, "reset");

    for (int run = 0; run < 40; run++) begin
      mode8 = run[0];
      // clear the accumulator
      clear = 1;
      a_in  = '{mag: 8'($urandom), sign_hi: 1'b1, sign_lo: 1'b1};
      w_in  = '{mag: 8'($urandom), sign_hi: 1'b0, sign_lo: 1'b0};
      @(negedge clk);
      clear = 0;
      check(acc == 0, "clear");
      ref32 = 0; ref_hi = 0; ref_lo = 0;
      for (int k = 0; k < 60; k++) begin
        logic sa, swh, swl;
        int   prod, ph, pl;
        sa  = 1'($urandom);
        swh = 1'($urandom);
        swl = mode8 ? swh : 1'($urandom);
        a_in = '{mag: 8'($urandom), sign_hi: sa, sign_lo: sa};
        w_in = '{mag: 8'($urandom), sign_hi: swh, sign_lo: swl};
        if (mode8) begin
          prod  = int'(a_in.mag) * int'(w_in.mag);
          if (sa ^ swl) prod = -prod;
          if (((32'(ref32[15:0]) + 32'(prod[15:0])) >> 16) != 0 || prod < 0) n_chain++;
          ref32 = ref32 + 32'(prod);
        end else begin
          ph = int'(a_in.mag) * int'(w_in.mag[7:4]);
          pl = int'(a_in.mag) * int'(w_in.mag[3:0]);
          if (sa ^ swh) begin ph = -ph; n_neg_hi++; end
          if (sa ^ swl) begin pl = -pl; n_neg_lo++; end
          ref_hi = ref_hi + 16'(ph);
          ref_lo = ref_lo + 16'(pl);
        end
        pa = a_in;
        pw = w_in;
        @(negedge clk);
        // one MAC per cycle: the result is visible right after one edge
        if (mode8) check(acc == ref32, "acc 8x8");
        else       check(acc == {ref_hi, ref_lo}, "acc 2x 8x4");
        check(a_out == pa && w_out == pw, "pass-through");
      end
    end
    $display("negative high lanes=%0d low lanes=%0d 8x8 carries into upper half=%0d",
             n_neg_hi, n_neg_lo, n_chain);
    check(n_neg_hi > 0 && n_neg_lo > 0 && n_chain > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_operand_decoder: exhaustive check of both edge-decoder flavours over all
// d-modes and 8-bit words: the decoded sign-magnitude operands must equal the
// reference signed values of the activation and of the weight(s).
module tb_operand_decoder;
  import mpa_pkg::*;
  import mpa_tb_pkg::*;

  dmode_e     dmode;
  logic [7:0] data;
  dec_op_t    op_w, op_a;
  int checks = 0, failures = 0;

  operand_decoder #(.IS_WEIGHT(1'b1)) dut_w (.dmode(dmode), .data(data), .op(op_w));
  operand_decoder #(.IS_WEIGHT(1'b0)) dut_a (.dmode(dmode), .data(data), .op(op_a));

  function automatic int sm(logic s, int m);
    return s ? -m : m;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      for (int d = 0; d < 256; d++) begin
        bit ok;
        dmode = dmode_e'(m);
        data  = 8'(d);
        #1;
        checks++;
        ok = (sm(op_a.sign_lo, int'(op_a.mag)) == act_val(m, data)) &&
             (op_a.sign_hi == op_a.sign_lo);
        if (!ok) begin
          failures++;
          $display("FAIL act mode=%0d data=%h op=%p", m, data, op_a);
        end
        checks++;
        if (mode_is_8x8(m))
          ok = (sm(op_w.sign_lo, int'(op_w.mag)) == wgt_val(m, data, 0)) &&
               (op_w.sign_hi == op_w.sign_lo);
        else
          ok = (sm(op_w.sign_hi, int'(op_w.mag[7:4])) == wgt_val(m, data, 1)) &&
               (sm(op_w.sign_lo, int'(op_w.mag[3:0])) == wgt_val(m, data, 0));
        if (!ok) begin
          failures++;
          $display("FAIL wgt mode=%0d data=%h op=%p", m, data, op_w);
        end
      end
    end
    // the idle word decodes to zero in every mode
    for (int m = 0; m < 4; m++) begin
      dmode = dmode_e'(m);
      data  = 8'd0;
      #1;
      checks++;
      if (op_a != DEC_ZERO || op_w != DEC_ZERO) begin
        failures++;
        $display("FAIL zero word mode=%0d", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

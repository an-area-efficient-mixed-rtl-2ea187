// tb_sign_decoder: exhaustive check of the sign decoder, weight-side and
// activation-side instances, over all d-modes and 8-bit words, with random
// values on the PoT decoder inputs.
module tb_sign_decoder;
  import mpa_pkg::*;
  import mpa_tb_pkg::*;

  dmode_e     dmode;
  logic [7:0] data, pot_mag;
  logic       pot_sign;
  logic [7:0] out_w, out_a;
  logic       shi_w, slo_w, shi_a, slo_a;
  int checks = 0, failures = 0;

  sign_decoder #(.IS_WEIGHT(1'b1)) dut_w (.dmode(dmode), .data(data),
    .pot_sign(pot_sign), .pot_mag(pot_mag), .out(out_w), .sign_hi(shi_w), .sign_lo(slo_w));
  sign_decoder #(.IS_WEIGHT(1'b0)) dut_a (.dmode(dmode), .data(data),
    .pot_sign(pot_sign), .pot_mag(pot_mag), .out(out_a), .sign_hi(shi_a), .sign_lo(slo_a));

  function automatic int sm(logic s, int m);
    return s ? -m : m;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s mode=%0d data=%h out_w=%h shi=%b slo=%b out_a=%h", what,
                 dmode, data, out_w, shi_w, slo_w, out_a);
    end
  endtask

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
        dmode    = dmode_e'(m);
        data     = 8'(d);
        pot_sign = 1'($urandom);
        pot_mag  = 8'($urandom);
        #1;
        // weight side
        if (m == 3) begin
          check(out_w == pot_mag && shi_w == pot_sign && slo_w == pot_sign, "w pot");
        end else if (m == 0) begin
          check(sm(shi_w, int'(out_w)) == int8_val(data) && shi_w == slo_w, "w int8");
        end else begin
          check(sm(shi_w, int'(out_w[7:4])) == int4_val(data[7:4]) &&
                sm(slo_w, int'(out_w[3:0])) == int4_val(data[3:0]), "w packed");
        end
        // activation side
        if (m >= 2) begin
          check(out_a == pot_mag && shi_a == pot_sign && slo_a == pot_sign, "a pot");
        end else begin
          check(sm(shi_a, int'(out_a)) == act_val(m, data) && shi_a == slo_a, "a int");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

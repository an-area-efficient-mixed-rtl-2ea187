// tb_pot_decoder: exhaustive check of the PoT4 decoder over all 16 codes
// against the reference PoT4 value.
module tb_pot_decoder;
  import mpa_tb_pkg::*;

  logic [3:0] code;
  logic       sign;
  logic [7:0] mag;
  int checks = 0, failures = 0;

  pot_decoder dut (.code(code), .sign(sign), .mag(mag));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int v;
      code = 4'(i);
      #1;
      v = pot4_val(code);
      checks++;
      if ((sign ? -int'(mag) : int'(mag)) != v || sign != code[3]) begin
        failures++;
        $display("FAIL code=%h sign=%0b mag=%0d expected %0d", code, sign, mag, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

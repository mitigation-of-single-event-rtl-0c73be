// tb_command_decoder: exhaustive check of the command decoder CN.
//
// Applies all 16 command codes and compares o[11..1] with the expected
// one-hot word: switch k for code k (1..11), nothing otherwise. Also checks
// that no code sets more than one request.
`timescale 1ns / 1ps
module tb_command_decoder;
  import ld_pkg::*;

  cmd_t    d;
  sw_vec_t o;
  int      checks = 0;
  int      failures = 0;

  command_decoder dut (.d(d), .o(o));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [10:0] exp_bits;
      d = cmd_t'(v);
      #1;
      exp_bits = (v >= 1 && v <= 11) ? (11'b1 << (v - 1)) : 11'b0;
      checks++;
      if (o !== exp_bits) begin
        failures++;
        $display("FAIL d=%0d o=%b expected %b", v, o, exp_bits);
      end
      checks++;
      if ($countones(o) > 1) begin
        failures++;
        $display("FAIL d=%0d sets %0d requests", v, $countones(o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

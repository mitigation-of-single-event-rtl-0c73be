// tb_safety_filter: exhaustive check of the safety filter.
//
// Applies all 2048 switch words. A word with at most one closed switch must
// pass unchanged; any other must come out all open.
`timescale 1ns / 1ps
module tb_safety_filter;
  import ld_pkg::*;

  sw_vec_t s_in;
  sw_vec_t s_out;
  int      checks = 0;
  int      failures = 0;
  int      blocked = 0;

  safety_filter dut (.s_in(s_in), .s_out(s_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      sw_vec_t expected;
      s_in = sw_vec_t'(v);
      #1;
      // Independent reference: count the set bits one by one.
      begin
        automatic int n = 0;
        for (int b = 0; b < 11; b++) n += (v >> b) & 1;
        expected = (n <= 1) ? sw_vec_t'(v) : '0;
        if (n > 1) blocked++;
      end
      checks++;
      if (s_out !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL s_in=%b s_out=%b expected %b", s_in, s_out, expected);
      end
    end
    checks++;
    if (blocked != 2048 - 12) begin
      failures++;
      $display("FAIL blocked %0d words, expected %0d", blocked, 2048 - 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

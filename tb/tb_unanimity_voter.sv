// tb_unanimity_voter: checks the AND voter with three copies.
//
// Drives directed cases (all agree, one copy differs in each direction) and
// 2000 random triples, comparing with a bit-by-bit unanimity reference.
`timescale 1ns / 1ps
module tb_unanimity_voter;
  import ld_pkg::*;

  sw_vec_t s_in [3];
  sw_vec_t s_out;
  int      checks = 0;
  int      failures = 0;

  unanimity_voter #(.N_COPIES(3)) dut (.s_in(s_in), .s_out(s_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    sw_vec_t expected;
    #1;
    for (int b = 1; b <= 11; b++)
      expected[b] = (s_in[0][b] == 1'b1 && s_in[1][b] == 1'b1 && s_in[2][b] == 1'b1);
    checks++;
    if (s_out !== expected) begin
      failures++;
      $display("FAIL in=%b/%b/%b out=%b expected %b", s_in[0], s_in[1], s_in[2], s_out, expected);
    end
  endtask

  initial begin
    // All copies agree on one closed switch: it stays closed.
    s_in[0] = 11'b00000100000; s_in[1] = 11'b00000100000; s_in[2] = 11'b00000100000;
    check_one();
    // One copy upset towards a second closed switch: masked.
    s_in[1] = 11'b00000100100;
    check_one();
    // One copy upset towards open: the switch opens.
    s_in[1] = 11'b00000000000;
    check_one();
    for (int i = 0; i < 2000; i++) begin
      for (int c = 0; c < 3; c++) s_in[c] = sw_vec_t'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

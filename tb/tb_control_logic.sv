// tb_control_logic: cycle-accurate check of the control logic.
//
// A reference model (input register, binary-to-one-hot decode, load only
// when all switches are open, output register) runs beside the block on
// random commands; s must match it on every clock. Also checks the
// latency (a command applied before clock n drives s after clock n+1 when
// all switches were open), that s never has two bits set, that every change
// from one closed switch to another passes through all-open, and reset.
`timescale 1ns / 1ps
module tb_control_logic;
  import ld_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  cmd_t    d = '0;
  sw_vec_t s;
  int      checks = 0;
  int      failures = 0;
  int      cycles = 0;

  control_logic dut (.clk(clk), .rst_n(rst_n), .d(d), .s(s));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [10:0] ref_decode(int v);
    return (v >= 1 && v <= 11) ? (11'b1 << (v - 1)) : 11'b0;
  endfunction

  task automatic expect_s(logic [10:0] e, string what);
    checks++;
    if (s !== e) begin
      failures++;
      $display("FAIL %s: s=%b expected %b at cycle %0d", what, s, e, cycles);
    end
  endtask

  logic [10:0] m_d;   // model input register (decoded later)
  int          m_cmd;
  logic [10:0] m_s;
  logic [10:0] prev_s;
  int          bbm = 0;

  initial begin
    #12 rst_n = 1'b1;
    // Latency: from reset, command 7 captured at the first clock, driven
    // after the second.
    @(negedge clk) d = 4'd7;
    @(negedge clk) expect_s(11'b0, "latency, one clock");
    @(negedge clk) expect_s(ref_decode(7), "latency, two clocks");
    // Next clock opens all switches (break-before-make), then 7 again.
    d = 4'd3;
    @(negedge clk) expect_s(11'b0, "interlock opens");
    @(negedge clk) expect_s(ref_decode(3), "new switch after open");

    // Random run against the model.
    m_cmd = 3; m_s = ref_decode(3);
    prev_s = s;
    for (int i = 0; i < 5000; i++) begin
      automatic int nd = $urandom_range(0, 15);
      d = cmd_t'(nd);
      @(posedge clk);
      m_s = (m_s == 0) ? ref_decode(m_cmd) : 11'b0;
      m_cmd = nd;
      @(negedge clk);
      expect_s(m_s, "random");
      checks++;
      if ($countones(s) > 1) begin
        failures++;
        $display("FAIL two switches closed: %b", s);
      end
      checks++;
      if (prev_s != 0 && s != 0 && s != prev_s) begin
        failures++;
        $display("FAIL switch changed without opening: %b -> %b", prev_s, s);
      end
      if (prev_s != 0 && s == 0) bbm++;
      prev_s = s;
    end
    checks++;
    if (bbm == 0) begin
      failures++;
      $display("FAIL interlock never opened the switches");
    end

    // Asynchronous reset clears the outputs at once.
    d = 4'd2;
    repeat (2) @(negedge clk);
    if (s == 0) @(negedge clk);
    #1 rst_n = 1'b0;
    #1 expect_s(11'b0, "async reset");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

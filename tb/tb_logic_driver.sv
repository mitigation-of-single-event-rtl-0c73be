// tb_logic_driver: end-to-end test of the logic driver at its default
// parameters (triplicated filter with unanimity voter, 1000 ns monostable).
//
// The testbench plays the microcontroller: it puts a command on d, pulses
// str, and compares s[11..1] after every strobe with a reference model of
// the protocol (command registered on one strobe, driven on the next if all
// switches are open, otherwise all switches open first). It runs a complete
// balancing operation (close SW5, move to SW9, open all), then random
// commands, and exercises every mechanism of the design at least once:
//   close     - a switch closes from all-open
//   interlock - a strobe with a switch closed opens all switches
//   merge     - a burst of strobes inside one monostable pulse is one clock
//   blocked   - an upset making the control logic close two switches is
//               stopped by the filters
//   masked    - an upset in one filter copy is outvoted by the AND voter
//   reset     - the asynchronous reset opens all switches
// Throughout, s must never have more than one bit set.
`timescale 1ns / 1ps
module tb_logic_driver;
  import ld_pkg::*;

  logic    rst_n = 1'b0;
  cmd_t    d = '0;
  logic    str = 1'b0;
  sw_vec_t s;
  int      checks = 0;
  int      failures = 0;
  int      n_close = 0, n_interlock = 0, n_merge = 0;
  int      n_blocked = 0, n_masked = 0, n_reset = 0;

  logic_driver dut (.rst_n(rst_n), .d(d), .str(str), .s(s));

  initial begin : watchdog
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The short-circuit rule, checked on every change of s.
  always @(s) begin
    if ($countones(s) > 1) begin
      failures++;
      $display("FAIL %0t: two switches closed, s=%b", $time, s);
    end
  end

  function automatic logic [10:0] ref_decode(int v);
    return (v >= 1 && v <= 11) ? (11'b1 << (v - 1)) : 11'b0;
  endfunction

  int          m_cmd = 0;
  logic [10:0] m_s = '0;

  // Model step for one clock (one monostable pulse).
  task automatic model_clock(int nd);
    if (m_s == 0) begin
      m_s = ref_decode(m_cmd);
      if (m_s != 0) n_close++;
    end else begin
      m_s = 11'b0;
      n_interlock++;
    end
    m_cmd = nd;
  endtask

  task automatic expect_s(string what);
    checks++;
    if (s !== m_s) begin
      failures++;
      $display("FAIL %0t %s: s=%b expected %b", $time, what, s, m_s);
    end
  endtask

  // One command: d set up 200 ns ahead, a 100 ns strobe, then a gap longer
  // than the monostable pulse.
  task automatic send(int nd, string what);
    d = cmd_t'(nd);
    #200;
    str = 1'b1;
    #100;
    str = 1'b0;
    model_clock(nd);
    #1500;
    expect_s(what);
  endtask

  initial begin
    #500 rst_n = 1'b1;
    #500;
    expect_s("after reset");

    // A complete balancing operation.
    send(5, "load SW5");
    send(5, "SW5 closes");
    send(9, "move: all open");
    send(9, "SW9 closes");
    send(0, "open all");
    send(0, "stay open");

    // Random commands.
    for (int i = 0; i < 300; i++) send($urandom_range(0, 15), "random");

    // A burst of three strobes 200 ns apart: one clock only.
    begin
      automatic int nd = $urandom_range(1, 11);
      d = cmd_t'(nd);
      #200;
      repeat (3) begin
        str = 1'b1; #100; str = 1'b0; #100;
      end
      model_clock(nd);
      #1500;
      expect_s("burst is one clock");
      if (s === m_s) n_merge++;
    end

    // Close a switch so that the upsets below have one to work on.
    do send(6, "select SW6"); while (m_s != ref_decode(6));

    // Upsets are imposed with force and undone by forcing the saved true
    // value before the release, so the nets read the right value again.
    begin
      sw_vec_t true_cl, true_f0;
      true_cl = dut.u_core.s_cl;
      true_f0 = dut.u_core.g_clf3uv.s_filt[0];

      // The control logic drives two closed switches.
      force dut.u_core.s_cl = 11'b00010000001;
      #10;
      checks++;
      if (s !== 11'b0) begin
        failures++;
        $display("FAIL filters did not block a double selection: s=%b", s);
      end else n_blocked++;
      force dut.u_core.s_cl = true_cl;
      release dut.u_core.s_cl;

      // One filter copy closes a second switch; the voter masks it.
      force dut.u_core.g_clf3uv.s_filt[0] = true_f0 | 11'b10000000000;
      #10;
      checks++;
      if (s !== m_s) begin
        failures++;
        $display("FAIL voter did not mask a faulty filter copy: s=%b", s);
      end else if (m_s != 0) n_masked++;
      force dut.u_core.g_clf3uv.s_filt[0] = true_f0;
      release dut.u_core.g_clf3uv.s_filt[0];
      #10;
      expect_s("state unchanged after the transient upsets");
    end

    // Reset with a switch closed.
    checks++;
    if (m_s == 0) begin
      failures++;
      $display("FAIL no switch closed before the reset test");
    end
    #100 rst_n = 1'b0;
    #10;
    m_s = '0;
    m_cmd = 0;
    expect_s("reset opens all");
    if (s === 11'b0) n_reset++;
    #100 rst_n = 1'b1;
    send(2, "after reset: load");
    send(2, "after reset: close");

    $display("mechanisms: close=%0d interlock=%0d merge=%0d blocked=%0d masked=%0d reset=%0d",
             n_close, n_interlock, n_merge, n_blocked, n_masked, n_reset);
    checks++;
    if (n_close == 0 || n_interlock == 0 || n_merge == 0 ||
        n_blocked == 0 || n_masked == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ft_control_logic: checks the three hardening schemes side by side.
//
// Three instances (CL, CLF, CLF3UV) get the same random commands. Fault
// free, all three must behave as the bare control logic model. Then upsets
// are imposed with force on internal nets:
//   - two bits of the control-logic output register set: CL passes the short
//     circuit, CLF and CLF3UV must open all switches (filter blocks);
//   - a second bit set at the output of one filter copy of CLF3UV: the
//     unanimity voter must mask it;
//   - one filter copy of CLF3UV stuck open: the switch opens (safe).
// Each mechanism must be seen at least once.
`timescale 1ns / 1ps
module tb_ft_control_logic;
  import ld_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  cmd_t    d = '0;
  sw_vec_t s_cl, s_clf, s_clf3;
  int      checks = 0;
  int      failures = 0;
  int      n_blocked = 0;
  int      n_masked = 0;

  ft_control_logic #(.SCHEME(FT_CL))     dut_cl   (.clk(clk), .rst_n(rst_n), .d(d), .s(s_cl));
  ft_control_logic #(.SCHEME(FT_CLF))    dut_clf  (.clk(clk), .rst_n(rst_n), .d(d), .s(s_clf));
  ft_control_logic                       dut_clf3 (.clk(clk), .rst_n(rst_n), .d(d), .s(s_clf3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [10:0] ref_decode(int v);
    return (v >= 1 && v <= 11) ? (11'b1 << (v - 1)) : 11'b0;
  endfunction

  task automatic expect_eq(logic [10:0] got, logic [10:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, e);
    end
  endtask

  int          m_cmd = 0;
  logic [10:0] m_s = '0;

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      automatic int nd = $urandom_range(0, 15);
      d = cmd_t'(nd);
      @(posedge clk);
      m_s = (m_s == 0) ? ref_decode(m_cmd) : 11'b0;
      m_cmd = nd;
      @(negedge clk);
      expect_eq(s_cl, m_s, "CL fault free");
      expect_eq(s_clf, m_s, "CLF fault free");
      expect_eq(s_clf3, m_s, "CLF3UV fault free");
    end

    // Upset in the control logic output register: two switches closed.
    force dut_cl.s_cl   = 11'b00000010010;
    force dut_clf.s_cl  = 11'b00000010010;
    force dut_clf3.s_cl = 11'b00000010010;
    #1;
    expect_eq(s_cl, 11'b00000010010, "CL passes the short circuit");
    expect_eq(s_clf, 11'b0, "CLF filter blocks");
    expect_eq(s_clf3, 11'b0, "CLF3UV filters block");
    if (s_clf == 0 && s_clf3 == 0) n_blocked++;
    release dut_cl.s_cl;
    release dut_clf.s_cl;
    release dut_clf3.s_cl;

    // One legal closed switch in the control logic, and filter copy 1 of
    // CLF3UV upset so that it also closes switch 9.
    force dut_clf3.s_cl = 11'b00000000100;
    force dut_clf3.g_clf3uv.s_filt[1] = 11'b00100000100;
    #1;
    expect_eq(s_clf3, 11'b00000000100, "CLF3UV voter masks a faulty filter copy");
    if (s_clf3 == 11'b00000000100) n_masked++;
    // Filter copy 2 stuck open instead: the switch opens.
    release dut_clf3.g_clf3uv.s_filt[1];
    force dut_clf3.g_clf3uv.s_filt[2] = 11'b0;
    #1;
    expect_eq(s_clf3, 11'b0, "CLF3UV opens on a copy stuck open");
    release dut_clf3.g_clf3uv.s_filt[2];
    #1;
    expect_eq(s_clf3, 11'b00000000100, "CLF3UV recovers after release");
    release dut_clf3.s_cl;

    checks++;
    if (n_blocked == 0 || n_masked == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: blocked=%0d masked=%0d", n_blocked, n_masked);
    end
    $display("filter blocks=%0d voter masks=%0d", n_blocked, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_seu_campaign: fault-injection campaign over the three hardening
// schemes (CL, CLF, CLF3UV), after the evaluation method of the design.
//
// For each sequence length i = 1..10 clocks, RUNS runs are made. Each run
// resets the three instances, makes one net of each instance stuck at a
// random value (one random location per instance, drawn independently), and
// applies i random 4-bit commands, one per clock. A run is a failure if s
// differs from the fault-free reference in any clock, and a catastrophic
// failure if s ever has two or more switches closed (a short circuit).
// FP_i = failures / RUNS and CFP_i = catastrophic failures / RUNS are
// printed as a table.
//
// Fault model: the original evaluation flips bits of the CPLD configuration
// memory. At register-transfer level that is approximated by a stuck-at
// fault on one of the design's nets: a bit of the input register, of the
// decoder outputs, the all-open feedback, a bit of the output register, a
// bit of a filter copy's output or of the voter's output. The absolute
// numbers therefore differ from a configuration-memory campaign.
//
// Checks (exact properties of the structure, not statistics):
//   - fault-free runs never fail;
//   - CLF: no fault inside the control logic leads to a short circuit;
//   - CLF3UV: no fault in the control logic or in one filter copy leads to
//     a short circuit; only the voter's own outputs can;
//   - CL does suffer short circuits, and CFP_10 orders CL >= CLF >= CLF3UV.
`timescale 1ns / 1ps
module tb_seu_campaign;
  import ld_pkg::*;

  localparam int RUNS    = 10000;
  localparam int MAX_LEN = 10;
  // Fault sites per instance: 4 input-register bits, 11 decoder outputs,
  // the all-open feedback, 11 output-register bits (27 in the control
  // logic), then 11 per filter copy, then 11 voter outputs.
  localparam int N_CL_SITES = 27;
  localparam int N_SITES [3] = '{27, 27 + 11, 27 + 33 + 11};

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  cmd_t    d = '0;
  sw_vec_t s_out [3];
  int      checks = 0;
  int      failures = 0;

  ft_control_logic #(.SCHEME(FT_CL))     dut_cl   (.clk(clk), .rst_n(rst_n), .d(d), .s(s_out[0]));
  ft_control_logic #(.SCHEME(FT_CLF))    dut_clf  (.clk(clk), .rst_n(rst_n), .d(d), .s(s_out[1]));
  ft_control_logic #(.SCHEME(FT_CLF3UV)) dut_clf3 (.clk(clk), .rst_n(rst_n), .d(d), .s(s_out[2]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- sites
  event inject_ev, restore_ev;
  int   loc   [3];
  logic stuck [3];

  // Force site N of instance K to its stuck value on inject_ev; on
  // restore_ev force it to its value after reset and release it.
`define SITE(K, N, PATH, RV) \
  always @(inject_ev)  if (loc[K] == (N)) force PATH = stuck[K]; \
  always @(restore_ev) if (loc[K] == (N)) begin force PATH = RV; release PATH; end

`define CL_SITES(K, INST) \
  for (genvar b = 0; b < 4; b++) begin : g_dq_``K \
    `SITE(K, b, INST.u_cl.d_q[b], 1'b0) \
  end \
  for (genvar b = 1; b <= 11; b++) begin : g_o_``K \
    `SITE(K, 3 + b, INST.u_cl.o[b], 1'b0) \
  end \
  `SITE(K, 15, INST.u_cl.all_open, 1'b1) \
  for (genvar b = 1; b <= 11; b++) begin : g_s_``K \
    `SITE(K, 15 + b, INST.u_cl.s[b], 1'b0) \
  end

  `CL_SITES(0, dut_cl)
  `CL_SITES(1, dut_clf)
  `CL_SITES(2, dut_clf3)

  for (genvar b = 1; b <= 11; b++) begin : g_f_1
    `SITE(1, 26 + b, dut_clf.g_clf.u_filter.s_out[b], 1'b0)
  end
  for (genvar c = 0; c < 3; c++) begin : g_fc_2
    for (genvar b = 1; b <= 11; b++) begin : g_f_2
      `SITE(2, 26 + 11 * c + b, dut_clf3.g_clf3uv.s_filt[c][b], 1'b0)
    end
  end
  for (genvar b = 1; b <= 11; b++) begin : g_v_2
    `SITE(2, 59 + b, dut_clf3.g_clf3uv.u_voter.s_out[b], 1'b0)
  end

`undef CL_SITES
`undef SITE

  // ------------------------------------------------------------ reference
  function automatic logic [10:0] ref_decode(int v);
    return (v >= 1 && v <= 11) ? (11'b1 << (v - 1)) : 11'b0;
  endfunction

  int fail_cnt  [3][MAX_LEN + 1];
  int cat_cnt   [3][MAX_LEN + 1];
  int cat_cl    [3];  // catastrophic runs with the fault in the control logic
  int cat_filt  [3];  // ... in a filter copy
  int cat_voter [3];  // ... in the voter output
  int ff_fail = 0;

  // One run of len clocks; inject selects a fault or a fault-free run.
  task automatic run(int len, bit inject, output bit failed [3], output bit cat [3]);
    int          m_cmd;
    logic [10:0] m_s;
    for (int k = 0; k < 3; k++) begin
      failed[k] = 1'b0;
      cat[k]    = 1'b0;
    end
    // Undo the previous run's faults, then reset.
    -> restore_ev;
    #1;
    rst_n = 1'b0;
    d     = '0;
    #1;
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      loc[k]   = inject ? $urandom_range(0, N_SITES[k] - 1) : -1;
      stuck[k] = 1'(($urandom));
    end
    -> inject_ev;
    #1;
    m_cmd = 0;
    m_s   = '0;
    for (int c = 0; c < len; c++) begin
      automatic int nd = $urandom_range(0, 15);
      @(negedge clk);
      d = cmd_t'(nd);
      @(posedge clk);
      m_s   = (m_s == 0) ? ref_decode(m_cmd) : 11'b0;
      m_cmd = nd;
      #1;
      for (int k = 0; k < 3; k++) begin
        if (s_out[k] !== m_s) failed[k] = 1'b1;
        if ($countones(s_out[k]) > 1) cat[k] = 1'b1;
      end
    end
  endtask

  initial begin
    bit failed [3];
    bit cat    [3];

    #12;
    // Fault-free runs: the three schemes must all follow the reference.
    for (int r = 0; r < 200; r++) begin
      run(MAX_LEN, 1'b0, failed, cat);
      for (int k = 0; k < 3; k++) if (failed[k] || cat[k]) ff_fail++;
    end
    checks++;
    if (ff_fail != 0) begin
      failures++;
      $display("FAIL %0d fault-free runs failed", ff_fail);
    end

    for (int len = 1; len <= MAX_LEN; len++) begin
      for (int r = 0; r < RUNS; r++) begin
        run(len, 1'b1, failed, cat);
        for (int k = 0; k < 3; k++) begin
          if (failed[k]) fail_cnt[k][len]++;
          if (cat[k]) begin
            cat_cnt[k][len]++;
            if (loc[k] < N_CL_SITES) cat_cl[k]++;
            else if (k == 2 && loc[k] >= N_CL_SITES + 33) cat_voter[k]++;
            else cat_filt[k]++;
          end
        end
      end
    end

    $display("  i   FP(CL)  FP(CLF) FP(CLF3UV)  CFP(CL) CFP(CLF) CFP(CLF3UV)");
    for (int len = 1; len <= MAX_LEN; len++)
      $display("%3d   %6.4f  %6.4f  %6.4f      %6.4f  %6.4f   %6.4f", len,
               real'(fail_cnt[0][len]) / RUNS, real'(fail_cnt[1][len]) / RUNS,
               real'(fail_cnt[2][len]) / RUNS, real'(cat_cnt[0][len]) / RUNS,
               real'(cat_cnt[1][len]) / RUNS, real'(cat_cnt[2][len]) / RUNS);
    $display("short circuits by fault site: CLF control logic=%0d filter=%0d;",
             cat_cl[1], cat_filt[1]);
    $display("  CLF3UV control logic=%0d filter copies=%0d voter=%0d",
             cat_cl[2], cat_filt[2], cat_voter[2]);

    checks++;
    if (cat_cl[1] != 0) begin
      failures++;
      $display("FAIL CLF: a control-logic fault closed two switches");
    end
    checks++;
    if (cat_cl[2] != 0 || cat_filt[2] != 0) begin
      failures++;
      $display("FAIL CLF3UV: a control-logic or filter-copy fault closed two switches");
    end
    checks++;
    if (cat_cnt[0][MAX_LEN] == 0) begin
      failures++;
      $display("FAIL CL never closed two switches: the faults do not reach the outputs");
    end
    checks++;
    if (!(cat_cnt[0][MAX_LEN] >= cat_cnt[1][MAX_LEN] &&
          cat_cnt[1][MAX_LEN] >= cat_cnt[2][MAX_LEN])) begin
      failures++;
      $display("FAIL CFP_10 is not ordered CL >= CLF >= CLF3UV");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_retrig_monostable: checks the monostable model's timing.
//
// A single strobe must give one pulse of PULSE_NS; a burst of strobes
// spaced closer than PULSE_NS must give one pulse lasting PULSE_NS past the
// last strobe (retriggering); strobes spaced wider must give one pulse each.
`timescale 1ns / 1ps
module tb_retrig_monostable;

  localparam realtime PULSE = 1000.0;

  logic    trig = 1'b0;
  logic    q;
  int      checks = 0;
  int      failures = 0;
  int      rises = 0;
  realtime t_rise, t_fall;

  retrig_monostable #(.PULSE_NS(PULSE)) dut (.trig(trig), .q(q));

  always @(posedge q) begin rises++; t_rise = $realtime; end
  always @(negedge q) t_fall = $realtime;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic strobe();
    trig = 1'b1;
    #50;
    trig = 1'b0;
  endtask

  task automatic expect_near(realtime got, realtime e, string what);
    checks++;
    if (got < e - 0.01 || got > e + 0.01) begin
      failures++;
      $display("FAIL %s: %0.3f ns, expected %0.3f ns", what, got, e);
    end
  endtask

  initial begin
    realtime t0, t_last;
    #100;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL q not low at rest"); end
    // Single strobe.
    t0 = $realtime;
    strobe();
    #2000;
    expect_near(t_rise, t0, "single: rise");
    expect_near(t_fall - t_rise, PULSE, "single: width");
    // Burst of 5 strobes 300 ns apart.
    t0 = $realtime;
    for (int i = 0; i < 5; i++) begin
      t_last = $realtime;
      strobe();
      if (i < 4) #250;
    end
    #2000;
    checks++;
    if (rises != 2) begin failures++; $display("FAIL burst gave %0d pulses", rises - 1); end
    expect_near(t_rise, t0, "burst: rise");
    expect_near(t_fall, t_last + PULSE, "burst: fall after last strobe");
    // Three strobes 1500 ns apart: three pulses.
    for (int i = 0; i < 3; i++) begin
      strobe();
      #1450;
    end
    #1000;
    checks++;
    if (rises != 5) begin failures++; $display("FAIL spaced strobes gave %0d pulses", rises - 2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// retrig_monostable: behavioural model (not synthesizable) of the external
// retriggerable monostable that makes the clock of the control logic.
//
// On the real board this is an RC-timed monostable chip; the design
// description names it and shows its resistor and capacitor, but gives no
// part number or pulse width. The model: a rising edge on trig sets q high;
// q falls PULSE_NS after the last rising edge of trig, so a burst of
// strobes closer together than PULSE_NS gives one long pulse (one rising
// edge of the clock). The pulse width of 1000 ns is this design's own
// choice. q is low at time 0.
//
// Interface: trig (the strobe str) in, q (the clock clk) out.
`timescale 1ns / 1ps
module retrig_monostable #(
  parameter realtime PULSE_NS = 1000.0
) (
  input  logic trig,
  output logic q
);

  logic retrig;

  initial q = 1'b0;

  always begin
    @(posedge trig);
    q      = 1'b1;
    retrig = 1'b1;
    while (retrig) begin
      retrig = 1'b0;
      fork
        #(PULSE_NS);
        begin
          @(posedge trig);
          retrig = 1'b1;
        end
      join_any
      disable fork;
    end
    q = 1'b0;
  end

endmodule

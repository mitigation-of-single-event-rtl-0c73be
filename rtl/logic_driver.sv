// logic_driver: the logic driver of the charge equalizer (top level).
//
// A DC/DC converter moves charge between a balancing bus and one cell of an
// 11-cell-tap Li-ion stack at a time; eleven DPST switches SW1..SW11 pick
// the cell. Closing two switches at once shorts part of the stack, so the
// logic driver guarantees that at most one of s[11..1] is asserted.
//
// The microcontroller puts a command on d[3..0] and pulses str. The
// retriggerable monostable turns str into the clock of the control logic;
// the control logic, hardened by SCHEME (default: three safety filters and
// a unanimity voter), drives s[11..1]. Structure follows the design
// description; the reset input and the command code (see command_decoder)
// are this design's own.
//
// Protocol (see control_logic): every strobe is one clock. A command is
// taken into the input register on a strobe and reaches s on the next
// strobe, provided no switch is closed then; if one is, that strobe opens
// all switches instead. So changing from one closed switch to another takes
// two strobes with the new command held on d, and passes through
// all-open. Strobes closer together than PULSE_NS merge into one clock.
//
// Interface: rst_n (asynchronous, active low), d (4 bits), str in;
// s[11..1] out to the switch matrix.
`timescale 1ns / 1ps
module logic_driver
  import ld_pkg::*;
#(
  parameter ft_scheme_t SCHEME   = FT_CLF3UV,
  parameter realtime    PULSE_NS = 1000.0
) (
  input  logic    rst_n,
  input  cmd_t    d,
  input  logic    str,
  output sw_vec_t s
);

  logic clk;

  retrig_monostable #(.PULSE_NS(PULSE_NS)) u_mono (
    .trig (str),
    .q    (clk)
  );

  ft_control_logic #(.SCHEME(SCHEME)) u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (d),
    .s     (s)
  );

endmodule

// control_logic: the control logic (CL) of the charge-equalizer logic driver.
//
// Structure, as in the logic driver's block diagram: a 4-bit input register
// samples the command d[3..0]; the decoder CN turns the registered command
// into switch requests o[11..1]; each request is gated with a signal fed back
// from the outputs s[11..1]; an 11-bit output register drives s[11..1]. Both
// registers share the clock made by the retriggerable monostable.
//
// The feedback gate is read here as "no switch is closed now": a request
// passes to the output register only when s is all zero, and otherwise the
// register loads all zeros. This gives break-before-make behaviour: moving
// from one closed switch to another always passes through one clock with
// all switches open, so two switches never conduct together. The kind of
// gate is this design's reading of the drawing, not a stated fact.
//
// Timing: the output lags the command by one clock (the input register).
// After reset (s = 0) a command d applied at clock n closes its switch at
// clock n+1. With a switch closed, the next clock opens all switches and the
// clock after that loads the request of the command then held in the input
// register.
//
// Interface: clk, rst_n (asynchronous, active low; clears both registers so
// all switches are open - reset is this design's own addition), d in, s out.
`timescale 1ns / 1ps
module control_logic
  import ld_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cmd_t    d,
  output sw_vec_t s
);

  cmd_t    d_q;      // input register
  sw_vec_t o;        // decoder outputs o[11..1]
  sw_vec_t s_d;      // gated requests, next output register value
  logic    all_open; // feedback: no switch is closed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_q <= '0;
    else        d_q <= d;
  end

  command_decoder u_cn (
    .d (d_q),
    .o (o)
  );

  assign all_open = ~|s;
  assign s_d      = o & {NUM_SW{all_open}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else        s <= s_d;
  end

endmodule

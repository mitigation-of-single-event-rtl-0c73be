// command_decoder: the combinational network CN of the control logic.
//
// Decodes the registered 4-bit command into the eleven switch requests
// o[11..1]. The design description says only that d[3..0] encodes the
// required switch configuration; the code used here is this design's own:
// the command is the binary number of the switch to close, so d = k with
// 1 <= k <= 11 sets o[k] alone, and d = 0 or d = 12..15 sets nothing (all
// switches open). By construction at most one request is ever set.
//
// Interface: d (4 bits) in, o (11 bits) out. Purely combinational.
`timescale 1ns / 1ps
module command_decoder
  import ld_pkg::*;
(
  input  cmd_t    d,
  output sw_vec_t o
);

  always_comb begin
    o = '0;
    for (int unsigned k = 1; k <= NUM_SW; k++) begin
      if (d == CMD_W'(k)) o[k] = 1'b1;
    end
  end

endmodule

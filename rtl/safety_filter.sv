// safety_filter: the Filter block of the SEU-hardened schemes.
//
// Blocks every switch word that would close more than one switch: if at
// most one bit of s_in is set, s_in passes unchanged; if two or more are
// set, s_out is all zero (all switches open). That is the function the
// design description gives; the circuit (a running "seen one" / "seen two"
// scan over the bits) is this design's own.
//
// Interface: s_in, s_out, 11 bits each. Purely combinational.
`timescale 1ns / 1ps
module safety_filter
  import ld_pkg::*;
(
  input  sw_vec_t s_in,
  output sw_vec_t s_out
);

  logic seen_one;
  logic seen_two;

  always_comb begin
    seen_one = 1'b0;
    seen_two = 1'b0;
    for (int unsigned k = 1; k <= NUM_SW; k++) begin
      seen_two = seen_two | (seen_one & s_in[k]);
      seen_one = seen_one | s_in[k];
    end
    s_out = seen_two ? '0 : s_in;
  end

endmodule

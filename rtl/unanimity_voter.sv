// unanimity_voter: the voter of the triplicated-filter scheme (CLF3UV).
//
// A bitwise AND of the N_COPIES filter outputs: a switch is driven closed
// only if every copy asks for it. A copy upset towards "closed" therefore
// cannot close a switch on its own; an upset towards "open" opens it, which
// costs balancing performance but is safe. N_COPIES = 3 follows the design
// description.
//
// Interface: s_in[N_COPIES] (11 bits each) in, s_out (11 bits) out.
// Purely combinational.
`timescale 1ns / 1ps
module unanimity_voter
  import ld_pkg::*;
#(
  parameter int unsigned N_COPIES = 3
) (
  input  sw_vec_t s_in [N_COPIES],
  output sw_vec_t s_out
);

  always_comb begin
    s_out = '1;
    for (int unsigned c = 0; c < N_COPIES; c++) s_out &= s_in[c];
  end

endmodule

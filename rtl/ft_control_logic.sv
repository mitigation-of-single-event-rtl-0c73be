// ft_control_logic: the logic held in the CPLD, hardened against single
// event upsets.
//
// One copy of the control logic (CL) produces the switch word; what follows
// it depends on SCHEME:
//   FT_CL     - the CL output drives s directly (no hardening);
//   FT_CLF    - one safety filter between CL and s;
//   FT_CLF3UV - three identical safety filters in parallel on the CL output,
//               combined by a unanimity (AND) voter. This is the default.
// The filters stop a word with two or more closed switches, i.e. a short
// circuit of the battery stack, whether it comes from an upset in CL or is
// produced inside one filter copy; the AND voter keeps a single faulty
// filter copy from closing a switch. Upsets can still open switches or close
// the wrong single switch, which only costs balancing performance.
//
// The three schemes and their structure follow the design description. The
// baseline with triplicated control logic and a majority voter, against
// which the description compares them, is not part of this design.
//
// Timing: as control_logic; the filters and the voter are combinational
// and add no clock of latency.
//
// Interface: clk, rst_n (asynchronous, active low), d (4 bits) in,
// s (11 bits) out.
`timescale 1ns / 1ps
module ft_control_logic
  import ld_pkg::*;
#(
  parameter ft_scheme_t SCHEME = FT_CLF3UV
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cmd_t    d,
  output sw_vec_t s
);

  sw_vec_t s_cl;

  control_logic u_cl (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (d),
    .s     (s_cl)
  );

  if (SCHEME == FT_CLF3UV) begin : g_clf3uv
    sw_vec_t s_filt [3];

    for (genvar c = 0; c < 3; c++) begin : g_filter
      safety_filter u_filter (
        .s_in  (s_cl),
        .s_out (s_filt[c])
      );
    end

    unanimity_voter #(.N_COPIES(3)) u_voter (
      .s_in  (s_filt),
      .s_out (s)
    );
  end else if (SCHEME == FT_CLF) begin : g_clf
    safety_filter u_filter (
      .s_in  (s_cl),
      .s_out (s)
    );
  end else begin : g_cl
    assign s = s_cl;
  end

endmodule

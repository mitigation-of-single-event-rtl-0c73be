// ld_pkg: types and constants shared by the charge-equalizer logic driver.
//
// The switch matrix has eleven DPST switches SW1..SW11, one per cell tap
// pair, driven by s[11..1]; the microcontroller sends a 4-bit command
// d[3..0]. Both widths follow the design description. The switch vector is
// indexed 11 down to 1 so that bit k drives switch SWk.
//
// ft_scheme_t selects how the control logic is hardened against single
// event upsets:
//   FT_CL     - bare control logic, no hardening
//   FT_CLF    - control logic followed by one safety filter
//   FT_CLF3UV - control logic followed by three safety filters and a
//               unanimity (AND) voter; the default of the design
`timescale 1ns / 1ps
package ld_pkg;

  localparam int unsigned NUM_SW = 11;  // switches SW1..SW11
  localparam int unsigned CMD_W  = 4;   // command width d[3..0]

  typedef logic [NUM_SW:1] sw_vec_t;
  typedef logic [CMD_W-1:0] cmd_t;

  typedef enum logic [1:0] {
    FT_CL     = 2'd0,
    FT_CLF    = 2'd1,
    FT_CLF3UV = 2'd2
  } ft_scheme_t;

endpackage

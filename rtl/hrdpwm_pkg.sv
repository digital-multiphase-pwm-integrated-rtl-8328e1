// hrdpwm_pkg -- constants and types shared by the multiphase high-resolution
// DPWM (HR-DPWM).
//
// The duty command of every phase is D = {D_MSB, D_HALF, D_LSB}:
//   D_MSB  : M_BITS coarse bits, counted in whole clk_base periods,
//   D_HALF : one bit that adds half a clk_base period (bit D[l+1] when the
//            LSBs are numbered from 1),
//   D_LSB  : L_BITS fine bits, counted in single delay elements.
// With a ring of 2**L_BITS delay elements the on-time is D * t_de.
// The defaults (4 + 1 + 8 = 13 bits, four phases, 256 delay elements) are
// those of the fabricated module the design follows.
package hrdpwm_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DEF_M_BITS   = 4;   // coarse bits, counter width
  localparam int unsigned DEF_L_BITS   = 8;   // tap-select bits
  localparam int unsigned DEF_N_PHASES = 4;   // largest number of phases

  // The four coarse windows a comparison block hands to its output logic.
  //   c1 : counter_p window, D_MSB clock periods long
  //   c2 : counter_p window, D_MSB + 1 clock periods long
  //   c3 : counter_n window (half a period later), D_MSB periods long
  //   c4 : counter_n window, D_MSB + 1 periods long
  typedef struct packed {
    logic c1;
    logic c2;
    logic c3;
    logic c4;
  } cmp_t;

endpackage

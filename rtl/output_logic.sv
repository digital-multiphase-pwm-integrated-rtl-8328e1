// output_logic -- forms one phase's high-resolution PWM signal.
//
// Delay_x is clk_base delayed by y = D_LSB delay elements (y < half a
// clk_base period), so its low phase opens and its high phase closes a
// fine interval of y elements. With T the clk_base period, the pulse of a
// phase runs from its cycle start to
//   D_MSB*T + D_HALF*T/2 + y*t_de.
// Two branches, chosen by D_HALF (the bit D[l+1] of the document):
//   D_HALF = 0 : pwm = c1 | (~Delay_x & c3)
//                c1 covers D_MSB periods; in the next half period c3 is high
//                and ~Delay_x adds the first y elements.
//   D_HALF = 1 : pwm = c1 | c3 | (Delay_x & c2)
//                c1|c3 reach half a period past D_MSB*T; Delay_x & c2 adds y
//                elements of the following low half period.
// These two follow the signal connections of the document's output-logic
// figure; the gate functions are derived here from the timing above.
// A third branch handles D_MSB = 0, where c1 and c3 never open:
//   D_HALF = 0 : pwm = c2 & ~c4 & ~Delay_x
//   D_HALF = 1 : pwm = c2 & (~c4 | Delay_x)
// The document only says that this case needs a small modification; this
// form is this design's. D_MSB = 2**M_BITS-1 needs no special branch here
// because the coarse windows saturate instead of wrapping. An inactive phase
// (active = 0) is held low. Purely combinational.
module output_logic
  import hrdpwm_pkg::*;
#(
  parameter int unsigned M_BITS = 4
) (
  input  cmp_t              cmp,
  input  logic              delay_x,
  input  logic [M_BITS-1:0] d_msb,
  input  logic              d_half,
  input  logic              active,
  output logic              pwm
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    if (!active)
      pwm = 1'b0;
    else if (d_msb == '0)
      pwm = d_half ? (cmp.c2 & (~cmp.c4 | delay_x))
                   : (cmp.c2 & ~cmp.c4 & ~delay_x);
    else
      pwm = d_half ? (cmp.c1 | cmp.c3 | (delay_x & cmp.c2))
                   : (cmp.c1 | (~delay_x & cmp.c3));
  end

endmodule

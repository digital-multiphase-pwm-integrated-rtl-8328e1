// comparison_logic -- coarse, clock-based part of one phase.
//
// The phase's position in its own switching cycle is
//   r = (counter + d_ph) mod N_sw,
// which is 0 in the clk_base period that opens the phase's cycle. The block
// compares r with the coarse duty D_MSB and gives four windows:
//   cmp.c1 : r_p <  D_MSB   (D_MSB periods from the cycle start)
//   cmp.c2 : r_p <= D_MSB   (one period longer)
//   cmp.c3 : r_n <  D_MSB   (as c1, but on counter_n: half a period later)
//   cmp.c4 : r_n <= D_MSB   (as c2, half a period later)
// where r_p uses counter_p and r_n uses counter_n. A D_MSB of N_sw or more
// keeps every window open, which gives a 100 % duty cycle.
//
// The four comparisons are those of the document's comparison block, which
// prints them as D_MSB - r > 1 and D_MSB - r > 0 on a count that trails
// the cycle position by one; written on the position itself they are the
// thresholds above, which give the window lengths the document states
// (c1 high until the counter reaches D_MSB, c2 one period more).
// Combinational: the inputs are the registered counters and commands.
module comparison_logic
  import hrdpwm_pkg::*;
#(
  parameter int unsigned M_BITS = 4
) (
  input  logic [M_BITS-1:0] d_msb,
  input  logic [M_BITS-1:0] counter_p,
  input  logic [M_BITS-1:0] counter_n,
  input  logic [M_BITS:0]   nsw_p,      // N_sw for the counter_p comparisons
  input  logic [M_BITS-1:0] dph_p,
  input  logic [M_BITS:0]   nsw_n,      // N_sw for the counter_n comparisons
  input  logic [M_BITS-1:0] dph_n,
  output cmp_t              cmp
);
  timeunit 1ps;
  timeprecision 1ps;

  // (a + b) mod n for a, b < n.
  function automatic logic [M_BITS:0] wrap(input logic [M_BITS-1:0] a,
                                           input logic [M_BITS-1:0] b,
                                           input logic [M_BITS:0]   n);
    logic [M_BITS+1:0] s;
    s = (M_BITS+2)'(a) + (M_BITS+2)'(b);
    if (s >= (M_BITS+2)'(n)) s = s - (M_BITS+2)'(n);
    return s[M_BITS:0];
  endfunction

  logic [M_BITS:0] r_p, r_n;

  always_comb begin
    r_p    = wrap(counter_p, dph_p, nsw_p);
    r_n    = wrap(counter_n, dph_n, nsw_n);
    cmp.c1 = r_p <  {1'b0, d_msb};
    cmp.c2 = r_p <= {1'b0, d_msb};
    cmp.c3 = r_n <  {1'b0, d_msb};
    cmp.c4 = r_n <= {1'b0, d_msb};
  end

endmodule

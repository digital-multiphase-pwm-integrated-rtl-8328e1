// governing_block -- synchronises the phases and decides when commands are
// sampled.
//
// From the registered switching-cycle length N_sw and number of active
// phases N_ph it derives:
//   * rst_freq   : high while counter_p = N_sw-1, so the main counter wraps
//                  after N_sw clk_base periods (f_sw = f_b / N_sw);
//   * cntrl      : one strobe per counter value (cntrl[k] high while
//                  counter_p = k), dividing the switching cycle into N_sw
//                  sections;
//   * load_cfg   : samples new N_sw / N_ph on the edge that starts phase 1's
//                  cycle (cntrl[N_sw-1]);
//   * load_duty  : samples phase x's duty command on the edge that starts
//                  phase x's cycle, i.e. while counter_p is one count before
//                  S_x = (x-1) * N_sw / N_ph, so each command is renewed
//                  at the rising edge of its own PWM pulse and commands
//                  arrive N_ph times per switching cycle;
//   * dph_p      : the shift d_ph = (N_sw / N_ph) * c of each phase, added
//                  to the counter by its comparison block. Phase x >= 2
//                  takes c = N_ph - (x-1), so that phase x starts
//                  (x-1) * 360 / N_ph degrees after phase 1; phase 1 takes 0
//                  (its d_ph outputs are constant 0, kept so that every
//                  phase has the same interface).
//   * nsw_n/dph_n: the same N_sw and d_ph taken over on the falling edge, for
//                  use with counter_n, so a change of N_sw or N_ph reaches
//                  the half-shifted comparisons together with counter_n.
//   * active     : phase x is driven only if x <= N_ph (phase shedding).
//
// nsw_q is M_BITS wide; the value 0 stands for 2**M_BITS. nph_q values of 0
// or above N_PH are taken as 1 and N_PH. N_sw should be a multiple of N_ph.
// The strobe positions, the encoding of N_sw and the order of the phases
// are this design's choices; the document fixes only that updates happen
// at the start of each phase's cycle. Combinational except the falling-edge
// copies, which rst (asynchronous, active high) sets to N_sw = 2**M_BITS and
// d_ph = 0. Two assertions check the count range and that N_sw is a
// multiple of N_ph.
module governing_block #(
  parameter int unsigned M_BITS = 4,
  parameter int unsigned N_PH   = 4,
  parameter int unsigned PH_W   = $clog2(N_PH + 1)
) (
  input  logic                 clk_base,
  input  logic                 rst,
  input  logic [M_BITS-1:0]    counter_p,
  input  logic [M_BITS-1:0]    nsw_q,              // registered N_sw field
  input  logic [PH_W-1:0]      nph_q,              // registered N_ph
  output logic                 rst_freq,
  output logic [2**M_BITS-1:0] cntrl,
  output logic                 load_cfg,
  output logic [N_PH-1:0]      load_duty,
  output logic [N_PH-1:0]      active,
  output logic [M_BITS:0]      nsw_p,              // N_sw as a number
  output logic [M_BITS-1:0]    dph_p [N_PH],
  output logic [M_BITS:0]      nsw_n,
  output logic [M_BITS-1:0]    dph_n [N_PH]
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [PH_W-1:0]   nph;
  logic [M_BITS:0]   step;          // N_sw / N_ph, clock periods per phase
  logic [M_BITS-1:0] last;          // N_sw - 1

  always_comb begin
    if (nph_q == '0)                     nph = PH_W'(1);
    else if (32'(nph_q) > N_PH)          nph = PH_W'(N_PH);
    else                                 nph = nph_q;

    nsw_p    = (nsw_q == '0) ? (M_BITS+1)'(2**M_BITS) : {1'b0, nsw_q};
    last     = M_BITS'(nsw_p - 1'b1);
    step     = nsw_p / (M_BITS+1)'(nph);
    rst_freq = (counter_p == last);
    load_cfg = rst_freq;

    for (int k = 0; k < 2**M_BITS; k++) begin
      cntrl[k] = (32'(counter_p) == k);
    end

    for (int i = 0; i < N_PH; i++) begin
      logic [M_BITS:0] start;       // S_x, counter value that opens phase x
      logic [M_BITS-1:0] prev_cnt;    // the count one before S_x
      active[i] = (i < 32'(nph));
      start     = (M_BITS+1)'(i) * step;
      prev_cnt  = (start == '0) ? last : M_BITS'(start - 1'b1);
      dph_p[i]  = (i == 0 || !active[i]) ? '0
                : M_BITS'(step * ((M_BITS+1)'(nph) - (M_BITS+1)'(i)));
      load_duty[i] = active[i] && cntrl[prev_cnt];
    end
  end

  // Rules of the command interface: the count never leaves the switching
  // cycle, and N_sw is a whole multiple of N_ph so that every phase starts
  // on a clk_base edge.
  a_count_in_cycle: assert property (@(posedge clk_base) disable iff (rst)
                                     counter_p <= last)
    else $error("counter_p beyond N_sw - 1");
  a_nsw_multiple: assert property (@(posedge clk_base) disable iff (rst)
                                   nsw_p % (M_BITS+1)'(nph) == '0)
    else $error("N_sw is not a multiple of N_ph");

  always_ff @(negedge clk_base or posedge rst) begin
    if (rst) begin
      nsw_n <= (M_BITS+1)'(2**M_BITS);
      for (int i = 0; i < N_PH; i++) dph_n[i] <= '0;
    end else begin
      nsw_n <= nsw_p;
      for (int i = 0; i < N_PH; i++) dph_n[i] <= dph_p[i];
    end
  end

endmodule

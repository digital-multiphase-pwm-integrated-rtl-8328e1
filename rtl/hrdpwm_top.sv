// hrdpwm_top -- multiphase high-resolution DPWM driven by one delay line.
//
// One ring oscillator of N_DE = 2**L_BITS delay elements makes the master
// clock clk_base and all fine delays. A shared main counter, the governing
// block and the command registers run on clk_base; per phase a comparison
// block makes the coarse windows and an output block adds the fine part
// taken from the phase's tap of the shared line (mux_array). The on-time of
// phase x is D_x * t_de, where D_x = {D_MSB, D_HALF, D_LSB} is its
// (M_BITS + 1 + L_BITS)-bit duty command; the switching period is
// N_sw * 2 * N_DE * t_de and phase x starts (x-1)/N_ph of a period after
// phase 1.
//
// Interface (all commands are sampled on clk_base rising edges):
//   rst      asynchronous, active high; also stops the ring. Hold it for at
//            least N_DE * t_de so the delay line is flushed.
//   nsw_in   switching-cycle length in clk_base periods (0 means
//            2**M_BITS); taken at the start of phase 1's cycle.
//   nph_in   number of active phases, 1 .. N_PH; taken with nsw_in. Phases
//            above it are held low.
//   duty_in  duty command of each phase; taken at the start of that
//            phase's cycle, so commands arrive N_ph times per period.
//   pwm      PWM outputs.
//   clk_base, cntrl, counter_p: the time base, the section strobes and the
//            shared count, brought out for the controller that feeds the
//            commands and samples the converter.
// Defaults are those of the fabricated four-phase, 13-bit module.
module hrdpwm_top
  import hrdpwm_pkg::*;
#(
  parameter int unsigned M_BITS  = hrdpwm_pkg::DEF_M_BITS,
  parameter int unsigned L_BITS  = hrdpwm_pkg::DEF_L_BITS,
  parameter int unsigned N_PH    = hrdpwm_pkg::DEF_N_PHASES,
  parameter int unsigned T_DE_PS = 200,
  parameter int unsigned D_W     = M_BITS + 1 + L_BITS,
  parameter int unsigned PH_W    = $clog2(N_PH + 1)
) (
  input  logic                 rst,
  input  logic [M_BITS-1:0]    nsw_in,
  input  logic [PH_W-1:0]      nph_in,
  input  logic [D_W-1:0]       duty_in [N_PH],
  output logic [N_PH-1:0]      pwm,
  output logic                 clk_base,
  output logic [2**M_BITS-1:0] cntrl,
  output logic [M_BITS-1:0]    counter_p
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_DE = 2**L_BITS;

  logic [N_DE-1:0]   de;
  logic [M_BITS-1:0] counter_n;
  logic              rst_freq, load_cfg;
  logic [N_PH-1:0]   load_duty, active, delay_x;
  logic [M_BITS-1:0] nsw_q;
  logic [PH_W-1:0]   nph_q;
  logic [D_W-1:0]    duty_q [N_PH];
  logic [M_BITS:0]   nsw_p, nsw_n;
  logic [M_BITS-1:0] dph_p [N_PH];
  logic [M_BITS-1:0] dph_n [N_PH];
  logic [L_BITS-1:0] d_lsb [N_PH];

  ring_oscillator #(.N_DE(N_DE), .T_DE_PS(T_DE_PS)) u_ring (
    .en(~rst), .clk_base(clk_base), .de(de)
  );

  main_counter #(.M_BITS(M_BITS)) u_counter (
    .clk_base, .rst, .rst_freq, .counter_p, .counter_n
  );

  governing_block #(.M_BITS(M_BITS), .N_PH(N_PH), .PH_W(PH_W)) u_gov (
    .clk_base, .rst, .counter_p, .nsw_q, .nph_q, .rst_freq, .cntrl,
    .load_cfg, .load_duty, .active, .nsw_p, .dph_p, .nsw_n, .dph_n
  );

  command_registers #(.M_BITS(M_BITS), .D_BITS(D_W), .N_PH(N_PH), .PH_W(PH_W)) u_regs (
    .clk_base, .rst, .load_cfg, .load_duty, .nsw_in, .nph_in, .duty_in,
    .nsw_q, .nph_q, .duty_q
  );

  always_comb begin
    for (int i = 0; i < N_PH; i++) d_lsb[i] = duty_q[i][L_BITS-1:0];
  end

  mux_array #(.L_BITS(L_BITS), .N_PH(N_PH)) u_mux (
    .de(de), .sel(d_lsb), .delay_x(delay_x)
  );

  for (genvar i = 0; i < N_PH; i++) begin : g_phase
    cmp_t cmp;

    comparison_logic #(.M_BITS(M_BITS)) u_cmp (
      .d_msb(duty_q[i][D_W-1 -: M_BITS]), .counter_p, .counter_n,
      .nsw_p, .dph_p(dph_p[i]), .nsw_n, .dph_n(dph_n[i]), .cmp(cmp)
    );

    output_logic #(.M_BITS(M_BITS)) u_out (
      .cmp(cmp), .delay_x(delay_x[i]), .d_msb(duty_q[i][D_W-1 -: M_BITS]),
      .d_half(duty_q[i][L_BITS]), .active(active[i]), .pwm(pwm[i])
    );
  end

endmodule

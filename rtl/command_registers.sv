// command_registers -- the sampling registers in front of the modulator:
// switching-cycle length N_sw[n], phase count N_ph[n] and one duty command
// D_x[n] per phase.
//
// All registers are clocked by clk_base. N_sw and N_ph load when load_cfg is
// high; D_x loads when load_duty[x] is high. The governing block raises
// these strobes one count before the edge that opens the corresponding
// cycle, so a new value takes effect exactly at the start of a cycle and
// stays fixed for the whole of it. rst (asynchronous, active high) sets
// N_sw to 2**M_BITS (field value 0), N_ph to 1 and every duty command to 0;
// these reset values are this design's choice.
module command_registers #(
  parameter int unsigned M_BITS = 4,
  parameter int unsigned D_BITS = 13,
  parameter int unsigned N_PH   = 4,
  parameter int unsigned PH_W   = $clog2(N_PH + 1)
) (
  input  logic              clk_base,
  input  logic              rst,
  input  logic              load_cfg,
  input  logic [N_PH-1:0]   load_duty,
  input  logic [M_BITS-1:0] nsw_in,
  input  logic [PH_W-1:0]   nph_in,
  input  logic [D_BITS-1:0] duty_in [N_PH],
  output logic [M_BITS-1:0] nsw_q,
  output logic [PH_W-1:0]   nph_q,
  output logic [D_BITS-1:0] duty_q  [N_PH]
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk_base or posedge rst) begin
    if (rst) begin
      nsw_q <= '0;
      nph_q <= PH_W'(1);
    end else if (load_cfg) begin
      nsw_q <= nsw_in;
      nph_q <= nph_in;
    end
  end

  for (genvar i = 0; i < N_PH; i++) begin : g_duty
    always_ff @(posedge clk_base or posedge rst) begin
      if (rst)               duty_q[i] <= '0;
      else if (load_duty[i]) duty_q[i] <= duty_in[i];
    end
  end

endmodule

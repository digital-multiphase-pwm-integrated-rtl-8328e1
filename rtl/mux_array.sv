// mux_array -- one 2**L_BITS-to-1 multiplexer per phase on the shared
// delay line.
//
// Phase x selects tap de[D_x_LSB], a copy of clk_base delayed by D_x_LSB
// delay elements, and passes it on as Delay_x. Every phase draws from the
// same line, so any drift of the line moves all phases together. Purely
// combinational; the select comes from the phase's registered duty command.
module mux_array #(
  parameter int unsigned L_BITS = 8,
  parameter int unsigned N_PH   = 4
) (
  input  logic [2**L_BITS-1:0] de,               // delay-line taps
  input  logic [L_BITS-1:0]    sel [N_PH],       // D_x_LSB of each phase
  output logic [N_PH-1:0]      delay_x           // Delay_x of each phase
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    for (int i = 0; i < N_PH; i++) begin
      delay_x[i] = de[sel[i]];
    end
  end

endmodule

// ring_oscillator -- BEHAVIOURAL MODEL (not synthesizable) of the shared
// delay line that is both the master time base and the source of the fine
// delays.
//
// The real part is a chain of N_DE standard-cell buffers closed into a ring
// by an inverter. Here every element is a continuous assignment with a
// transport delay of T_DE_PS picoseconds. The node that feeds the chain is
// clk_base and is also tap de[0]; tap de[k] is clk_base delayed by k
// elements. The inverting element that closes the ring is counted as one of
// the N_DE elements, so the ring toggles every N_DE * t_de and
//   f_b = 1 / (2 * N_DE * t_de).
// With N_DE = 256 and t_de = 200 ps clk_base runs at 9.77 MHz (102.4 ns).
//
// Interface: en = 0 stops the ring and flushes the line to 0 after N_DE
// elements' worth of delay; on en = 1 clk_base rises one element later.
// The enable is this model's own addition, used to start the ring from a
// known state. The ring is a combinational loop on purpose: synthesis tools
// report it as a logic loop, and the real line is built from placed cells,
// not synthesized from this model.
module ring_oscillator #(
  parameter int unsigned N_DE    = 256,  // delay elements per half period
  parameter int unsigned T_DE_PS = 200   // delay of one element, ps
) (
  input  logic            en,
  output logic            clk_base,
  output logic [N_DE-1:0] de
);
  timeunit 1ps;
  timeprecision 1ps;

  // Inverting element that closes the ring, gated by the enable.
  assign #(T_DE_PS) clk_base = en & ~de[N_DE-1];

  assign de[0] = clk_base;

  for (genvar k = 1; k < N_DE; k++) begin : g_chain
    assign #(T_DE_PS) de[k] = de[k-1];
  end

endmodule

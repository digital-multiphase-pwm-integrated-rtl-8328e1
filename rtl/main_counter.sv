// main_counter -- the shared M_BITS-bit counter of all phases.
//
// counter_p counts clk_base rising edges. rst_freq, raised by the governing
// block while the count stands at N_sw - 1, makes the next rising edge
// return it to 0, so the counter runs 0 .. N_sw-1 once per switching cycle.
// counter_n is the same count taken over on the falling edge, i.e. half a
// clk_base period later; the half-shifted comparisons use it.
//
// rst is asynchronous and active high. It clears counter_p and sets
// counter_n to the last count of a 2**M_BITS cycle (all ones), the value
// counter_n would hold just before the first switching cycle. Making the
// clear synchronous to clk_base and the reset value of counter_n are this
// design's choices.
module main_counter #(
  parameter int unsigned M_BITS = 4
) (
  input  logic              clk_base,
  input  logic              rst,
  input  logic              rst_freq,
  output logic [M_BITS-1:0] counter_p,
  output logic [M_BITS-1:0] counter_n
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk_base or posedge rst) begin
    if (rst)           counter_p <= '0;
    else if (rst_freq) counter_p <= '0;
    else               counter_p <= counter_p + 1'b1;
  end

  always_ff @(negedge clk_base or posedge rst) begin
    if (rst) counter_n <= '1;
    else     counter_n <= counter_p;
  end

endmodule

// tb_ring_oscillator -- checks the delay-line model at its default size
// (256 elements of 200 ps): clk_base must rise one element after the
// enable, toggle every 256 elements (102.4 ns period) and every tap de[k]
// must follow clk_base by exactly k elements. Disabling the ring must stop
// clk_base low.
module tb_ring_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NDE = 256;
  localparam int TDE = 200;

  logic           en;
  logic           clk_base;
  logic [NDE-1:0] de;

  ring_oscillator dut (.en, .clk_base, .de);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  time t_en, t_rise[$], t_fall[$];
  always @(posedge clk_base) t_rise.push_back($time);
  always @(negedge clk_base) t_fall.push_back($time);

  // rising edges of a few taps, first period only
  localparam int NT = 5;
  int  taps [NT] = '{1, 2, 17, 128, 255};
  time tap_rise [NT];
  for (genvar j = 0; j < NT; j++) begin : g_tap
    initial begin
      @(posedge en);
      @(posedge de[taps[j]]);
      tap_rise[j] = $time;
    end
  end

  initial begin
    en = 0;
    #(100_000);            // flush the line
    t_rise.delete();
    t_fall.delete();
    en = 1;
    t_en = $time;
    #(5 * 2 * NDE * TDE + 1000);
    check(t_rise.size() >= 5, "five rising edges");
    check(t_rise[0] == t_en + TDE, "first rise one element after enable");
    for (int k = 1; k < 5; k++)
      check(t_rise[k] - t_rise[k-1] == 2 * NDE * TDE, $sformatf("period %0d", k));
    for (int k = 0; k < 4; k++)
      check(t_fall[k] - t_rise[k] == NDE * TDE, $sformatf("high time %0d", k));
    for (int j = 0; j < NT; j++)
      check(tap_rise[j] - t_rise[0] == taps[j] * TDE, $sformatf("tap %0d delay", taps[j]));
    en = 0;
    #(3 * NDE * TDE);
    check(clk_base == 1'b0, "stopped low");
    check(de == '0, "line flushed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

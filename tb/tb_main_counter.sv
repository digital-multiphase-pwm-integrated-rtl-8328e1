// tb_main_counter -- drives clk_base (10 ns) and rst_freq from its own
// wrap model for cycle lengths 16, 8, 5, 12 and 1, and checks after every
// rising edge that counter_p follows the model and after every falling
// edge that counter_n has taken over counter_p. Also checks the reset
// values (counter_p = 0, counter_n = all ones).
module tb_main_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int M = 4;

  logic         clk_base = 0;
  logic         rst;
  logic         rst_freq;
  logic [M-1:0] counter_p, counter_n;

  main_counter dut (.clk_base, .rst, .rst_freq, .counter_p, .counter_n);

  int checks = 0, failures = 0;
  int model = 0, len = 16;

  always #5000 clk_base = ~clk_base;

  // rst_freq as the governing block makes it: high on the last count
  assign rst_freq = (int'(counter_p) == len - 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  initial begin
    rst = 0;
    #1;
    rst = 1;
    #12000;
    check(counter_p == 0, "reset counter_p");
    check(counter_n == '1, "reset counter_n");
    @(negedge clk_base);
    rst = 0;
    for (int s = 0; s < 5; s++) begin
      int l_tab [5] = '{16, 8, 5, 12, 1};
      len = l_tab[s];
      repeat (3 * len) begin
        @(posedge clk_base);
        model = (model >= len - 1) ? 0 : model + 1;
        #1000;
        check(int'(counter_p) == model, $sformatf("counter_p len=%0d exp=%0d got=%0d", len, model, counter_p));
        @(negedge clk_base);
        #1000;
        check(counter_n == counter_p, "counter_n follows counter_p");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

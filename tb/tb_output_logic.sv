// tb_output_logic -- replays one switching cycle tick by tick with a
// model time base: half a clk_base period is K = 8 ticks (one tick = one
// delay element), N_sw = 8. For every D_MSB of 0..15, both values of the
// half-period bit and every fine delay y of 0..7, the testbench builds
// clk_base, Delay_x (clk_base delayed by y ticks) and the four coarse
// windows from their definitions, and checks that pwm is high exactly for
// the first D_MSB*2K + D_HALF*K + y ticks of the cycle (the whole cycle
// when D_MSB >= N_sw). An inactive phase must stay low.
module tb_output_logic;
  timeunit 1ps;
  timeprecision 1ps;
  import hrdpwm_pkg::*;

  localparam int M   = 4;
  localparam int K   = 8;
  localparam int NSW = 8;
  localparam int C   = NSW * 2 * K;

  cmp_t         cmp;
  logic         delay_x, d_half, active, pwm;
  logic [M-1:0] d_msb;

  output_logic dut (.*);

  int checks = 0, failures = 0;

  function automatic bit clk_at(input int t);
    return ((t + C) % (2 * K)) < K;
  endfunction

  initial begin
    active = 1;
    for (int dm = 0; dm < 2**M; dm++) begin
      for (int b = 0; b < 2; b++) begin
        for (int y = 0; y < K; y++) begin
          int high, expect_on;
          bit shape_ok;
          expect_on = (dm >= NSW) ? C : dm * 2 * K + b * K + y;
          high = 0;
          shape_ok = 1;
          d_msb = M'(dm);
          d_half = b[0];
          for (int t = 0; t < C; t++) begin
            int rp, rn;
            rp = (t / (2 * K)) % NSW;
            rn = ((t - K + C) / (2 * K)) % NSW;
            cmp.c1 = rp < dm;
            cmp.c2 = rp < dm + 1;
            cmp.c3 = rn < dm;
            cmp.c4 = rn < dm + 1;
            delay_x = clk_at(t - y);
            #1;
            if (pwm) high++;
            if (pwm != (t < expect_on)) shape_ok = 0;
          end
          checks++;
          if (!shape_ok || high != expect_on) begin
            failures++;
            $display("FAIL D_MSB=%0d half=%0d y=%0d: high %0d ticks, expected %0d", dm, b, y, high, expect_on);
          end
        end
      end
    end
    // inactive phase
    active = 0;
    d_msb = M'(3);
    d_half = 1;
    cmp = '1;
    delay_x = 1;
    #1;
    checks++;
    if (pwm) begin failures++; $display("FAIL inactive phase driven"); end
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

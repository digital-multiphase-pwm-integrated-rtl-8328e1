// tb_hrdpwm_top -- end-to-end test of the multiphase HR-DPWM at its default
// size (4 phases, 13-bit commands, 256 delay elements of 200 ps).
//
// The testbench keeps its own model of the switching cycle: it counts
// clk_base rising edges, wraps after N_sw of them, takes N_sw / N_ph at the
// wrap and opens a measurement window for phase x at count
// (x-1) * N_sw / N_ph with the duty command present at that edge. Every
// PWM output is sampled once per delay element, half an element after the
// line's edges, so the number of high samples in a window is the on-time
// in units of t_de. Each window must hold one contiguous pulse that starts
// on the window's first sample and lasts D samples (N_sw * 2 * 256 when
// D_MSB >= N_sw); inactive phases must stay low. Windows cut short by a
// change of N_sw or N_ph are not judged.
//
// Scenarios: the duty settings of the four-phase and two-phase
// measurements (N_sw = 16), the two-phase N_sw = 8 example, corner cases
// (D = 0, D_MSB = 0 both halves, D_MSB = 15, saturation), a duty ramp of one
// LSB per cycle for the linearity check, and random commands and phase
// counts changed cycle by cycle. The switching period must be
// N_sw * 2 * 256 * t_de. Each mechanism is counted and must occur.
module tb_hrdpwm_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int M    = 4;
  localparam int L    = 8;
  localparam int N    = 4;
  localparam int TDE  = 200;
  localparam int NDE  = 2**L;
  localparam int PH_W = $clog2(N + 1);
  localparam int D_W  = M + 1 + L;

  logic              rst;
  logic [M-1:0]      nsw_in;
  logic [PH_W-1:0]   nph_in;
  logic [D_W-1:0]    duty_in [N];
  logic [N-1:0]      pwm;
  logic              clk_base;
  logic [2**M-1:0]   cntrl;
  logic [M-1:0]      counter_p;

  hrdpwm_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- reference model of the switching cycle ----------------
  int pos = 0, nsw_m = 2**M, nph_m = 1;
  bit started = 0;
  event cyc_ev;

  bit win_open [N];
  bit win_valid[N];
  int win_exp  [N];
  int win_d    [N];
  int win_cnt  [N];
  int win_first[N];
  int win_last [N];
  int win_idx  [N];
  int last_d   [N];
  int inact_cnt[N];
  bit inact_chk[N];

  // mechanism counters
  int n_msb0, n_half0, n_half1, n_sat, n_zero, n_update, n_nph_chg, n_nsw_chg;
  int n_inactive, n_windows, n_period;
  time last_wrap = 0;
  int  last_nsw = 0;

  function automatic int nsw_of(input logic [M-1:0] f);
    return (f == 0) ? 2**M : int'(f);
  endfunction

  function automatic int nph_of(input logic [PH_W-1:0] f);
    return (f == 0) ? 1 : (int'(f) > N ? N : int'(f));
  endfunction

  task automatic close_window(input int i);
    if (win_open[i] && win_valid[i]) begin
      bit ok;
      ok = (win_cnt[i] == win_exp[i]);
      if (win_exp[i] > 0)
        ok = ok && win_first[i] == 0 && (win_last[i] - win_first[i] + 1 == win_cnt[i]);
      checks++;
      n_windows++;
      if (!ok) begin
        failures++;
        $display("FAIL phase %0d D=%0d nsw=%0d nph=%0d: on=%0d exp=%0d first=%0d last=%0d @%0t",
                 i+1, win_d[i], nsw_m, nph_m, win_cnt[i], win_exp[i], win_first[i],
                 win_last[i], $time);
      end else begin
        int msb;
        msb = win_d[i] >> (L + 1);
        if (win_d[i] == 0)               n_zero++;
        else if (msb >= nsw_m)           n_sat++;
        else if (msb == 0)               n_msb0++;
        else if (win_d[i][L] == 1'b0)    n_half0++;
        else                             n_half1++;
      end
    end
    win_open[i] = 0;
  endtask

  always @(posedge clk_base) begin
    if (started) begin
      bit wrap, cfg_chg;
      wrap = (pos == nsw_m - 1);
      cfg_chg = 0;
      if (wrap) begin
        int nn, np;
        pos = 0;
        // switching period = N_sw clk_base periods of 2 * N_DE elements
        if (last_nsw == nsw_m) begin
          checks++;
          n_period++;
          if ($time - last_wrap != time'(nsw_m * 2 * NDE * TDE)) begin
            failures++;
            $display("FAIL switching period %0t for N_sw=%0d", $time - last_wrap, nsw_m);
          end
        end
        last_wrap = $time;
        last_nsw  = nsw_m;
        // inactive phases must have stayed low all the last cycle
        for (int i = 0; i < N; i++) begin
          if (inact_chk[i]) begin
            checks++;
            n_inactive++;
            if (inact_cnt[i] != 0) begin
              failures++;
              $display("FAIL inactive phase %0d high for %0d samples @%0t", i+1, inact_cnt[i], $time);
            end
          end
        end
        nn = nsw_of(nsw_in);
        np = nph_of(nph_in);
        if (nn != nsw_m) begin cfg_chg = 1; n_nsw_chg++; end
        if (np != nph_m) begin cfg_chg = 1; n_nph_chg++; end
        if (cfg_chg) last_nsw = 0;
        nsw_m = nn;
        nph_m = np;
        for (int i = 0; i < N; i++) begin
          inact_cnt[i] = 0;
          inact_chk[i] = (i >= nph_m);
          if (cfg_chg || i >= nph_m) begin
            win_valid[i] = 0;
            close_window(i);
          end
        end
        -> cyc_ev;
      end else begin
        pos++;
      end
      for (int i = 0; i < nph_m; i++) begin
        if (pos == i * (nsw_m / nph_m)) begin
          int d;
          close_window(i);
          d = int'(duty_in[i]);
          if (d != last_d[i]) n_update++;
          last_d[i]    = d;
          win_open[i]  = 1;
          win_valid[i] = 1;
          win_d[i]     = d;
          win_exp[i]   = ((d >> (L + 1)) >= nsw_m) ? nsw_m * 2 * NDE : d;
          win_cnt[i]   = 0;
          win_first[i] = -1;
          win_last[i]  = -1;
          win_idx[i]   = 0;
        end
      end
    end
  end

  // one sample per delay element, half an element after the line's edges
  initial begin
    wait (started);
    #(TDE / 2);
    forever begin
      for (int i = 0; i < N; i++) begin
        if (win_open[i]) begin
          if (pwm[i]) begin
            if (win_first[i] < 0) win_first[i] = win_idx[i];
            win_last[i] = win_idx[i];
            win_cnt[i]++;
          end
          win_idx[i]++;
        end
        if (inact_chk[i] && pwm[i]) inact_cnt[i]++;
      end
      #(TDE);
    end
  end

  // ------------------------------ stimulus ---------------------------------
  task automatic set_cfg(input int nsw, input int nph);
    @(negedge clk_base);
    nsw_in = M'(nsw % (2**M));
    nph_in = PH_W'(nph);
  endtask

  task automatic set_duty(input int d0, input int d1, input int d2, input int d3);
    @(negedge clk_base);
    duty_in[0] = D_W'(d0);
    duty_in[1] = D_W'(d1);
    duty_in[2] = D_W'(d2);
    duty_in[3] = D_W'(d3);
  endtask

  task automatic cycles(input int n);
    repeat (n) @(cyc_ev);
  endtask

  initial begin
    rst    = 0;
    #1;
    rst    = 1;
    nsw_in = '0;
    nph_in = PH_W'(1);
    for (int i = 0; i < N; i++) begin
      duty_in[i] = '0;
      last_d[i] = 0;
      win_open[i] = 0;
      win_valid[i] = 0;
      inact_cnt[i] = 0;
      inact_chk[i] = 0;
    end
    // hold reset longer than the line takes to flush, release on the element grid
    #(100_000);
    rst = 0;
    started = 1;

    // four phases, N_sw = 16: the two duty settings of the 4-phase measurement
    set_cfg(16, 4);
    set_duty(1012, 5300, 4320, 2182);
    cycles(4);
    set_duty(2250, 6538, 5550, 3428);
    cycles(3);
    // two phases, N_sw = 16, commands 116 apart
    set_cfg(16, 2);
    set_duty(7236, 7352, 0, 0);
    cycles(4);
    // two phases, N_sw = 8: D_MSB 5 (upper half) and 3 (lower half)
    set_cfg(8, 2);
    set_duty(5*512 + 256 + 100, 3*512 + 40, 0, 0);
    cycles(4);
    // corner cases at N_sw = 16
    set_cfg(16, 4);
    set_duty(0, 300, 256 + 144, 8191);
    cycles(4);
    set_duty(1, 256, 511, 512);
    cycles(3);
    // saturation at N_sw = 8
    set_cfg(8, 4);
    set_duty(8191, 4096, 4095, 1);
    cycles(4);
    // a single phase, short cycle
    set_cfg(4, 1);
    set_duty(3*512 + 256 + 255, 100, 100, 100);
    cycles(4);
    // linearity ramp: one LSB per cycle across the half and whole period steps
    set_cfg(16, 4);
    for (int k = 0; k < 24; k++) begin
      set_duty(500 + k, 244 + k, 1012 + k, 4090 + k);
      cycles(1);
    end
    // random commands, changed every half period, and random configurations
    for (int r = 0; r < 40; r++) begin
      int np, ns;
      np = 1 << ($urandom % 3);
      if ($urandom % 4 == 0 && np == 1) np = 3;
      case (np)
        1: ns = 1 + $urandom % 16;
        2: ns = 2 * (1 + $urandom % 8);
        3: ns = 3 * (1 + $urandom % 5);
        default: ns = 4 * (1 + $urandom % 4);
      endcase
      set_cfg(ns, np);
      repeat (3) begin
        repeat (ns) begin
          @(negedge clk_base);
          for (int i = 0; i < N; i++) duty_in[i] = D_W'($urandom % (ns * 512 + 64));
        end
        cycles(1);
      end
    end
    cycles(2);

    if (n_msb0 == 0)     begin failures++; $display("FAIL no D_MSB = 0 pulse"); end
    if (n_half0 == 0)    begin failures++; $display("FAIL no lower-half pulse"); end
    if (n_half1 == 0)    begin failures++; $display("FAIL no upper-half pulse"); end
    if (n_sat == 0)      begin failures++; $display("FAIL no saturated cycle"); end
    if (n_zero == 0)     begin failures++; $display("FAIL no zero-duty cycle"); end
    if (n_update == 0)   begin failures++; $display("FAIL no duty update"); end
    if (n_nph_chg == 0)  begin failures++; $display("FAIL no phase-count change"); end
    if (n_nsw_chg == 0)  begin failures++; $display("FAIL no N_sw change"); end
    if (n_period == 0)   begin failures++; $display("FAIL no switching period measured"); end
    if (n_inactive == 0) begin failures++; $display("FAIL no shed phase checked"); end
    $display("windows=%0d msb0=%0d lower=%0d upper=%0d sat=%0d zero=%0d updates=%0d nph_changes=%0d nsw_changes=%0d shed_checks=%0d periods=%0d",
             n_windows, n_msb0, n_half0, n_half1, n_sat, n_zero, n_update, n_nph_chg,
             n_nsw_chg, n_inactive, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: far beyond the 212 us the run takes
  initial begin
    #(64'd3_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_hrdpwm_workloads -- the measured operating point of the four-phase,
// 13-bit modulator, with the element delay set to 209 ps so that
// N_sw = 16 gives the 583.5 kHz switching frequency of the silicon.
//
// 1. Frequency and phase spacing: the four phases run with
//    D = 1012/5300/4320/2182. The switching period must be
//    16 * 2 * 256 * 209 ps (f_sw = 583.5 kHz within 0.2 %), the rising
//    edges of consecutive phases must be a quarter period (90 degrees)
//    apart, and with one command per pulse the update rate is
//    4 * f_sw = 2.33 MHz.
// 2. Linearity: each phase steps its command by one LSB at a time, holding
//    each value for three switching periods, for 200 steps from 100, 1400,
//    4000 and 7800. The ramps cross a fine-to-half step, two whole-period
//    steps and a half-period step. Every on-time must be D elements, so
//    each step is exactly one element (no missing codes, no
//    non-monotonic step).
// 3. Matching: all four phases given the same command must have equal
//    on-times.
// On-times are measured by sampling the outputs once per element, half an
// element after the line's edges.
module tb_hrdpwm_workloads;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int M    = 4;
  localparam int L    = 8;
  localparam int N    = 4;
  localparam int TDE  = 209;
  localparam int NDE  = 2**L;
  localparam int PH_W = $clog2(N + 1);
  localparam int D_W  = M + 1 + L;
  localparam int NSW  = 16;
  localparam longint TSW = longint'(NSW) * 2 * NDE * TDE;

  logic              rst;
  logic [M-1:0]      nsw_in;
  logic [PH_W-1:0]   nph_in;
  logic [D_W-1:0]    duty_in [N];
  logic [N-1:0]      pwm;
  logic              clk_base;
  logic [2**M-1:0]   cntrl;
  logic [M-1:0]      counter_p;

  hrdpwm_top #(.T_DE_PS(TDE)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // ------------- per-phase pulse measurement by sampling -------------
  bit  sampling = 0;
  int  run_len [N];        // length of the current high run, in samples
  int  last_on [N];        // length of the last completed high run
  int  n_pulses[N];
  time rise_t  [N];        // time of the last rising edge seen by sampling
  bit  prev    [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      run_len[i] = 0; last_on[i] = 0; n_pulses[i] = 0; prev[i] = 0; rise_t[i] = 0;
    end
    wait (sampling);
    #(TDE / 2);
    forever begin
      for (int i = 0; i < N; i++) begin
        if (pwm[i]) begin
          if (!prev[i]) rise_t[i] = $time;
          run_len[i]++;
        end else if (prev[i]) begin
          last_on[i] = run_len[i];
          run_len[i] = 0;
          n_pulses[i]++;
        end
        prev[i] = pwm[i];
      end
      #(TDE);
    end
  end

  // phase 1's cycle starts: the counter wraps to 0
  event wrap_ev;
  time  wrap_t [$];
  always @(posedge clk_base) if (!rst && counter_p == 0) begin
    wrap_t.push_back($time);
    -> wrap_ev;
  end

  task automatic set_duty(input int d0, input int d1, input int d2, input int d3);
    @(negedge clk_base);
    duty_in[0] = D_W'(d0);
    duty_in[1] = D_W'(d1);
    duty_in[2] = D_W'(d2);
    duty_in[3] = D_W'(d3);
  endtask

  initial begin
    int d_set [N];
    rst = 0;
    #1;
    rst = 1;
    nsw_in = '0;                     // N_sw = 16
    nph_in = PH_W'(N);
    for (int i = 0; i < N; i++) duty_in[i] = '0;
    #(100_000);
    rst = 0;
    sampling = 1;

    // ---- 1. frequency, phase spacing, update rate ----
    d_set = '{1012, 5300, 4320, 2182};
    set_duty(d_set[0], d_set[1], d_set[2], d_set[3]);
    repeat (3) @(wrap_ev);
    begin
      time t0, t1, r [N];
      real fsw, upd;
      t0 = wrap_t[wrap_t.size()-1];
      // wait until every phase has risen and fallen in this cycle
      @(wrap_ev);
      t1 = wrap_t[wrap_t.size()-1];
      check(t1 - t0 == time'(TSW), $sformatf("switching period %0t", t1 - t0));
      fsw = 1.0e12 / real'(t1 - t0);
      check(fsw > 582.3e3 && fsw < 584.7e3, $sformatf("f_sw %0.1f Hz", fsw));
      upd = fsw * N;
      check(upd > 2.32e6 && upd < 2.34e6, $sformatf("update rate %0.0f Hz", upd));
      $display("f_sw = %0.1f kHz, duty update rate = %0.3f MHz", fsw / 1.0e3, upd / 1.0e6);
      // rising edges: phase x starts (x-1)/4 of a period after phase 1
      @(wrap_ev);
      for (int i = 0; i < N; i++) r[i] = rise_t[i];
      for (int i = 1; i < N; i++) begin
        longint gap;
        gap = (longint'(r[i]) - longint'(r[i-1]) + TSW) % TSW;
        // sampled edges lie half an element after the true edge
        check(gap == TSW / N, $sformatf("phase %0d to %0d spacing %0d ps", i, i+1, gap));
      end
      for (int i = 0; i < N; i++)
        check(last_on[i] == d_set[i], $sformatf("phase %0d on-time %0d, D=%0d", i+1, last_on[i], d_set[i]));
    end

    // ---- 2. linearity ramp ----
    begin
      int base [N] = '{100, 1400, 4000, 7800};
      int errs, steps;
      int prev_on [N];
      errs = 0;
      steps = 0;
      for (int i = 0; i < N; i++) prev_on[i] = -1;
      for (int k = 0; k < 200; k++) begin
        // hold each command for three periods, so that the last completed
        // pulse of every phase was formed from it
        set_duty(base[0] + k, base[1] + k, base[2] + k, base[3] + k);
        repeat (3) @(wrap_ev);
        for (int i = 0; i < N; i++) begin
          checks++;
          if (last_on[i] != base[i] + k) begin
            failures++;
            errs++;
            $display("FAIL ramp phase %0d D=%0d on=%0d", i+1, base[i] + k, last_on[i]);
          end
          if (prev_on[i] >= 0) begin
            checks++;
            steps++;
            if (last_on[i] - prev_on[i] != 1) begin
              failures++;
              $display("FAIL ramp step phase %0d: %0d -> %0d", i+1, prev_on[i], last_on[i]);
            end
          end
          prev_on[i] = last_on[i];
        end
      end
      $display("linearity: %0d steps of one element checked, %0d on-time errors", steps, errs);
    end

    // ---- 3. matching ----
    set_duty(3333, 3333, 3333, 3333);
    repeat (3) @(wrap_ev);
    for (int i = 1; i < N; i++)
      check(last_on[i] == last_on[0] && last_on[0] == 3333,
            $sformatf("matching phase %0d: %0d vs %0d", i+1, last_on[i], last_on[0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

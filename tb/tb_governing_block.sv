// tb_governing_block -- sweeps every supported (N_sw, N_ph) pair, with
// N_sw a multiple of N_ph, over every counter value. For each phase it works
// out its start count S_x = (x-1) * N_sw / N_ph and checks that the shift
// d_ph brings (counter + d_ph) mod N_sw to 0 exactly at S_x, that the duty
// load strobe is high exactly one count before S_x, that phases above N_ph
// are inactive and never load, and that rst_freq, load_cfg and the one-hot
// cntrl strobes match the count. The falling-edge copies are checked after
// a falling edge. Out-of-range N_ph values must be clamped.
module tb_governing_block;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int M    = 4;
  localparam int N    = 4;
  localparam int PH_W = $clog2(N + 1);

  logic              clk_base = 0;
  logic              rst;
  logic [M-1:0]      counter_p;
  logic [M-1:0]      nsw_q;
  logic [PH_W-1:0]   nph_q;
  logic              rst_freq;
  logic [2**M-1:0]   cntrl;
  logic              load_cfg;
  logic [N-1:0]      load_duty, active;
  logic [M:0]        nsw_p, nsw_n;
  logic [M-1:0]      dph_p [N];
  logic [M-1:0]      dph_n [N];

  governing_block dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic sweep(input int nsw, input int nph_field, input int nph);
    nsw_q = M'(nsw % (2**M));
    nph_q = PH_W'(nph_field);
    for (int c = 0; c < nsw; c++) begin
      counter_p = M'(c);
      #1000;
      check(nsw_p == (M+1)'(nsw), "nsw_p");
      check(rst_freq == (c == nsw - 1), $sformatf("rst_freq nsw=%0d c=%0d", nsw, c));
      check(load_cfg == (c == nsw - 1), "load_cfg");
      check(cntrl == (2**M)'(1) << c, "cntrl one-hot");
      for (int i = 0; i < N; i++) begin
        int s, pre;
        if (i < nph) begin
          s   = i * nsw / nph;
          pre = (s + nsw - 1) % nsw;
          check(active[i], "active");
          check(((int'(dph_p[i]) + s) % nsw) == 0,
                $sformatf("d_ph nsw=%0d nph=%0d phase %0d got %0d", nsw, nph, i+1, dph_p[i]));
          check(load_duty[i] == (c == pre),
                $sformatf("load_duty nsw=%0d nph=%0d phase %0d c=%0d", nsw, nph, i+1, c));
        end else begin
          check(!active[i] && !load_duty[i], "inactive phase");
        end
      end
      // falling-edge copies
      clk_base = 1; #1000; clk_base = 0; #1000;
      check(nsw_n == nsw_p, "nsw_n");
      for (int i = 0; i < N; i++) check(dph_n[i] == dph_p[i], "dph_n");
    end
  endtask

  initial begin
    rst = 0;
    #1;
    rst = 1;
    counter_p = '0;
    nsw_q = '0;
    nph_q = PH_W'(1);
    #1000;
    check(nsw_n == (M+1)'(2**M), "reset nsw_n");
    rst = 0;
    for (int nph = 1; nph <= N; nph++)
      for (int nsw = nph; nsw <= 2**M; nsw += nph)
        sweep(nsw, nph, nph);
    sweep(8, 0, 1);            // 0 phases is taken as 1
    sweep(16, 7, N);           // more than N_PH is taken as N_PH
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

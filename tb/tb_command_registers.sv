// tb_command_registers -- random inputs and random load strobes on a 10 ns
// clock; after each rising edge the registers must equal a model that
// loads N_sw / N_ph on load_cfg and D_x on load_duty[x] and otherwise
// holds. Checks the reset values first.
module tb_command_registers;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int M    = 4;
  localparam int D    = 13;
  localparam int N    = 4;
  localparam int PH_W = $clog2(N + 1);

  logic            clk_base = 0;
  logic            rst;
  logic            load_cfg;
  logic [N-1:0]    load_duty;
  logic [M-1:0]    nsw_in, nsw_q;
  logic [PH_W-1:0] nph_in, nph_q;
  logic [D-1:0]    duty_in [N];
  logic [D-1:0]    duty_q  [N];

  command_registers dut (.*);

  int checks = 0, failures = 0;
  int m_nsw = 0, m_nph = 1;
  int m_d [N];

  always #5000 clk_base = ~clk_base;

  initial begin
    rst = 0;
    #1;
    rst = 1;
    load_cfg = 0;
    load_duty = '0;
    nsw_in = '0;
    nph_in = '0;
    for (int i = 0; i < N; i++) begin duty_in[i] = '0; m_d[i] = 0; end
    #12000;
    checks++;
    if (nsw_q != 0 || nph_q != 1 || duty_q[0] != 0 || duty_q[3] != 0) begin
      failures++;
      $display("FAIL reset values");
    end
    @(negedge clk_base);
    rst = 0;
    repeat (500) begin
      @(negedge clk_base);
      load_cfg  = ($urandom % 3 == 0);
      load_duty = N'($urandom);
      nsw_in    = M'($urandom);
      nph_in    = PH_W'($urandom);
      for (int i = 0; i < N; i++) duty_in[i] = D'($urandom);
      @(posedge clk_base);
      if (load_cfg) begin m_nsw = nsw_in; m_nph = nph_in; end
      for (int i = 0; i < N; i++) if (load_duty[i]) m_d[i] = duty_in[i];
      #1000;
      checks++;
      if (int'(nsw_q) != m_nsw || int'(nph_q) != m_nph) begin
        failures++;
        $display("FAIL cfg got %0d/%0d exp %0d/%0d", nsw_q, nph_q, m_nsw, m_nph);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(duty_q[i]) != m_d[i]) begin
          failures++;
          $display("FAIL duty %0d got %0d exp %0d", i, duty_q[i], m_d[i]);
        end
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

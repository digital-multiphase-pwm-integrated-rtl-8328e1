// tb_mux_array -- random taps and selects at the default size (256 taps,
// four phases); each output must equal the selected tap. Also walks a
// single high tap past every select value.
module tb_mux_array;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int L = 8;
  localparam int N = 4;

  logic [2**L-1:0] de;
  logic [L-1:0]    sel [N];
  logic [N-1:0]    delay_x;

  mux_array dut (.de, .sel, .delay_x);

  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < 2000; r++) begin
      for (int w = 0; w < 2**L / 32; w++) de[w*32 +: 32] = $urandom;
      for (int i = 0; i < N; i++) sel[i] = L'($urandom);
      #10;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (delay_x[i] !== ((de >> sel[i]) & 1'b1)) begin
          failures++;
          $display("FAIL phase %0d sel=%0d", i, sel[i]);
        end
      end
    end
    // one-hot walk: only the phase selecting the hot tap sees a 1
    for (int k = 0; k < 2**L; k++) begin
      de = '0;
      de[k] = 1'b1;
      for (int i = 0; i < N; i++) sel[i] = L'(k + i);
      #10;
      checks++;
      if (delay_x !== N'(1)) begin
        failures++;
        $display("FAIL walk k=%0d got %b", k, delay_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

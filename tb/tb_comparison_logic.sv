// tb_comparison_logic -- for every N_sw of 4, 8, 12 and 16, every phase
// start S, every coarse duty D_MSB and every counter value, the phase's
// position in its cycle is (counter - S) mod N_sw. c1 must be high for the
// first D_MSB positions, c2 for D_MSB + 1, and c3 / c4 likewise on
// counter_n; a D_MSB of N_sw or more keeps them high. d_ph is given as
// N_sw - S (mod N_sw). counter_p and counter_n are varied independently.
module tb_comparison_logic;
  timeunit 1ps;
  timeprecision 1ps;
  import hrdpwm_pkg::*;

  localparam int M = 4;

  logic [M-1:0] d_msb, counter_p, counter_n, dph_p, dph_n;
  logic [M:0]   nsw_p, nsw_n;
  cmp_t         cmp;

  comparison_logic dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 4; n <= 16; n += 4) begin
      for (int s = 0; s < n; s++) begin
        for (int dm = 0; dm < 2**M; dm++) begin
          for (int c = 0; c < n; c++) begin
            int cn, pp, pn;
            cn = (c * 7 + dm + s) % n;        // an unrelated counter_n value
            nsw_p = (M+1)'(n);
            nsw_n = (M+1)'(n);
            dph_p = M'((n - s) % n);
            dph_n = M'((n - s) % n);
            d_msb = M'(dm);
            counter_p = M'(c);
            counter_n = M'(cn);
            #10;
            pp = (c - s + n) % n;
            pn = (cn - s + n) % n;
            checks++;
            if (cmp.c1 != (pp < dm) || cmp.c2 != (pp < dm + 1) ||
                cmp.c3 != (pn < dm) || cmp.c4 != (pn < dm + 1)) begin
              failures++;
              $display("FAIL n=%0d s=%0d D_MSB=%0d cp=%0d cn=%0d got %b", n, s, dm, c, cn, cmp);
            end
          end
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

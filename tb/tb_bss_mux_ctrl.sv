// tb_bss_mux_ctrl: self-checking test of the multiplexer control. Applies
// every magnitude 0..8 in every digit position (with random signs and random
// other digits) and checks that the AND-gate enable is set exactly for a
// nonzero magnitude and that the select points at candidate x*magnitude,
// the candidates being ordered x*1 .. x*8.
module tb_bss_mux_ctrl;
  import bss_pkg::*;

  bss_coef_t            coef;
  logic [NSUB-1:0][2:0] sel;
  logic [NSUB-1:0]      en;
  int checks = 0, failures = 0;

  bss_mux_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int k = 0; k < NSUB; k++) begin
        for (int m = 0; m <= 8; m++) begin
          for (int j = 0; j < NSUB; j++) begin
            coef[j].neg = 1'($urandom);
            coef[j].mag = 4'($urandom_range(8));
          end
          coef[k].mag = 4'(m);
          #1;
          for (int j = 0; j < NSUB; j++) begin
            checks++;
            if (en[j] !== (coef[j].mag != 0) ||
                (coef[j].mag != 0 && int'(sel[j]) + 1 != int'(coef[j].mag))) begin
              failures++;
              $display("FAIL digit %0d mag %0d: en=%b sel=%0d", j, coef[j].mag, en[j], sel[j]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

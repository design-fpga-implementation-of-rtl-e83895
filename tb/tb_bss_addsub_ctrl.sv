// tb_bss_addsub_ctrl: self-checking test of the add/sub control. For all 16
// sign patterns and random term values T0..T3 it evaluates the three-adder
// tree of the processing element under the control outputs,
//   u = T1 +/- T0, v = T3 +/- T2, w = v +/- u, result = neg ? -w : w,
// and compares the result with the directly computed signed sum
// s0*T0 + s1*T1 + s2*T2 + s3*T3.
module tb_bss_addsub_ctrl;
  import bss_pkg::*;

  bss_coef_t coef;
  logic sub_lo, sub_hi, sub_mid, neg;
  int checks = 0, failures = 0;

  bss_addsub_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t [NSUB];
    longint u, v, w, got, exp;
    for (int rep = 0; rep < 200; rep++) begin
      for (int s = 0; s < 16; s++) begin
        exp = 0;
        for (int k = 0; k < NSUB; k++) begin
          coef[k].neg = s[k];
          coef[k].mag = 4'($urandom_range(1, 8));
          t[k] = longint'($urandom_range(1, 100000));
          exp += s[k] ? -t[k] : t[k];
        end
        #1;
        u = sub_lo  ? t[1] - t[0] : t[1] + t[0];
        v = sub_hi  ? t[3] - t[2] : t[3] + t[2];
        w = sub_mid ? v - u       : v + u;
        got = neg ? -w : w;
        checks++;
        if (got != exp) begin
          failures++;
          $display("FAIL signs %b: got %0d expected %0d", s[3:0], got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

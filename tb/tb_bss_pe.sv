// tb_bss_pe: self-checking test of one processing element. The partial
// products x*1, x*3, x*5, x*7 are computed here by multiplication, the
// coefficient is converted to BSS digits, and the element's result
// (neg ? -w : w) must equal x*h. Covers every 8-bit sample against corner
// coefficients (0, +-1, +-8, extremes, all-8 digits) and random ones.
module tb_bss_pe;
  import bss_pkg::*;
  localparam int DATA_W = 8;
  localparam int PP_W   = DATA_W + 3;
  localparam int PROD_W = DATA_W + COEF_W;

  logic signed [PP_W-1:0]   pp1, pp3, pp5, pp7;
  bss_coef_t                coef;
  logic signed [PROD_W-1:0] w;
  logic                     neg;
  int checks = 0, failures = 0;

  bss_pe #(.DATA_W(DATA_W)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int h);
    longint got;
    pp1 = PP_W'(x); pp3 = PP_W'(3 * x); pp5 = PP_W'(5 * x); pp7 = PP_W'(7 * x);
    coef = bss_encode(COEF_W'(h));
    #1;
    got = neg ? -longint'(w) : longint'(w);
    checks++;
    if (got != longint'(x) * longint'(h)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d h=%0d got %0d", x, h, got);
    end
  endtask

  initial begin
    static int corner [14] = '{0, 1, -1, 8, -8, 9, -9, 32767, -32768, 30583,
                        2184, -2184, 12345, -4369};
    for (int x = -128; x < 128; x++) begin
      foreach (corner[i]) apply(x, corner[i]);
      for (int r = 0; r < 40; r++) apply(x, int'($signed(16'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

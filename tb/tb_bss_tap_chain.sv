// tb_bss_tap_chain: self-checking test of the transposed accumulation line.
// Random signed products with random signs are applied with random enable;
// for the n-th enabled step the output must equal the sum over t of the
// signed product applied to tap t at step n-t, computed here from a record
// of all steps. Idle cycles must leave the output unchanged. Includes
// full-scale products of equal sign on all taps to exercise the guard bits.
module tb_bss_tap_chain;
  localparam int TAPS   = 8;
  localparam int PROD_W = 24;
  localparam int ACC_W  = PROD_W + $clog2(TAPS);

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [PROD_W-1:0] w [TAPS];
  logic neg [TAPS];
  logic signed [ACC_W-1:0] y;
  longint hist [$][TAPS];
  int checks = 0, failures = 0;

  bss_tap_chain #(.TAPS(TAPS), .PROD_W(PROD_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint step [TAPS];
    longint exp, prev;
    int n;
    rst_n = 1'b0; en = 1'b0;
    foreach (w[t]) begin w[t] = '0; neg[t] = 1'b0; end
    repeat (2) @(posedge clk);
    #1; checks++; if (y != 0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(4) != 0);
      for (int t = 0; t < TAPS; t++) begin
        if (i >= 1000 && i < 1100) begin
          w[t] = {1'b0, {(PROD_W-1){1'b1}}};       // largest positive product
          neg[t] = (i >= 1050);
        end else begin
          w[t] = PROD_W'($urandom);
          neg[t] = 1'($urandom);
        end
        step[t] = neg[t] ? -longint'(w[t]) : longint'(w[t]);
      end
      prev = longint'(y);
      @(posedge clk); #1;
      if (en) begin
        hist.push_back(step);
        n = hist.size() - 1;
        exp = 0;
        for (int t = 0; t < TAPS; t++) if (n - t >= 0) exp += hist[n - t][t];
      end else exp = prev;
      checks++;
      if (longint'(y) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: y=%0d expected %0d", i, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bss_coef_bank: self-checking test of the coefficient store. Writes
// every 16-bit coefficient value once, cycling over the taps, and checks
// from the next cycle that the stored digits each lie in -8..+8 (zero stored
// as positive) and that their radix-16 sum, decoded here, equals the value
// written. Also checks the reset state and that a write changes only its
// own tap and that a cycle without write changes nothing.
module tb_bss_coef_bank;
  import bss_pkg::*;
  localparam int TAPS = 8;
  localparam int ADDR_W = $clog2(TAPS);

  logic clk = 1'b0;
  logic rst_n;
  logic we;
  logic [ADDR_W-1:0] addr;
  logic signed [COEF_W-1:0] wdata;
  bss_coef_t coefs [TAPS];
  int shadow [TAPS];
  int checks = 0, failures = 0;

  bss_coef_bank #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int decode(input bss_coef_t c, output bit legal);
    int v = 0;
    legal = 1'b1;
    for (int k = 3; k >= 0; k--) begin
      if (c[k].mag > 8 || (c[k].mag == 0 && c[k].neg)) legal = 1'b0;
      v = 16 * v + (c[k].neg ? -int'(c[k].mag) : int'(c[k].mag));
    end
    return v;
  endfunction

  task automatic check_all(input string when);
    bit legal;
    int v;
    for (int t = 0; t < TAPS; t++) begin
      v = decode(coefs[t], legal);
      checks++;
      if (!legal || v != shadow[t]) begin
        failures++;
        if (failures < 10) $display("FAIL %s tap %0d: %0d (legal %b) expected %0d", when, t, v, legal, shadow[t]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    foreach (shadow[t]) shadow[t] = 0;
    repeat (2) @(posedge clk);
    #1 check_all("reset");
    rst_n = 1'b1;
    for (int h = -32768; h < 32768; h++) begin
      we = 1'b1; addr = ADDR_W'(h); wdata = COEF_W'(h);
      @(posedge clk); #1;
      shadow[h & (TAPS - 1)] = h;
      if ((h & 1023) == 0) check_all("write"); else begin
        bit legal; int v;
        v = decode(coefs[h & (TAPS - 1)], legal);
        checks++;
        if (!legal || v != h) begin
          failures++;
          if (failures < 10) $display("FAIL value %0d stored as %0d legal %b", h, v, legal);
        end
      end
    end
    we = 1'b0; wdata = 16'sd1234;
    repeat (3) @(posedge clk); #1;
    check_all("idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bss_precomputer: self-checking test of the shared partial-product
// generator. Every 8-bit sample is applied with in_valid, in random order
// of valid and idle cycles; one cycle later the four outputs must equal
// x*1, x*3, x*5 and x*7 as computed by plain multiplication, and an idle
// cycle must leave them unchanged with out_valid low.
module tb_bss_precomputer;
  localparam int DATA_W = 8;
  localparam int PP_W   = DATA_W + 3;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [DATA_W-1:0] x;
  logic out_valid;
  logic signed [PP_W-1:0] pp1, pp3, pp5, pp7;
  int checks = 0, failures = 0;

  bss_precomputer #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int last;
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    #1 check(out_valid == 1'b0 && pp1 == 0 && pp7 == 0, "reset");
    rst_n = 1'b1;
    last = 0;
    for (int v = -128; v < 128; v++) begin
      x = DATA_W'(v); in_valid = 1'b1;
      @(posedge clk); #1;
      check(out_valid, "out_valid after valid input");
      check(int'(pp1) == v,     $sformatf("x*1 for %0d: %0d", v, pp1));
      check(int'(pp3) == 3 * v, $sformatf("x*3 for %0d: %0d", v, pp3));
      check(int'(pp5) == 5 * v, $sformatf("x*5 for %0d: %0d", v, pp5));
      check(int'(pp7) == 7 * v, $sformatf("x*7 for %0d: %0d", v, pp7));
      last = v;
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0; x = DATA_W'($urandom);
        @(posedge clk); #1;
        check(!out_valid, "out_valid low on idle");
        check(int'(pp7) == 7 * last, "hold on idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

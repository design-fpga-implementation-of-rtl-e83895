// tb_bss_fir: end-to-end self-checking test of the reconfigurable FIR filter
// at its default size (8 taps, 8-bit samples, 16-bit coefficients).
//
// Phases: load a coefficient set and check the impulse response reproduces
// it; stream random and full-scale samples with random idle cycles; rewrite
// coefficients while samples are in flight (reconfiguration); load sets made
// of extreme and all-8-digit coefficients. The reference is a plain
// convolution, y(n) = sum_t h_t(n-t) * x(n-t), where h_t(m) is the tap-t
// coefficient in force when sample m reached the processing elements (two
// cycles after it was presented). Every cycle y_valid must equal x_valid
// delayed by three cycles, which checks the latency and the stalls.
// Counts how often each mechanism occurred (every 8:1 select, AND-gate zero,
// negative digit, stall, reconfiguration in flight) and fails any that never
// did.
module tb_bss_fir;
  import bss_pkg::*;
  localparam int TAPS   = 8;
  localparam int DATA_W = 8;
  localparam int ADDR_W = $clog2(TAPS);
  localparam int ACC_W  = DATA_W + COEF_W + $clog2(TAPS);

  logic clk = 1'b0;
  logic rst_n;
  logic x_valid;
  logic signed [DATA_W-1:0] x_in;
  logic y_valid;
  logic signed [ACC_W-1:0] y_out;
  logic coef_we;
  logic [ADDR_W-1:0] coef_addr;
  logic signed [COEF_W-1:0] coef_data;

  bss_fir dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int shadow [TAPS];            // coefficients as the bank holds them
  longint xs [$];               // samples that reached the PEs
  int hs [$][TAPS];             // coefficients used for each of them
  longint expq [$];             // expected outputs in order
  logic [3:1] vpipe;            // x_valid delayed 1..3 cycles
  logic signed [DATA_W-1:0] xpipe [3:1];
  int inflight;                 // samples presented but not yet out
  // mechanism counters
  int cnt_sel [8];
  int cnt_zero, cnt_negdig, cnt_stall, cnt_reconf;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, evaluated mid-cycle when all signals are settled.
  always @(negedge clk) begin
    if (!rst_n) begin
      vpipe <= '0;
      inflight <= 0;
    end else begin
      // the sample at the PE stage is combined with the coefficients in force now
      if (vpipe[2]) begin
        longint e;
        int row [TAPS];
        int n;
        foreach (row[t]) row[t] = shadow[t];
        xs.push_back(longint'(xpipe[2]));
        hs.push_back(row);
        n = xs.size() - 1;
        e = 0;
        for (int t = 0; t < TAPS; t++) if (n - t >= 0) e += longint'(hs[n - t][t]) * xs[n - t];
        expq.push_back(e);
        // mechanism bookkeeping from the digits actually used
        if (xpipe[2] != 0) begin
          for (int t = 0; t < TAPS; t++) begin
            bss_coef_t c;
            c = bss_encode(COEF_W'(row[t]));
            for (int k = 0; k < NSUB; k++) begin
              if (c[k].mag == 0) cnt_zero++;
              else cnt_sel[c[k].mag - 1]++;
              if (c[k].neg) cnt_negdig++;
            end
          end
        end
      end
      if (coef_we) begin
        shadow[coef_addr] <= int'(coef_data);
        if (inflight > 0) cnt_reconf++;
      end
      if (!x_valid && inflight > 0) cnt_stall++;
      inflight <= inflight + (x_valid ? 1 : 0) - (y_valid ? 1 : 0);
      // output and latency check
      check(y_valid == vpipe[3], "y_valid is x_valid delayed three cycles");
      if (y_valid) begin
        if (expq.size() == 0) check(1'b0, "output with nothing expected");
        else begin
          static longint e;
          e = expq.pop_front();
          check(longint'(y_out) == e, $sformatf("y=%0d expected %0d (output %0d)", y_out, e, xs.size()));
        end
      end
      vpipe <= {vpipe[2:1], x_valid};
      xpipe[3] <= xpipe[2];
      xpipe[2] <= xpipe[1];
      xpipe[1] <= x_in;
    end
  end

  task automatic write_coef(input int t, input int h);
    coef_we = 1'b1; coef_addr = ADDR_W'(t); coef_data = COEF_W'(h);
  endtask

  task automatic idle_cycle();
    x_valid = 1'b0; coef_we = 1'b0;
    @(posedge clk); #1;
  endtask

  task automatic send(input int x);
    x_valid = 1'b1; x_in = DATA_W'(x);
    @(posedge clk); #1;
    x_valid = 1'b0; coef_we = 1'b0;
  endtask

  task automatic load_set(input int set [TAPS]);
    for (int t = 0; t < TAPS; t++) begin
      write_coef(t, set[t]);
      @(posedge clk); #1;
    end
    coef_we = 1'b0;
  endtask

  initial begin
    static int set_a [TAPS] = '{120, -345, 1023, 8, -32768, 32767, -2184, 2457};
    static int set_b [TAPS] = '{34952 - 32768, -2184, 30583, -30584, 4369, -4369, 1, -1};
    int rnd [TAPS];
    rst_n = 1'b0; x_valid = 1'b0; x_in = '0; coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    foreach (shadow[t]) shadow[t] = 0;
    foreach (xpipe[i]) xpipe[i] = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    // 1. impulse response reproduces the coefficients
    load_set(set_a);
    send(1);
    for (int i = 0; i < TAPS + 4; i++) idle_cycle();
    // flush: TAPS zero samples
    for (int i = 0; i < TAPS; i++) send(0);

    // 2. random stream with stalls, full-scale samples
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(3) == 0) idle_cycle();
      send((i % 50 == 7) ? -128 : (i % 50 == 8) ? 127 : int'($signed(8'($urandom))));
    end

    // 3. reconfiguration while streaming
    for (int i = 0; i < 600; i++) begin
      if ($urandom_range(4) == 0) write_coef($urandom_range(TAPS - 1), int'($signed(16'($urandom))));
      if ($urandom_range(5) == 0) idle_cycle();
      else send(int'($signed(8'($urandom))));
    end

    // 4. extreme and all-8 digit sets, switched mid-stream
    load_set(set_b);
    for (int i = 0; i < 100; i++) send(int'($signed(8'($urandom))));
    foreach (rnd[t]) rnd[t] = ($urandom_range(1) != 0) ? -32768 : 32767;
    load_set(rnd);
    for (int i = 0; i < 100; i++) send(($urandom_range(1) != 0) ? -128 : 127);

    for (int i = 0; i < 10; i++) idle_cycle();
    check(expq.size() == 0, "all expected outputs produced");

    $display("mechanisms: select x1..x8 = %0d %0d %0d %0d %0d %0d %0d %0d, zero digit = %0d, negative digit = %0d, stall cycles = %0d, reconfigurations in flight = %0d",
             cnt_sel[0], cnt_sel[1], cnt_sel[2], cnt_sel[3], cnt_sel[4], cnt_sel[5], cnt_sel[6], cnt_sel[7],
             cnt_zero, cnt_negdig, cnt_stall, cnt_reconf);
    foreach (cnt_sel[i]) check(cnt_sel[i] > 0, $sformatf("select x%0d never used", i + 1));
    check(cnt_zero > 0, "zero digit never used");
    check(cnt_negdig > 0, "negative digit never used");
    check(cnt_stall > 0, "no stall");
    check(cnt_reconf > 0, "no reconfiguration in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

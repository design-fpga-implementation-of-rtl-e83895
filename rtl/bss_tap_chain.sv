// bss_tap_chain: transposed direct-form accumulation line of the FIR filter.
//
// One register per tap. Each clock enable, register t takes the value of
// register t+1 plus or minus the product of tap t, and the last register
// takes tap TAPS-1's product alone; register 0 is the filter output. Every
// tap product is formed from the same current sample, so after the line has
// filled, y(n) = sum over t of h_t * x(n-t). The add/sub per tap applies the
// sign that the processing element hands over with its product (neg). The
// transposed delay-and-add structure follows the source design; the accumulator
// width, wide enough that no sum of TAPS full-scale products can overflow, is
// this design's choice.
//
// Timing: products presented with en are added at that rising edge; y holds
// the result from the next cycle. Synchronous active-low reset clears the line.
module bss_tap_chain #(
  parameter int unsigned TAPS   = 8,
  parameter int unsigned PROD_W = 24,
  localparam int unsigned ACC_W = PROD_W + ((TAPS > 1) ? $clog2(TAPS) : 0)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [PROD_W-1:0] w   [TAPS],
  input  logic                     neg [TAPS],
  output logic signed [ACC_W-1:0]  y
);

  logic signed [ACC_W-1:0] z    [TAPS];
  logic signed [ACC_W-1:0] zin  [TAPS];   // value entering each register from the right

  always_comb begin
    zin[TAPS-1] = '0;
    for (int t = 0; t < TAPS - 1; t++) zin[t] = z[t+1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < TAPS; t++) z[t] <= '0;
    end else if (en) begin
      for (int t = 0; t < TAPS; t++)
        z[t] <= neg[t] ? zin[t] - ACC_W'(w[t]) : zin[t] + ACC_W'(w[t]);
    end
  end

  assign y = z[0];

endmodule

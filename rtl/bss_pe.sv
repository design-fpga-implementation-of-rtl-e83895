// bss_pe: processing element of one tap of the BSS FIR filter.
//
// Multiplies the current sample by the tap's 16-bit coefficient without a
// multiplier. From the four shared partial products x*1, x*3, x*5, x*7 it
// forms the eight candidates x*1 .. x*8 by hardwired shifts (x*2 = x*1 << 1,
// x*4 = x*1 << 2, x*6 = x*3 << 1, x*8 = x*1 << 3). Each of the four BSS
// sub-coefficients picks one candidate through an 8:1 multiplexer, an AND
// gate zeroes it when the digit is zero, and the result is shifted by four
// bits per digit position. Three add/sub units then combine the four shifted
// terms, steered by the digit signs (see bss_addsub_ctrl). This structure -
// shared products, 8:1 multiplexers, AND gates, mux and add/sub control
// blocks and three add/sub units - follows the source design.
//
// Output: w and neg with tap product = neg ? -w : w; the final sign is
// applied by the add/sub in the accumulation line (this design's choice,
// which keeps the PE at three add/sub units). Purely combinational; the
// product register is the accumulation line's.
module bss_pe
  import bss_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  localparam int unsigned PP_W   = DATA_W + PP_EXTRA,
  localparam int unsigned PROD_W = DATA_W + COEF_W
) (
  input  logic signed [PP_W-1:0]   pp1,
  input  logic signed [PP_W-1:0]   pp3,
  input  logic signed [PP_W-1:0]   pp5,
  input  logic signed [PP_W-1:0]   pp7,
  input  bss_coef_t                coef,
  output logic signed [PROD_W-1:0] w,
  output logic                     neg
);

  logic [NSUB-1:0][2:0] sel;
  logic [NSUB-1:0]      en;
  logic                 sub_lo, sub_hi, sub_mid;

  bss_mux_ctrl u_mux_ctrl (
    .coef (coef),
    .sel  (sel),
    .en   (en)
  );

  bss_addsub_ctrl u_addsub_ctrl (
    .coef    (coef),
    .sub_lo  (sub_lo),
    .sub_hi  (sub_hi),
    .sub_mid (sub_mid),
    .neg     (neg)
  );

  // Candidates x*1 .. x*8, one bit wider than the precomputed products.
  logic signed [PP_W:0]   cand [8];
  logic signed [PP_W:0]   picked [NSUB];
  logic signed [PROD_W-1:0] term [NSUB];
  logic signed [PROD_W-1:0] u, v;

  always_comb begin
    cand[0] = (PP_W+1)'(pp1);
    cand[1] = (PP_W+1)'(pp1) <<< 1;
    cand[2] = (PP_W+1)'(pp3);
    cand[3] = (PP_W+1)'(pp1) <<< 2;
    cand[4] = (PP_W+1)'(pp5);
    cand[5] = (PP_W+1)'(pp3) <<< 1;
    cand[6] = (PP_W+1)'(pp7);
    cand[7] = (PP_W+1)'(pp1) <<< 3;

    for (int k = 0; k < NSUB; k++) begin
      // 8:1 multiplexer followed by the AND gate
      picked[k] = cand[sel[k]] & {(PP_W+1){en[k]}};
      // hardwired weight shift of digit k
      term[k]   = PROD_W'(picked[k]) <<< (SUB_W * k);
    end

    u = sub_lo  ? term[1] - term[0] : term[1] + term[0];
    v = sub_hi  ? term[3] - term[2] : term[3] + term[2];
    w = sub_mid ? v - u             : v + u;
  end

endmodule

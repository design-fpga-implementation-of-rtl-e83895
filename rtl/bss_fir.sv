// bss_fir: reconfigurable FIR filter built on binary signed sub-coefficients.
//
// A TAPS-tap transposed direct-form FIR filter whose coefficients can be
// rewritten at any time, with no multipliers. The input sample is registered,
// then the precomputer forms x*1, x*3, x*5 and x*7 once for all taps. Each
// tap's processing element composes x*h from these using the tap's
// coefficient in BSS form (four signed radix-16 digits in -8..+8): four 8:1
// multiplexers with AND gates, hardwired shifts and three add/sub units.
// The accumulation line adds the tap products into the output. Coefficients
// are written one tap at a time as 16-bit two's complement numbers and
// converted to BSS form by the coefficient bank. The architecture
// (precomputer, per-tap PEs with mux and add/sub control, transposed form,
// 4-bit sub-coefficients) follows the source design; the number of taps,
// the sample width, the register placement and the coefficient write port
// are this design's choices.
//
// Interface: x_in is taken when x_valid is high; y_out is the full-precision
// sum, valid when y_valid is high. One sample per clock at most; gaps in
// x_valid stall the pipeline without losing state.
// Timing: three register stages (input, precomputed products, accumulation
// line), so a sample presented in cycle c gives its output, with y_valid, in
// cycle c+3. A coefficient written in cycle c is used for samples that reach
// the processing elements from cycle c+1, i.e. samples presented from cycle
// c-1 on; earlier products already in the line keep the old coefficient.
// Synchronous active-low reset clears samples, line and coefficients.
module bss_fir
  import bss_pkg::*;
#(
  parameter int unsigned TAPS   = 8,
  parameter int unsigned DATA_W = 8,
  localparam int unsigned ADDR_W = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned PP_W   = DATA_W + PP_EXTRA,
  localparam int unsigned PROD_W = DATA_W + COEF_W,
  localparam int unsigned ACC_W  = PROD_W + ((TAPS > 1) ? $clog2(TAPS) : 0)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // sample stream
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     y_valid,
  output logic signed [ACC_W-1:0]  y_out,
  // coefficient write port
  input  logic                     coef_we,
  input  logic [ADDR_W-1:0]        coef_addr,
  input  logic signed [COEF_W-1:0] coef_data
);

  // ---- stage 1: input register ----
  logic                     x_q_valid;
  logic signed [DATA_W-1:0] x_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q_valid <= 1'b0;
      x_q       <= '0;
    end else begin
      x_q_valid <= x_valid;
      if (x_valid) x_q <= x_in;
    end
  end

  // ---- stage 2: shared partial products ----
  logic                   pp_valid;
  logic signed [PP_W-1:0] pp1, pp3, pp5, pp7;

  bss_precomputer #(.DATA_W(DATA_W)) u_precomputer (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (x_q_valid),
    .x         (x_q),
    .out_valid (pp_valid),
    .pp1       (pp1),
    .pp3       (pp3),
    .pp5       (pp5),
    .pp7       (pp7)
  );

  // ---- coefficients ----
  bss_coef_t coefs [TAPS];

  bss_coef_bank #(.TAPS(TAPS)) u_coef_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (coef_we),
    .addr  (coef_addr),
    .wdata (coef_data),
    .coefs (coefs)
  );

  // ---- per-tap processing elements ----
  logic signed [PROD_W-1:0] w   [TAPS];
  logic                     neg [TAPS];

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    bss_pe #(.DATA_W(DATA_W)) u_pe (
      .pp1  (pp1),
      .pp3  (pp3),
      .pp5  (pp5),
      .pp7  (pp7),
      .coef (coefs[t]),
      .w    (w[t]),
      .neg  (neg[t])
    );
  end

  // ---- stage 3: transposed accumulation line ----
  bss_tap_chain #(.TAPS(TAPS), .PROD_W(PROD_W)) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (pp_valid),
    .w     (w),
    .neg   (neg),
    .y     (y_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= pp_valid;
  end

endmodule

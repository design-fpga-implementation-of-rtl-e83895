// bss_precomputer: shared partial-product generator of the BSS FIR filter.
//
// Computes the odd multiples x*1, x*3, x*5 and x*7 of the current input
// sample with shifts and one adder or subtractor each (x*3 = 2x + x,
// x*5 = 4x + x, x*7 = 8x - x). These four words are sent to every tap's
// processing element, which derives x*2, x*4, x*6 and x*8 from them by
// hardwired shifts, so no tap holds a multiplier. The set of four products
// and their shift/add construction follow the source design.
//
// Timing: the outputs are registered, forming one pipeline stage; a sample
// presented with in_valid appears on the outputs, with out_valid, one clock
// later. The register is this design's choice (the source design calls for
// pipelining without placing the registers). Synchronous active-low reset
// clears out_valid and the products.
module bss_precomputer #(
  parameter int unsigned DATA_W = 8,
  localparam int unsigned PP_W  = DATA_W + bss_pkg::PP_EXTRA
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     out_valid,
  output logic signed [PP_W-1:0]   pp1,
  output logic signed [PP_W-1:0]   pp3,
  output logic signed [PP_W-1:0]   pp5,
  output logic signed [PP_W-1:0]   pp7
);

  logic signed [PP_W-1:0] xe;
  logic signed [PP_W-1:0] x3, x5, x7;

  always_comb begin
    xe = PP_W'(x);                 // sign extension
    x3 = (xe <<< 1) + xe;
    x5 = (xe <<< 2) + xe;
    x7 = (xe <<< 3) - xe;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pp1       <= '0;
      pp3       <= '0;
      pp5       <= '0;
      pp7       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pp1 <= xe;
        pp3 <= x3;
        pp5 <= x5;
        pp7 <= x7;
      end
    end
  end

endmodule

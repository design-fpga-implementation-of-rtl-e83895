// bss_coef_bank: reprogrammable coefficient store of the BSS FIR filter.
//
// Holds one coefficient per tap in BSS form (four signed radix-16 digits,
// see bss_pkg). A coefficient is written as an ordinary 16-bit two's
// complement number on the write port and converted to BSS digits on the
// way in, so the processing elements read ready-made digits. All taps are
// read in parallel. That coefficients are reprogrammable and kept as BSS
// sub-coefficients follows the source design; the write port, the
// conversion on write and the reset to all-zero coefficients are this
// design's choices.
//
// Timing: a write with we high takes effect at the next rising edge and is
// visible on coefs from the following cycle. Synchronous active-low reset.
// A write to an address at or above TAPS is ignored and flagged by an
// assertion.
module bss_coef_bank
  import bss_pkg::*;
#(
  parameter int unsigned TAPS = 8,
  localparam int unsigned ADDR_W = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [ADDR_W-1:0]         addr,
  input  logic signed [COEF_W-1:0]  wdata,
  output bss_coef_t                 coefs [TAPS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < TAPS; t++) coefs[t] <= '0;
    end else if (we && (32'(addr) < TAPS)) begin
      coefs[addr] <= bss_encode(wdata);
    end
  end

  // A write must name an existing tap.
  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n) we |-> 32'(addr) < TAPS)
    else $error("coefficient write to tap %0d of %0d", addr, TAPS);

endmodule

// bss_mux_ctrl: multiplexer control of one BSS processing element.
//
// For each of the four sub-coefficients of a tap's coefficient it turns the
// magnitude bits (0..8) into the select of that digit's 8:1 partial-product
// multiplexer and into the enable of the AND gate behind it. The multiplexer
// inputs are ordered x*1 .. x*8, so the select is magnitude - 1; a zero
// magnitude drops the enable, which forces the digit's product to zero.
// This division of work (select plus AND-gate enable from the magnitude bits)
// follows the source design; the input ordering and encoding are this
// design's choice. Purely combinational.
module bss_mux_ctrl
  import bss_pkg::*;
(
  input  bss_coef_t              coef,
  output logic [NSUB-1:0][2:0]   sel,   // 8:1 mux select per digit
  output logic [NSUB-1:0]        en     // AND-gate enable per digit
);

  always_comb begin
    for (int k = 0; k < NSUB; k++) begin
      en[k]  = (coef[k].mag != 4'd0);
      sel[k] = 3'(coef[k].mag - 4'd1);
    end
  end

endmodule

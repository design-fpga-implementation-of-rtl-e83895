// bss_addsub_ctrl: add/subtract control of one BSS processing element.
//
// The tap product is s0*T0 + s1*T1 + s2*T2 + s3*T3, where Tk is the selected
// partial product of digit k already shifted by 4k and sk its sign. The
// processing element forms it with three add/sub units:
//   u = T1 +/- T0   (subtract when s0 != s1), so s1*u = s1*T1 + s0*T0
//   v = T3 +/- T2   (subtract when s2 != s3), so s3*v = s3*T3 + s2*T2
//   w = v  +/- u    (subtract when s1 != s3), so s3*w = the tap product
// and hands w with the flag neg = s3 to the accumulation line, whose adder
// then adds or subtracts w. Signs of zero digits do not matter, since their
// Tk is zero. That the sign bits steer add/sub units follows the source
// design; the tree shape and moving the last sign into the accumulation
// adder are this design's choices. Purely combinational.
module bss_addsub_ctrl
  import bss_pkg::*;
(
  input  bss_coef_t coef,
  output logic      sub_lo,    // u = T1 - T0
  output logic      sub_hi,    // v = T3 - T2
  output logic      sub_mid,   // w = v - u
  output logic      neg        // tap product is -w
);

  always_comb begin
    sub_lo  = coef[0].neg ^ coef[1].neg;
    sub_hi  = coef[2].neg ^ coef[3].neg;
    sub_mid = coef[1].neg ^ coef[3].neg;
    neg     = coef[3].neg;
  end

endmodule

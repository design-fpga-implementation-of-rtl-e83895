// bss_pkg: shared types and constants of the binary-signed-sub-coefficient
// (BSS) reconfigurable FIR filter.
//
// A 16-bit two's complement coefficient h is split into four radix-16 digits
// (sub-coefficients) d0..d3 with h = d0 + 16*d1 + 256*d2 + 4096*d3. Unlike
// plain 4-bit partitioning, whose unsigned digits run 0..15 and need the odd
// products x*1..x*15, each BSS digit is signed and lies in -8..+8. Its
// magnitude is therefore one of 0..8, so every tap needs only the eight
// products x*1..x*8 (built from the precomputed x*1, x*3, x*5, x*7) and an
// 8:1 multiplexer per digit, with an AND gate for the zero digit.
//
// A digit is stored as a sign bit and a 4-bit magnitude (0..8). The split of
// the coefficient into four 4-bit parts follows the source design; the
// storage format of a digit and the 8-bit sample width are this design's
// choices.
package bss_pkg;

  localparam int unsigned SUB_W   = 4;              // bits per sub-coefficient
  localparam int unsigned NSUB    = 4;              // sub-coefficients per coefficient
  localparam int unsigned COEF_W  = SUB_W * NSUB;   // 16-bit coefficient
  localparam int unsigned PP_EXTRA = 3;             // x*7 needs 3 more bits than x

  // One BSS sub-coefficient: value = (neg ? -mag : mag), mag in 0..8.
  typedef struct packed {
    logic       neg;
    logic [3:0] mag;
  } bss_digit_t;

  // One coefficient in BSS form, digit 0 least significant.
  typedef bss_digit_t [NSUB-1:0] bss_coef_t;

  // Split a two's complement coefficient into BSS digits. Each step takes the
  // low four bits u of the remainder; u > 8 becomes the negative digit u-16
  // and carries one into the next digit. The last digit absorbs what is left,
  // which for a 16-bit input is always within -8..+8. A zero digit is stored
  // with neg = 0.
  function automatic bss_coef_t bss_encode(input logic signed [COEF_W-1:0] h);
    bss_coef_t   c;
    int          r;
    int          u;
    int          d;
    r = int'(h);
    for (int k = 0; k < NSUB; k++) begin
      if (k == NSUB - 1) begin
        d = r;
      end else begin
        u = r & 15;
        d = (u > 8) ? u - 16 : u;
        r = (r - d) >>> 4;
      end
      c[k].neg = (d < 0);
      c[k].mag = 4'((d < 0) ? -d : d);
    end
    return c;
  endfunction

  // Value of a BSS coefficient, used for read-back and checking.
  function automatic int bss_value(input bss_coef_t c);
    int v;
    v = 0;
    for (int k = NSUB - 1; k >= 0; k--) begin
      v = v * 16 + (c[k].neg ? -int'(c[k].mag) : int'(c[k].mag));
    end
    return v;
  endfunction

endpackage

// Radix-4 decimation-in-time butterfly ("dragonfly") with per-pass scaling.
//
// Legs 1..3 are first multiplied by their twiddles w[0..2] (leg 0 needs none), then the
// four products go through a 4-point DFT:
//   y0 = a + b + c + d        y1 = a - s*j*b - c + s*j*d
//   y2 = a - b + c - d        y3 = a + s*j*b - c - s*j*d
// with s = +1 for the forward transform and s = -1 (i.e. +j on leg 1) for the inverse.
// Each output is divided by 4 with round-half-up, so a full transform of log4(N) passes is
// scaled by 1/N and no pass can overflow. With radix2=1 the same legs form two radix-2
// butterflies instead, each output divided by 2:
//   y0 = a + b    y1 = a - b    y2 = c + d    y3 = c - d
// (the caller passes w[1] = 1); the core uses this for the closing pass of a 2*4**k-point
// transform. Combinational. The structure (twiddle multipliers on three legs, then two
// adder ranks with a -j) is the dragonfly of the burst-I/O radix-4 core; the scaling and
// the radix-2 mode are this design's choices.
module radix4_dragonfly
  import dsi_pkg::*;
(
  input  logic           inverse,
  input  logic           radix2,
  input  cplx_t [3:0]    x,
  input  twid_t [2:0]    w,
  output cplx_t [3:0]    y
);
  localparam int SW = DW + 2;

  cplx_t [3:0] t;
  assign t[0] = x[0];

  for (genvar m = 1; m < 4; m++) begin : g_tw
    cmplx_mult u_mul (.a(x[m]), .b(w[m-1]), .p(t[m]));
  end

  logic signed [SW-1:0] ar, ai, br, bi, cr, ci, dr, di;
  logic signed [SW-1:0] s0r, s0i, s1r, s1i, s2r, s2i, s3r, s3i;
  // j*b for the forward and inverse sign conventions
  logic signed [SW-1:0] jbr, jbi, jdr, jdi;

  function automatic logic signed [DW-1:0] rnd4(input logic signed [SW-1:0] v);
    return DW'((v + SW'(2)) >>> 2);   // |v| <= 4*2**(DW-1), so the quotient fits in DW bits
  endfunction

  function automatic logic signed [DW-1:0] rnd2(input logic signed [SW-1:0] v);
    return DW'((v + SW'(1)) >>> 1);
  endfunction

  always_comb begin
    ar = SW'(t[0].re); ai = SW'(t[0].im);
    br = SW'(t[1].re); bi = SW'(t[1].im);
    cr = SW'(t[2].re); ci = SW'(t[2].im);
    dr = SW'(t[3].re); di = SW'(t[3].im);
    // -j*z = (zi, -zr) ; +j*z = (-zi, zr)
    if (inverse) begin
      jbr = -bi; jbi = br;     // +j*b
      jdr = -di; jdi = dr;     // +j*d
    end else begin
      jbr = bi;  jbi = -br;    // -j*b
      jdr = di;  jdi = -dr;    // -j*d
    end
    s0r = ar + br + cr + dr;   s0i = ai + bi + ci + di;
    s1r = ar + jbr - cr - jdr; s1i = ai + jbi - ci - jdi;
    s2r = ar - br + cr - dr;   s2i = ai - bi + ci - di;
    s3r = ar - jbr - cr + jdr; s3i = ai - jbi - ci + jdi;
    if (radix2) begin
      y[0] = '{re: rnd2(ar + br), im: rnd2(ai + bi)};
      y[1] = '{re: rnd2(ar - br), im: rnd2(ai - bi)};
      y[2] = '{re: rnd2(cr + dr), im: rnd2(ci + di)};
      y[3] = '{re: rnd2(cr - dr), im: rnd2(ci - di)};
    end else begin
      y[0] = '{re: rnd4(s0r), im: rnd4(s0i)};
      y[1] = '{re: rnd4(s1r), im: rnd4(s1i)};
      y[2] = '{re: rnd4(s2r), im: rnd4(s2i)};
      y[3] = '{re: rnd4(s3r), im: rnd4(s3i)};
    end
  end
endmodule

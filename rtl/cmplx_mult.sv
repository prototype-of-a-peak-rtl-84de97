// Complex multiplier: p = a * b, with a a data sample and b a twiddle or phase factor.
//
// Four real products and two real additions, as a DSP-slice complex multiplier does; the
// result is shifted right by SHIFT bits (the fractional bits of b) with round-half-up and
// then cut to the width of a. With |b| <= 1 the magnitude cannot grow beyond |a| plus
// rounding, so the cut only drops sign-extension bits when a stays inside the range the
// datapath keeps (|re|,|im| < 2**(DW-2)). Purely combinational; timing is set by the caller.
// Operand names follow the AR/AI/BR/BI and PR/PI pins of a DSP complex-multiplier block.
module cmplx_mult
  import dsi_pkg::*;
#(
  parameter int SHIFT = TFRAC
) (
  input  cplx_t a,
  input  twid_t b,
  output cplx_t p
);
  localparam int PW = DW + TW + 1;

  logic signed [PW-1:0] pr_full, pi_full;

  always_comb begin
    pr_full = PW'(a.re * b.re) - PW'(a.im * b.im) + PW'(1 << (SHIFT - 1));
    pi_full = PW'(a.re * b.im) + PW'(a.im * b.re) + PW'(1 << (SHIFT - 1));
    p.re = DW'(pr_full >>> SHIFT);
    p.im = DW'(pi_full >>> SHIFT);
  end
endmodule

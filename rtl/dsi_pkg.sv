// Shared types, constants and helpers of the DSI-EPTS PAPR-reduction transmitter.
//
// Every complex sample in the datapath is a pair of signed fixed-point words packed in
// cplx_t: DW bits each for real and imaginary part. Phase factors and twiddles use twid_t
// with TW bits per part in Q2.(TW-2) format, so 1.0 is 2**(TW-2) and the value +1 as well
// as -1 is exact. The word lengths are this design's choice; the scheme itself fixes none.
// The helpers compute the base-4 digit bookkeeping of the radix-4 IFFT (bank of an address,
// digit reversal) and are pure functions usable both in logic and in testbenches.
package dsi_pkg;

  localparam int DW   = 16;           // bits per real/imag part of a data sample
  localparam int TW   = 16;           // bits per real/imag part of a twiddle/phase factor
  localparam int TFRAC = TW - 2;      // fractional bits of twid_t (Q2.14)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

  // Bank of an address in the four-bank radix-4 memory: sum of the base-4 digits, mod 4.
  // The four operands of every radix-4 butterfly differ in exactly one digit, so they
  // always fall into four different banks.
  function automatic logic [1:0] bank_of(input int unsigned addr, input int unsigned ndig);
    logic [1:0] s = '0;
    for (int d = 0; d < ndig; d++) s += 2'(addr >> (2 * d));
    return s;
  endfunction

  // Reverse the order of the ndig base-4 digits of addr.
  function automatic int unsigned digit_rev4(input int unsigned addr, input int unsigned ndig);
    int unsigned r = 0;
    for (int d = 0; d < ndig; d++) r = (r << 2) | ((addr >> (2 * d)) & 3);
    return r;
  endfunction

endpackage

// Twiddle-factor ROM of the radix-4 IFFT/FFT.
//
// Entry k holds W^k = exp(-j*2*pi*k/NFFT) = cos(2*pi*k/NFFT) - j*sin(2*pi*k/NFFT) in Q2.14,
// rounded to nearest. The table is computed at elaboration from that formula; nothing is
// read from a file. When `inverse` is set the output is conjugated, which turns the forward
// twiddle into the inverse-transform twiddle exp(+j*2*pi*k/NFFT). One read port, registered:
// addr and inverse are sampled at a clock edge and w is valid after it (latency 1).
// Storing the fixed twiddles in a ROM follows the scheme; the format is this design's choice.
module twiddle_rom
  import dsi_pkg::*;
#(
  parameter int NFFT = 256
) (
  input  logic                    clk,
  input  logic [$clog2(NFFT)-1:0] addr,
  input  logic                    inverse,
  output twid_t                   w
);
  typedef logic [2*TW-1:0] table_t [NFFT];

  function automatic table_t gen_table();
    table_t t;
    real    ang;
    logic signed [TW-1:0] c, s;
    for (int k = 0; k < NFFT; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(NFFT);
      c    = TW'($rtoi($floor(real'(1 << TFRAC) * $cos(ang) + 0.5)));
      s    = TW'($rtoi($floor(-real'(1 << TFRAC) * $sin(ang) + 0.5)));
      t[k] = {c, s};
    end
    return t;
  endfunction

  localparam table_t ROM = gen_table();

  always_ff @(posedge clk) begin
    w.re <= TW'(ROM[addr] >> TW);
    w.im <= inverse ? -TW'(ROM[addr]) : TW'(ROM[addr]);
  end
endmodule

// Dummy-sequence generator. Produces the complex dummy values that fill the L dummy
// sub-carriers. A 16-bit maximal-length Fibonacci LFSR (taps 16,14,13,11) is stepped twice
// per dummy value; its two low bits choose the signs of a QPSK point (+-AMP, +-AMP):
//   re = bit0 ? -AMP : +AMP,   im = bit1 ? -AMP : +AMP.
// `dummy` is combinational from the LFSR state; `step` advances it by two shifts at the
// clock edge, so every dummy slot and every new iteration sees fresh values. Reset loads
// SEED. `state` shows the LFSR and `load` (priority over step) sets it to `load_val`, so a
// caller can regenerate an earlier dummy sequence. That dummy values are generated in
// complex form and replaced when the PAPR test fails follows the scheme; the LFSR, the
// QPSK alphabet, AMP, SEED and the load port are this design's choice.
module dummy_seq_gen
  import dsi_pkg::*;
#(
  parameter int          AMP  = 4096,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic        step,
  input  logic        load,
  input  logic [15:0] load_val,
  output logic [15:0] state,
  output cplx_t       dummy
);
  logic [15:0] lfsr;

  function automatic logic [15:0] shift1(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n)     lfsr <= SEED;
    else if (load)  lfsr <= load_val;
    else if (step)  lfsr <= shift1(shift1(lfsr));
  end

  assign state    = lfsr;
  assign dummy.re = lfsr[0] ? -DW'(AMP) : DW'(AMP);
  assign dummy.im = lfsr[1] ? -DW'(AMP) : DW'(AMP);
endmodule

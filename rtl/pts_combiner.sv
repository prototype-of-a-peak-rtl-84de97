// Partial-transmit-sequence combiner: rotates each sub-block's time-domain sample by its
// phase factor and adds the V products,
//   y[n] = sum_v c_v[n] * u_v[n],
// then forms the instantaneous power |y[n]|^2 for the PAPR search. One complex multiplier
// per sub-block, an adder, saturation of the sum to DW bits, and a squarer. Registered
// output: in_valid/u/c sampled at a clock edge give out_valid/y/pwr after it (latency 1).
// The multiply-and-add structure follows the scheme; saturation and widths are this
// design's choice.
module pts_combiner
  import dsi_pkg::*;
#(
  parameter int V = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t [V-1:0] u,
  input  twid_t [V-1:0] c,
  output logic          out_valid,
  output cplx_t         y,
  output logic [2*DW:0] pwr
);
  localparam int SW = DW + $clog2(V) + 1;
  localparam logic signed [SW-1:0] MAXV = SW'((1 << (DW - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 << (DW - 1));

  cplx_t [V-1:0] rot;
  for (genvar v = 0; v < V; v++) begin : g_rot
    cmplx_mult u_mul (.a(u[v]), .b(c[v]), .p(rot[v]));
  end

  function automatic logic signed [DW-1:0] sat(input logic signed [SW-1:0] x);
    if (x > MAXV) return DW'(MAXV);
    if (x < MINV) return DW'(MINV);
    return DW'(x);
  endfunction

  cplx_t                 sum;
  logic [2*DW:0]         p;
  always_comb begin
    logic signed [SW-1:0] sr, si;
    sr = '0; si = '0;
    for (int v = 0; v < V; v++) begin
      sr += SW'(rot[v].re);
      si += SW'(rot[v].im);
    end
    sum.re = sat(sr);
    sum.im = sat(si);
    p = (2*DW+1)'(sum.re * sum.re) + (2*DW+1)'(sum.im * sum.im);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
      pwr       <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= sum;
      pwr       <= p;
    end
  end
endmodule

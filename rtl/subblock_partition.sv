// Sub-block partitioning: splits the extended vector U into V disjoint sub-blocks that sum
// to U. Output v carries U[n] if index n belongs to sub-block v and zero otherwise, which is
// what the real multipliers in front of each IFFT do with a 0/1 mask. ADJACENT=1 puts the
// N/V consecutive indices [v*N/V, (v+1)*N/V) in sub-block v; ADJACENT=0 interleaves them
// (n mod V = v). Indices n >= N (oversampling zeros) are zero in every sub-block.
// Combinational. Both partitions are named by the scheme; adjacent is the default because
// the DSI-EPTS description asks for it.
module subblock_partition
  import dsi_pkg::*;
#(
  parameter int N        = 256,
  parameter int V        = 2,
  parameter int S        = 1,
  parameter bit ADJACENT = 1'b1
) (
  input  logic [$clog2(N*S)-1:0] idx,
  input  cplx_t                  u,
  output cplx_t [V-1:0]          uv
);
  always_comb begin
    int unsigned sb;
    sb = ADJACENT ? int'(idx) / (N / V) : int'(idx) % V;
    for (int v = 0; v < V; v++) uv[v] = (int'(idx) < N && sb == v) ? u : '0;
  end
endmodule

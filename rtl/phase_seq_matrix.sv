// Interleaved phase-sequence matrix C of size P x N, P = D * W**(V-1).
//
// Row r holds N/P phase indices c[r][0..N/P-1]; across the N time samples a row is repeated
// P times, so time sample n of row r uses column n mod (N/P) (the interleaved form of the
// matrix). A phase index w in 0..W-1 stands for the factor exp(j*2*pi*w/W) in Q2.14.
// Search candidate p (0..P-1) keeps sub-block 0 unrotated (factor 1, as the first phase
// factor of PTS is fixed) and applies row (p+v-1) mod P to sub-block v >= 1, so the P stored
// rows give P distinct candidates. (Rotating rows over all V sub-blocks instead would make
// the candidates of V=2, W=2 differ only by a common +-1 sequence, i.e. have equal peaks.)
// Reset loads c[r][i] = (W/2) * parity(r & i), a Walsh-Hadamard pattern of +-1 factors whose
// row 0 is all +1, so candidate 0 is the unmodified symbol; the write port (we, wrow, wcol,
// wval) replaces entries with an optimised matrix from outside.
// Read: cand and n are sampled at a clock edge and the V factors are valid after it
// (latency 1). The matrix shape, its interleaving and P = D*W^(V-1) follow the scheme; the
// candidate-to-row mapping, the reset contents and the write port are this design's choice.
module phase_seq_matrix
  import dsi_pkg::*;
#(
  parameter int N  = 256,
  parameter int V  = 2,
  parameter int W  = 2,
  parameter int D  = 1,
  parameter int S  = 1,
  localparam int P    = D * (W ** (V - 1)),
  localparam int NP   = N / P,
  localparam int PB   = (P > 1) ? $clog2(P) : 1,
  localparam int CB   = (NP > 1) ? $clog2(NP) : 1,
  localparam int WB   = $clog2(W)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [PB-1:0]          wrow,
  input  logic [CB-1:0]          wcol,
  input  logic [WB-1:0]          wval,
  input  logic [PB-1:0]          cand,
  input  logic [$clog2(N*S)-1:0] n,
  output twid_t [V-1:0]          c
);
  initial begin
    assert (W >= 2 && (1 << WB) == W) else $fatal(1, "phase_seq_matrix: W must be a power of 2");
    assert (NP * P == N) else $fatal(1, "phase_seq_matrix: P must divide N");
  end

  typedef logic [2*TW-1:0] phase_tab_t [W];

  function automatic phase_tab_t gen_phase();
    phase_tab_t t;
    logic signed [TW-1:0] re, im;
    real ang;
    for (int w = 0; w < W; w++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(w) / real'(W);
      re   = TW'($rtoi($floor(real'(1 << TFRAC) * $cos(ang) + 0.5)));
      im   = TW'($rtoi($floor(real'(1 << TFRAC) * $sin(ang) + 0.5)));
      t[w] = {re, im};
    end
    return t;
  endfunction

  localparam phase_tab_t PHASE = gen_phase();

  logic [WB-1:0] mat [P][NP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < P; r++)
        for (int i = 0; i < NP; i++)
          mat[r][i] <= WB'(($countones(r & i) % 2) * (W / 2));
    end else if (we) begin
      mat[wrow][wcol] <= wval;
    end
  end

  logic [CB-1:0] col;
  assign col = CB'(int'(n) % NP);

  always_ff @(posedge clk) begin
    c[0].re <= TW'(1 << TFRAC);
    c[0].im <= '0;
    for (int v = 1; v < V; v++) begin
      c[v].re <= TW'(PHASE[mat[PB'((int'(cand) + v - 1) % P)][col]] >> TW);
      c[v].im <= TW'(PHASE[mat[PB'((int'(cand) + v - 1) % P)][col]]);
    end
  end
endmodule

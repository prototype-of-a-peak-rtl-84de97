// Dummy-sequence insertion: forms the extended frequency-domain vector U = [X, W] of one
// OFDM symbol, index by index. Index n < N-L carries the data sub-carrier X[n], N-L <= n < N
// carries a dummy value, and n >= N (present only when the IFFT is oversampled by S > 1)
// carries the (S-1)*N zeros appended for oversampling. Combinational; is_data and
// is_dummy tell the caller which source the index uses so it can fetch or advance it.
// The data-then-dummy order and N = K + L follow the scheme; the placement of the
// oversampling zeros after U follows its description of "U concatenated with zeros".
module dummy_insert
  import dsi_pkg::*;
#(
  parameter int N = 256,
  parameter int L = 55,
  parameter int S = 1
) (
  input  logic [$clog2(N*S)-1:0] idx,
  input  cplx_t                  data,
  input  cplx_t                  dummy,
  output cplx_t                  u,
  output logic                   is_data,
  output logic                   is_dummy
);
  always_comb begin
    is_data  = int'(idx) < N - L;
    is_dummy = !is_data && int'(idx) < N;
    u = is_data ? data : (is_dummy ? dummy : '0);
  end
endmodule

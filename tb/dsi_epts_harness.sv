// Parameterised driver and floating-point model around one dsi_epts_top instance, used by
// the workload testbench to run the transmitter at several sizes. It sends NSYM random QPSK
// symbols at threshold TH_Q88 (linear PAPR, Q8.8), rebuilds every iteration in floating
// point (dummy LFSR, sub-block IDFTs of N*S points, all P candidates), and checks the
// transmitted samples, the choice of the smallest-peak candidate and the accept/retry
// decisions, including the replay of the best iteration at the limit. It also computes
// the PAPR of the plain symbol (data with zeros in the dummy slots, no rotation) so the
// caller can report the reduction. `finished` rises when all symbols are done;
// checks/failures and the PAPR sums (in dB) are then valid.
module dsi_epts_harness #(
  parameter int N = 256, parameter int V = 2, parameter int W = 2, parameter int D = 1,
  parameter int L = 55, parameter int S = 1, parameter int MAX_ITER = 4,
  parameter bit ADJACENT = 1'b1, parameter int NSYM = 4, parameter int TH_Q88 = 1280
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output real  papr_plain_db,
  output real  papr_tx_db,
  output int   retries,
  output int   limits,
  output int   replays
);
  import dsi_pkg::*;
  localparam int NS = N * S, K = N - L, P = D * (W ** (V - 1));
  localparam int PB = (P > 1) ? $clog2(P) : 1;
  localparam int CB = (N / P > 1) ? $clog2(N / P) : 1;
  localparam int WB = $clog2(W);
  localparam int IB = $clog2(MAX_ITER + 1);
  localparam int AMP = 8192, DAMP = 4096;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 10.0;
  localparam real RTOL = 0.03;

  logic rst_n = 0, in_valid = 0, in_ready, pm_we = 0;
  cplx_t in_data = '0, out_data;
  logic [15:0] papr_th = 16'(TH_Q88);
  logic [PB-1:0] pm_row = '0, si;
  logic [CB-1:0] pm_col = '0;
  logic [WB-1:0] pm_val = '0;
  logic out_valid, out_first, papr_ok, busy, replayed;
  logic [IB-1:0] iterations;

  dsi_epts_top #(.N(N), .V(V), .W(W), .D(D), .L(L), .S(S), .MAX_ITER(MAX_ITER),
                 .ADJACENT(ADJACENT)) dut (.*);

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction
  function automatic real db(input real v); return 10.0 * $ln(v) / $ln(10.0); endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL (N=%0d V=%0d D=%0d S=%0d): %s", N, V, D, S, what); end
  endtask

  logic [15:0] lfsr = 16'hACE1;
  real ct [NS], st [NS];
  real xr [K], xi [K], ur [NS], ui [NS];
  real tr [V][NS], ti [V][NS], yr [P][NS], yi [P][NS], peak [P], sum [P];
  real yr_it [MAX_ITER][P][NS], yi_it [MAX_ITER][P][NS], papr_it [MAX_ITER];
  logic [15:0] st_it [MAX_ITER];

  function automatic logic [15:0] sh(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction
  function automatic int sb_of(input int k);
    return ADJACENT ? k / (N / V) : k % V;
  endfunction

  // PAPR of the plain symbol: data, zeros in the dummy slots, no rotation
  function automatic real plain_papr();
    real pk, sm, ar, ai, pw;
    int e;
    pk = 0.0; sm = 0.0;
    for (int n = 0; n < NS; n++) begin
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < K; k++) begin
        e = (k * n) % NS;
        ar += xr[k] * ct[e] - xi[k] * st[e];
        ai += xr[k] * st[e] + xi[k] * ct[e];
      end
      pw = ar * ar + ai * ai;
      if (pw > pk) pk = pw;
      sm += pw;
    end
    return pk * real'(NS) / sm;
  endfunction

  task automatic model_iteration();
    for (int k = 0; k < NS; k++) begin
      if (k < K) begin ur[k] = xr[k]; ui[k] = xi[k]; end
      else if (k < N) begin
        ur[k] = lfsr[0] ? -real'(DAMP) : real'(DAMP);
        ui[k] = lfsr[1] ? -real'(DAMP) : real'(DAMP);
        lfsr = sh(sh(lfsr));
      end else begin ur[k] = 0.0; ui[k] = 0.0; end
    end
    for (int v = 0; v < V; v++)
      for (int n = 0; n < NS; n++) begin tr[v][n] = 0.0; ti[v][n] = 0.0; end
    for (int k = 0; k < N; k++) begin
      int v;
      v = sb_of(k);
      for (int n = 0; n < NS; n++) begin
        int e;
        e = (k * n) % NS;
        tr[v][n] += (ur[k] * ct[e] - ui[k] * st[e]) / real'(NS);
        ti[v][n] += (ur[k] * st[e] + ui[k] * ct[e]) / real'(NS);
      end
    end
    for (int p = 0; p < P; p++) begin
      peak[p] = 0.0; sum[p] = 0.0;
      for (int n = 0; n < NS; n++) begin
        real pw, a;
        yr[p][n] = tr[0][n]; yi[p][n] = ti[0][n];
        for (int v = 1; v < V; v++) begin
          a = 2.0 * PI * real'(($countones(((p + v - 1) % P) & (n % (N / P))) % 2) * (W / 2)) / real'(W);
          yr[p][n] += tr[v][n] * $cos(a) - ti[v][n] * $sin(a);
          yi[p][n] += tr[v][n] * $sin(a) + ti[v][n] * $cos(a);
        end
        pw = yr[p][n] * yr[p][n] + yi[p][n] * yi[p][n];
        if (pw > peak[p]) peak[p] = pw;
        sum[p] += pw;
      end
    end
  endtask

  cplx_t got [NS];
  int ngot;
  always @(posedge clk) if (out_valid) begin
    if (out_first) ngot = 0;
    if (ngot < NS) got[ngot] = out_data;
    ngot++;
  end

  initial begin
    real th, minpk, pp;
    int sel, it_n, k, src;
    bit amb;
    finished = 0; checks = 0; failures = 0; papr_plain_db = 0.0; papr_tx_db = 0.0;
    retries = 0; limits = 0; replays = 0;
    th = real'(TH_Q88) / 256.0;
    for (int n = 0; n < NS; n++) begin
      ct[n] = $cos(2.0 * PI * real'(n) / real'(NS));
      st[n] = $sin(2.0 * PI * real'(n) / real'(NS));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int sym = 0; sym < NSYM; sym++) begin
      for (k = 0; k < K; k++) begin
        xr[k] = ($urandom_range(1, 0) != 0) ? real'(AMP) : -real'(AMP);
        xi[k] = ($urandom_range(1, 0) != 0) ? real'(AMP) : -real'(AMP);
      end
      @(negedge clk);
      k = 0;
      while (k < K) begin
        bit rdy;
        in_valid = 1; in_data.re = DW'($rtoi(xr[k])); in_data.im = DW'($rtoi(xi[k]));
        rdy = in_ready;            // stable until the next rising edge, which takes the word
        @(negedge clk);
        if (rdy) k++;
      end
      in_valid = 0;
      ngot = -1;
      while (ngot < NS) @(negedge clk);
      it_n = int'(iterations);
      check(it_n >= 1 && it_n <= MAX_ITER, "iteration count");
      for (int it = 0; it < it_n; it++) begin
        int bp;
        st_it[it] = lfsr;
        model_iteration();
        bp = 0;
        for (int p = 1; p < P; p++) if (peak[p] < peak[bp]) bp = p;
        papr_it[it] = peak[bp] * real'(NS) / sum[bp];
        for (int p = 0; p < P; p++)
          for (int n = 0; n < NS; n++) begin yr_it[it][p][n] = yr[p][n]; yi_it[it][p][n] = yi[p][n]; end
        amb = rabs(papr_it[it] - th) < RTOL * th;
        if (it < it_n - 1 && !amb) check(papr_it[it] >= th, "accepted too late");
      end
      sel = int'(si);
      src = it_n - 1;
      if (replayed) begin
        real be, e;
        be = 1.0e30;
        for (int i = 0; i < it_n - 1; i++) begin
          e = 0.0;
          for (int n = 0; n < NS; n++) e += rabs(real'(got[n].re) - yr_it[i][sel][n]) + rabs(real'(got[n].im) - yi_it[i][sel][n]);
          if (e < be) begin be = e; src = i; end
        end
        check(!papr_ok && it_n == MAX_ITER, "replay only at the limit");
        lfsr = st_it[src];
        for (int i = 0; i < L; i++) lfsr = sh(sh(lfsr));
        replays++;
      end
      if (!papr_ok)
        for (int i = 0; i < it_n; i++) check(papr_it[src] <= papr_it[i] * (1.0 + RTOL), "sent iteration is not the best");
      begin
        real pk [P], mp;
        for (int p = 0; p < P; p++) begin
          pk[p] = 0.0;
          for (int n = 0; n < NS; n++)
            if (yr_it[src][p][n] ** 2 + yi_it[src][p][n] ** 2 > pk[p]) pk[p] = yr_it[src][p][n] ** 2 + yi_it[src][p][n] ** 2;
        end
        mp = pk[0];
        for (int p = 1; p < P; p++) if (pk[p] < mp) mp = pk[p];
        check(pk[sel] <= mp * (1.0 + RTOL) + 4.0 * TOL * TOL, "chosen candidate is not the smallest peak");
      end
      pp = papr_it[src];
      if (rabs(papr_it[it_n - 1] - th) >= RTOL * th) check(papr_ok == (papr_it[it_n - 1] < th), "papr_ok");
      for (int n = 0; n < NS; n++)
        check(rabs(real'(got[n].re) - yr_it[src][sel][n]) <= TOL && rabs(real'(got[n].im) - yi_it[src][sel][n]) <= TOL,
              $sformatf("sample %0d", n));
      if (it_n > 1 && papr_ok) retries++;
      if (!papr_ok) limits++;
      papr_tx_db += db(pp);
      papr_plain_db += db(plain_papr());
    end
    papr_tx_db /= real'(NSYM);
    papr_plain_db /= real'(NSYM);
    finished = 1;
  end
endmodule

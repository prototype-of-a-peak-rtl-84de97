// End-to-end testbench of the DSI-EPTS transmitter at its default size (N=256, V=2, W=2,
// D=1, L=55, S=1). A floating-point model rebuilds every iteration of every symbol: the
// same dummy values (modelled LFSR), the V sub-block IDFTs, all P candidates of the phase
// matrix, their peaks and PAPRs. It then checks the transmitted samples against the model
// for the candidate the design reports as side information, that this candidate's peak is
// the smallest (within fixed-point tolerance), the accept/retry decisions against the
// threshold, the iteration count, that at the limit the lowest-PAPR iteration is sent (by
// replay if it is an earlier one), and the cycle count from the last input to the first
// output. It counts each mechanism: accept on the first try, retry with a new dummy
// sequence, giving up at MAX_ITER, replay, input back pressure, a phase-matrix rewrite, and
// each candidate being chosen; one that never happens is a failure.
module tb_dsi_epts_top;
  import dsi_pkg::*;
  localparam int N = 256, V = 2, W = 2, D = 1, L = 55, S = 1, MAX_ITER = 4;
  localparam int NS = N * S, K = N - L, P = D * (W ** (V - 1));
  localparam int AMP = 8192, DAMP = 4096;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 10.0;       // LSB tolerance on output samples
  localparam real RTOL = 0.03;      // relative tolerance on peaks and PAPR decisions

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  cplx_t in_data = '0;
  logic [15:0] papr_th = 16'hFFFF;
  logic pm_we = 0;
  logic [0:0] pm_row = '0;
  logic [6:0] pm_col = '0;
  logic [0:0] pm_val = '0;
  logic out_valid, out_first, busy, papr_ok, replayed;
  cplx_t out_data;
  logic [0:0] si;
  logic [2:0] iterations;

  dsi_epts_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_first_pass = 0, n_retry = 0, n_limit = 0, n_replay = 0, n_backpressure = 0, n_pm_write = 0;
  int n_si [P];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  // ---------------------------------------------------------------- reference model state
  logic [15:0] lfsr = 16'hACE1;
  int          mat [P][N/P];
  real ct [NS], st [NS];
  real xr [K], xi [K];
  real ur [NS], ui [NS];
  real tr [V][NS], ti [V][NS];
  real yr [P][NS], yi [P][NS];
  real peak [P], sum [P];
  real yr_it [MAX_ITER][P][NS], yi_it [MAX_ITER][P][NS], papr_it [MAX_ITER];
  logic [15:0] st_it [MAX_ITER];

  function automatic logic [15:0] sh(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  // one iteration of the model: build U, IDFT per sub-block, combine every candidate
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
      for (int n = 0; n < NS; n++) begin
        tr[v][n] = 0.0; ti[v][n] = 0.0;
        for (int k = v * (N / V); k < (v + 1) * (N / V); k++) begin
          int e;
          e = (k * n) % NS;
          tr[v][n] += ur[k] * ct[e] - ui[k] * st[e];
          ti[v][n] += ur[k] * st[e] + ui[k] * ct[e];
        end
        tr[v][n] /= real'(NS); ti[v][n] /= real'(NS);
      end
    for (int p = 0; p < P; p++) begin
      peak[p] = 0.0; sum[p] = 0.0;
      for (int n = 0; n < NS; n++) begin
        real pw;
        yr[p][n] = 0.0; yi[p][n] = 0.0;
        for (int v = 0; v < V; v++) begin
          real a;
          a = (v == 0) ? 0.0 : 2.0 * PI * real'(mat[(p + v - 1) % P][n % (N / P)]) / real'(W);
          yr[p][n] += tr[v][n] * $cos(a) - ti[v][n] * $sin(a);
          yi[p][n] += tr[v][n] * $sin(a) + ti[v][n] * $cos(a);
        end
        pw = yr[p][n] * yr[p][n] + yi[p][n] * yi[p][n];
        if (pw > peak[p]) peak[p] = pw;
        sum[p] += pw;
      end
    end
  endtask

  // ---------------------------------------------------------------- one symbol end to end
  cplx_t got [NS];
  int    ngot;
  longint t_last_in, t_first_out;

  always @(posedge clk) begin
    if (out_valid) begin
      if (out_first) begin ngot = 0; t_first_out = cyc; end
      if (ngot < NS) got[ngot] = out_data;
      ngot++;
    end
    if (in_valid && !in_ready) n_backpressure++;
  end

  task automatic run_symbol(input real th_lin, input int gap_pct);
    int    k, it, sel, exp_it, src;
    real   th, minpk, papr_sel, maxerr;
    bit    ref_pass, ambiguous;
    papr_th = 16'(int'(th_lin * 256.0));
    th = real'(papr_th) / 256.0;
    for (k = 0; k < K; k++) begin
      xr[k] = ($urandom_range(1, 0) != 0) ? real'(AMP) : -real'(AMP);
      xi[k] = ($urandom_range(1, 0) != 0) ? real'(AMP) : -real'(AMP);
    end
    // drive the data sub-carriers, with random idle cycles
    k = 0;
    @(negedge clk);
    while (k < K) begin
      in_valid = ($urandom_range(99, 0) >= gap_pct);
      in_data.re = DW'($rtoi(xr[k])); in_data.im = DW'($rtoi(xi[k]));
      @(posedge clk);
      if (in_valid && in_ready) begin k++; t_last_in = cyc; end
      @(negedge clk);
    end
    // keep offering the next symbol's first word while busy: it must be held off
    in_valid = 1;
    ngot = -1;
    while (ngot < NS) @(negedge clk);
    in_valid = 0;
    // model, iteration by iteration
    exp_it = int'(iterations);
    check(exp_it >= 1 && exp_it <= MAX_ITER, $sformatf("iterations %0d", exp_it));
    for (it = 0; it < exp_it; it++) begin
      int bp;
      st_it[it] = lfsr;
      model_iteration();
      bp = 0;
      for (int p = 1; p < P; p++) if (peak[p] < peak[bp]) bp = p;
      minpk = peak[bp];
      papr_it[it] = peak[bp] * real'(NS) / sum[bp];
      for (int p = 0; p < P; p++)
        for (int n = 0; n < NS; n++) begin yr_it[it][p][n] = yr[p][n]; yi_it[it][p][n] = yi[p][n]; end
      ref_pass  = papr_it[it] < th;
      ambiguous = rabs(papr_it[it] - th) < RTOL * th;
      if (it < exp_it - 1 && !ambiguous)
        check(!ref_pass, $sformatf("iteration %0d should have been accepted (PAPR %f, th %f)", it, papr_it[it], th));
    end
    sel = int'(si);
    n_si[sel]++;
    // the transmitted iteration: the last one, or after a replay the one that matches
    src = exp_it - 1;
    if (replayed) begin
      real best_err, e;
      best_err = 1.0e30;
      for (int i = 0; i < exp_it - 1; i++) begin
        e = 0.0;
        for (int n = 0; n < NS; n++) e += rabs(real'(got[n].re) - yr_it[i][sel][n]) + rabs(real'(got[n].im) - yi_it[i][sel][n]);
        if (e < best_err) begin best_err = e; src = i; end
      end
      check(!papr_ok && exp_it == MAX_ITER, "replay only after the iteration limit");
      // the LFSR continues from the end of the regenerated iteration
      lfsr = st_it[src];
      for (int i = 0; i < L; i++) lfsr = sh(sh(lfsr));
    end
    if (!papr_ok)
      for (int i = 0; i < exp_it; i++)
        check(papr_it[src] <= papr_it[i] * (1.0 + RTOL),
              $sformatf("sent iteration %0d (PAPR %f) but iteration %0d had %f", src, papr_it[src], i, papr_it[i]));
    begin
      real pk [P];
      for (int p = 0; p < P; p++) begin
        pk[p] = 0.0;
        for (int n = 0; n < NS; n++)
          if (yr_it[src][p][n] ** 2 + yi_it[src][p][n] ** 2 > pk[p]) pk[p] = yr_it[src][p][n] ** 2 + yi_it[src][p][n] ** 2;
      end
      minpk = pk[0];
      for (int p = 1; p < P; p++) if (pk[p] < minpk) minpk = pk[p];
      check(pk[sel] <= minpk * (1.0 + RTOL) + 4.0 * TOL * TOL,
            $sformatf("chosen candidate %0d peak %f, best %f", sel, pk[sel], minpk));
    end
    papr_sel = papr_it[src];
    ambiguous = rabs(papr_it[exp_it - 1] - th) < RTOL * th;
    if (!ambiguous) begin
      check(papr_ok == (papr_it[exp_it - 1] < th), $sformatf("papr_ok %0d, model PAPR %f th %f", papr_ok, papr_it[exp_it - 1], th));
      if (!papr_ok) check(exp_it == MAX_ITER, "gave up before MAX_ITER");
    end
    maxerr = 0.0;
    for (int n = 0; n < NS; n++) begin
      real e;
      e = rabs(real'(got[n].re) - yr_it[src][sel][n]);
      if (rabs(real'(got[n].im) - yi_it[src][sel][n]) > e) e = rabs(real'(got[n].im) - yi_it[src][sel][n]);
      if (e > maxerr) maxerr = e;
      check(e <= TOL, $sformatf("sample %0d got (%0d,%0d) want (%f,%f)", n, got[n].re, got[n].im, yr_it[src][sel][n], yi_it[src][sel][n]));
    end
    // latency: per iteration NS+2 to load, ceil(log4(NS))*(NS/4+1) to transform, P*NS+4 to search
    // and decide; a replay adds NS+2+ceil(log4(NS))*(NS/4+1); the first output sample follows 4
    // cycles later
    begin
      longint lat, want, ld_tf;
      ld_tf = NS + 2 + (($clog2(NS) + 1) / 2) * (NS / 4 + 1);
      lat  = t_first_out - t_last_in;
      want = longint'(exp_it) * (ld_tf + P * NS + 4) + 4 + (replayed ? ld_tf : 0);
      check(lat == want, $sformatf("latency %0d cycles, expected %0d", lat, want));
    end
    if (replayed) n_replay++;
    if (exp_it == 1 && papr_ok) n_first_pass++;
    if (exp_it > 1 && papr_ok) n_retry++;
    if (!papr_ok) n_limit++;
    $display("symbol: th=%5.2f iterations=%0d papr_ok=%0d replayed=%0d si=%0d PAPR=%5.2f dB max err %4.1f LSB",
             th, exp_it, papr_ok, replayed, sel, 10.0 * $ln(papr_sel) / $ln(10.0), maxerr);
  endtask

  initial begin
    for (int n = 0; n < NS; n++) begin
      ct[n] = $cos(2.0 * PI * real'(n) / real'(NS));
      st[n] = $sin(2.0 * PI * real'(n) / real'(NS));
    end
    for (int r = 0; r < P; r++)
      for (int i = 0; i < N / P; i++) mat[r][i] = ($countones(r & i) % 2) * (W / 2);
    for (int p = 0; p < P; p++) n_si[p] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_symbol(255.0, 0);      // any PAPR passes
    run_symbol(1.0, 30);       // nothing passes: iteration limit
    for (int i = 0; i < 10; i++) run_symbol(4.0 + 0.5 * real'(i % 6), 10);
    // rewrite row 1 of the phase matrix with a different pattern and run again
    @(negedge clk);
    for (int i = 0; i < N / P; i++) begin
      pm_we = 1; pm_row = 1'b1; pm_col = 7'(i); pm_val = 1'((i / 3) % 2);
      mat[1][i] = (i / 3) % 2;
      @(negedge clk);
      n_pm_write++;
    end
    pm_we = 0;
    for (int i = 0; i < 4; i++) run_symbol(4.0 + 0.7 * real'(i), 0);
    check(n_first_pass > 0, "no symbol accepted on its first iteration");
    check(n_retry > 0, "no symbol accepted after a new dummy sequence");
    check(n_limit > 0, "iteration limit never reached");
    check(n_replay > 0, "best earlier iteration never replayed");
    check(n_backpressure > 0, "input never held off");
    check(n_pm_write > 0, "phase matrix never rewritten");
    for (int p = 0; p < P; p++) check(n_si[p] > 0, $sformatf("candidate %0d never chosen", p));
    $display("mechanisms: first-pass=%0d retry-pass=%0d limit=%0d replay=%0d backpressure=%0d pm-writes=%0d",
             n_first_pass, n_retry, n_limit, n_replay, n_backpressure, n_pm_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

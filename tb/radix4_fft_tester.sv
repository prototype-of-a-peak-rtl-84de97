// Test driver for one burst-I/O radix-4 core of NFFT points, used by tb_radix4_fft: random
// and structured frames are transformed in both directions and compared with a
// double-precision DFT scaled by 1/NFFT. Also checks the compute time
// (ceil(log4(NFFT))*(NFFT/4+1) cycles), reading the result twice in scrambled order, and
// that start discards a frame. `finished` rises when done; checks/failures are then final.
module radix4_fft_tester #(
  parameter int NFFT = 256
) (
  output int   checks,
  output int   failures,
  output logic finished
);
  import dsi_pkg::*;
  localparam int AW = $clog2(NFFT);
  localparam int NPASS = (AW + 1) / 2;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 6.0;

  logic clk = 0, rst_n = 0, inverse = 1, start = 0, ld_valid = 0, ld_ready, done;
  cplx_t ld_data, rd_data;
  logic [AW-1:0] rd_addr = '0;

  radix4_fft #(.NFFT(NFFT)) dut (
    .clk, .rst_n, .inverse, .start, .ld_valid, .ld_data, .ld_ready, .done, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;

  real xr [NFFT], xi [NFFT], yr [NFFT], yi [NFFT];

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL (NFFT=%0d): %s", NFFT, what); end
  endtask

  task automatic run_frame(input bit inv, input int amp, input int kind);
    int cyc;
    real sgn, e;
    inverse = inv;
    for (int k = 0; k < NFFT; k++) begin
      case (kind)
        0: begin xr[k] = real'($signed($urandom_range(2*amp, 0)) - amp);
                 xi[k] = real'($signed($urandom_range(2*amp, 0)) - amp); end
        1: begin xr[k] = (k == 3) ? real'(amp) : 0.0; xi[k] = 0.0; end
        default: begin xr[k] = ($urandom_range(1,0) != 0) ? real'(amp) : -real'(amp);
                       xi[k] = ($urandom_range(1,0) != 0) ? real'(amp) : -real'(amp); end
      endcase
    end
    sgn = inv ? 1.0 : -1.0;
    for (int n = 0; n < NFFT; n++) begin
      yr[n] = 0.0; yi[n] = 0.0;
      for (int k = 0; k < NFFT; k++) begin
        e = sgn * 2.0 * PI * real'((k * n) % NFFT) / real'(NFFT);
        yr[n] += xr[k] * $cos(e) - xi[k] * $sin(e);
        yi[n] += xr[k] * $sin(e) + xi[k] * $cos(e);
      end
      yr[n] /= real'(NFFT); yi[n] /= real'(NFFT);
    end
    // load
    @(negedge clk);
    check(ld_ready, "ld_ready in LOAD");
    for (int k = 0; k < NFFT; k++) begin
      ld_valid = 1;
      ld_data.re = DW'($rtoi(xr[k])); ld_data.im = DW'($rtoi(xi[k]));
      @(negedge clk);
      if (k == NFFT - 1) check(!ld_ready, "ld_ready drops after the frame");
    end
    ld_valid = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == NPASS * (NFFT / 4 + 1) + 1, $sformatf("compute cycles %0d", cyc));
    // read in a scrambled order, twice
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < NFFT; i++) begin
        int n;
        n = (i * 37 + pass * 11) % NFFT;
        rd_addr = AW'(n);
        @(negedge clk);
        check(rabs(real'(rd_data.re) - yr[n]) <= TOL && rabs(real'(rd_data.im) - yi[n]) <= TOL,
              $sformatf("inv=%0d X[%0d] = (%0d,%0d) want (%f,%f)", inv, n, rd_data.re, rd_data.im, yr[n], yi[n]));
      end
    end
    start = 1; @(negedge clk); start = 0;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(1, 8191, 1);
    run_frame(1, 8191, 0);
    run_frame(1, 8192, 2);
    run_frame(0, 8191, 0);
    run_frame(0, 8192, 2);
    // abandon a half-loaded frame: start must bring the core back to an empty LOAD
    ld_valid = 1; ld_data = '{re: 16'sd100, im: 16'sd0};
    repeat (40) @(negedge clk);
    ld_valid = 0;
    start = 1; @(negedge clk); start = 0;
    run_frame(1, 4000, 0);
    finished = 1'b1;
  end
endmodule

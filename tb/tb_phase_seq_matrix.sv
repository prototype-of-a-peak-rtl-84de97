// Testbench of the phase-sequence matrix at the default size (N=256, V=2, W=2, D=1, so
// P=2 rows of 128 columns) and at V=3, W=4, D=2 (P=32 rows of 8 columns). Checks the reset contents
// (Walsh-Hadamard +-1 pattern), the interleaved read-out (column n mod N/P), the
// candidate-to-row mapping (sub-block 0 fixed at 1, sub-block v>=1 row (p+v-1) mod P), the
// W-ary phase values, writes, and the one-cycle latency.
module tb_phase_seq_matrix;
  import dsi_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  // default instance: P = 2
  logic we = 0;
  logic [0:0] wrow = '0, cand = '0, wval = '0;
  logic [6:0] wcol = '0;
  logic [7:0] n = '0;
  twid_t [1:0] c;
  // second instance: V=3, W=4, D=2 -> P = 2*4^2 = 32 rows of 8 columns
  logic we2 = 0;
  logic [4:0] wrow2 = '0, cand2 = '0;
  logic [2:0] wcol2 = '0;
  logic [1:0] wval2 = '0;
  twid_t [2:0] c2;
  int m1 [2][128];
  int m2 [32][8];
  int checks = 0, failures = 0;

  phase_seq_matrix #(.N(256), .V(2), .W(2), .D(1)) dut (
    .clk, .rst_n, .we, .wrow, .wcol, .wval, .cand, .n, .c);
  phase_seq_matrix #(.N(256), .V(3), .W(4), .D(2)) dut2 (
    .clk, .rst_n, .we(we2), .wrow(wrow2), .wcol(wcol2), .wval(wval2), .cand(cand2), .n(n), .c(c2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input twid_t z, input int idx, input int w);
    real a, er, ei;
    a  = 2.0 * PI * real'(idx) / real'(w);
    er = 16384.0 * $cos(a); ei = 16384.0 * $sin(a);
    return (real'(z.re) - er < 1.0) && (er - real'(z.re) < 1.0) &&
           (real'(z.im) - ei < 1.0) && (ei - real'(z.im) < 1.0);
  endfunction

  task automatic sweep();
    for (int i = 0; i < 600; i++) begin
      int p, p2, nn;
      p = $urandom_range(1, 0); p2 = $urandom_range(31, 0); nn = $urandom_range(255, 0);
      cand = 1'(p); cand2 = 5'(p2); n = 8'(nn);
      @(negedge clk);
      checks += 2;
      if (!near(c[0], 0, 2) || !near(c[1], m1[(p + 0) % 2][nn % 128], 2)) begin
        failures++; $display("FAIL: P=2 cand %0d n %0d", p, nn);
      end
      if (!near(c2[0], 0, 4) || !near(c2[1], m2[p2 % 32][nn % 8], 4) ||
          !near(c2[2], m2[(p2 + 1) % 32][nn % 8], 4)) begin
        failures++; $display("FAIL: P=32 cand %0d n %0d", p2, nn);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 2; r++) for (int i = 0; i < 128; i++) m1[r][i] = $countones(r & i) % 2;
    for (int r = 0; r < 32; r++) for (int i = 0; i < 8; i++) m2[r][i] = ($countones(r & i) % 2) * 2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sweep();
    // overwrite both matrices with random phase indices
    for (int r = 0; r < 2; r++) for (int i = 0; i < 128; i++) begin
      we = 1; wrow = 1'(r); wcol = 7'(i); wval = 1'($urandom_range(1, 0));
      m1[r][i] = int'(wval);
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < 32; r++) for (int i = 0; i < 8; i++) begin
      we2 = 1; wrow2 = 5'(r); wcol2 = 3'(i); wval2 = 2'($urandom_range(3, 0));
      m2[r][i] = int'(wval2);
      @(negedge clk);
    end
    we2 = 0;
    sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

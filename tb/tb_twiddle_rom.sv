// Testbench of the twiddle ROM: every entry, forward and conjugated, against
// round(2^14 * cos/sin(2*pi*k/N)) within 1 LSB, with the one-cycle read latency.
module tb_twiddle_rom;
  import dsi_pkg::*;
  localparam int NFFT = 256;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, inverse = 0;
  logic [7:0] addr = '0;
  twid_t w;
  int checks = 0, failures = 0;
  twiddle_rom #(.NFFT(NFFT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real er, ei, a;
    for (int inv = 0; inv < 2; inv++)
      for (int k = 0; k < NFFT; k++) begin
        @(negedge clk);
        addr = 8'(k); inverse = inv[0];
        @(negedge clk);
        a  = 2.0 * PI * real'(k) / real'(NFFT);
        er = 16384.0 * $cos(a);
        ei = (inv != 0 ? 16384.0 : -16384.0) * $sin(a);
        checks++;
        if (real'(w.re) - er > 1.0 || er - real'(w.re) > 1.0 ||
            real'(w.im) - ei > 1.0 || ei - real'(w.im) > 1.0) begin
          failures++;
          $display("FAIL: k=%0d inv=%0d w=(%0d,%0d) want (%f,%f)", k, inv, w.re, w.im, er, ei);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

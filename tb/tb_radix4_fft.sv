// Self-checking testbench of the burst-I/O radix-4 core. It runs the same frame tests
// (random and structured frames, both directions, against a double-precision DFT scaled by
// 1/NFFT, plus compute time and frame abort) on three sizes: 256 = 4**4 points, which uses
// radix-4 passes only, and 512 = 2*4**4 and 32 = 2*4**2 points, which end with the radix-2 pass.
module tb_radix4_fft;
  int   c [3], f [3];
  logic d [3];

  radix4_fft_tester #(.NFFT(256)) t0 (.checks(c[0]), .failures(f[0]), .finished(d[0]));
  radix4_fft_tester #(.NFFT(512)) t1 (.checks(c[1]), .failures(f[1]), .finished(d[1]));
  radix4_fft_tester #(.NFFT(32))  t2 (.checks(c[2]), .failures(f[2]), .finished(d[2]));

  initial begin
    #4000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    #1;   // let the testers clear their finished flags first
    wait (d[0] && d[1] && d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end
endmodule

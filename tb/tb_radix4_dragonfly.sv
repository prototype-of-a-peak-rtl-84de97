// Testbench of the radix-4 dragonfly: random legs and random unit-magnitude twiddles
// against a floating-point 4-point DFT of the twiddled legs, divided by 4 (1 LSB tolerance),
// in both directions; then the radix-2 mode (w[1] = 1) against two twiddled 2-point
// butterflies divided by 2.
module tb_radix4_dragonfly;
  import dsi_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic inverse, radix2 = 1'b0;
  cplx_t [3:0] x, y;
  twid_t [2:0] w;
  int checks = 0, failures = 0;
  radix4_dragonfly dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    real tr [4], ti [4], wr, wi, ang, yr, yi, s;
    for (int i = 0; i < 1500; i++) begin
      inverse = 1'(i % 2);
      radix2  = (i >= 1000);
      s = inverse ? 1.0 : -1.0;
      for (int m = 0; m < 4; m++) begin
        x[m].re = DW'($urandom_range(16383, 0) - 8192);
        x[m].im = DW'($urandom_range(16383, 0) - 8192);
      end
      tr[0] = real'(x[0].re); ti[0] = real'(x[0].im);
      for (int m = 1; m < 4; m++) begin
        ang = 2.0 * PI * real'($urandom_range(255, 0)) / 256.0;
        w[m-1].re = TW'($rtoi($floor(16384.0 * $cos(ang) + 0.5)));
        w[m-1].im = TW'($rtoi($floor(16384.0 * $sin(ang) + 0.5)));
        if (radix2 && m == 2) begin w[1].re = 16'sd16384; w[1].im = '0; end
        wr = real'(w[m-1].re) / 16384.0; wi = real'(w[m-1].im) / 16384.0;
        tr[m] = real'(x[m].re) * wr - real'(x[m].im) * wi;
        ti[m] = real'(x[m].re) * wi + real'(x[m].im) * wr;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        yr = 0.0; yi = 0.0;
        if (radix2) begin
          s = (k % 2 == 0) ? 1.0 : -1.0;
          yr = (tr[k & 2] + s * tr[(k & 2) + 1]) * 2.0;
          yi = (ti[k & 2] + s * ti[(k & 2) + 1]) * 2.0;
        end
        else for (int m = 0; m < 4; m++) begin
          ang = s * 2.0 * PI * real'((m * k) % 4) / 4.0;
          yr += tr[m] * $cos(ang) - ti[m] * $sin(ang);
          yi += tr[m] * $sin(ang) + ti[m] * $cos(ang);
        end
        yr /= 4.0; yi /= 4.0;
        checks++;
        if (rabs(real'(y[k].re) - yr) > 1.0 || rabs(real'(y[k].im) - yi) > 1.0) begin
          failures++;
          $display("FAIL: inv=%0d y[%0d]=(%0d,%0d) want (%f,%f)", inverse, k, y[k].re, y[k].im, yr, yi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

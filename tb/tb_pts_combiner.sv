// Testbench of the PTS combiner (V=2 default and a V=4 instance): random samples and unit
// phase factors against a floating-point sum of rotated samples (1 LSB per sub-block),
// the power output against the squared output exactly, saturation of an oversized sum,
// and the one-cycle latency of out_valid.
module tb_pts_combiner;
  import dsi_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, ov4;
  cplx_t [1:0] u;
  twid_t [1:0] c;
  cplx_t [3:0] u4;
  twid_t [3:0] c4;
  cplx_t y, y4;
  logic [2*DW:0] pwr, pwr4;
  int checks = 0, failures = 0;
  pts_combiner #(.V(2)) dut (.*);
  pts_combiner #(.V(4)) dut4 (.clk, .rst_n, .in_valid, .u(u4), .c(c4), .out_valid(ov4), .y(y4), .pwr(pwr4));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  function automatic twid_t rnd_phase();
    real a;
    twid_t t;
    a = 2.0 * PI * real'($urandom_range(7, 0)) / 8.0;
    t.re = TW'($rtoi($floor(16384.0 * $cos(a) + 0.5)));
    t.im = TW'($rtoi($floor(16384.0 * $sin(a) + 0.5)));
    return t;
  endfunction

  initial begin
    real er, ei, er4, ei4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      in_valid = 1'(i % 3 != 0);
      er = 0.0; ei = 0.0; er4 = 0.0; ei4 = 0.0;
      for (int v = 0; v < 4; v++) begin
        u4[v].re = DW'($urandom_range(8191, 0) - 4096);
        u4[v].im = DW'($urandom_range(8191, 0) - 4096);
        c4[v] = rnd_phase();
        er4 += (real'(u4[v].re) * real'(c4[v].re) - real'(u4[v].im) * real'(c4[v].im)) / 16384.0;
        ei4 += (real'(u4[v].re) * real'(c4[v].im) + real'(u4[v].im) * real'(c4[v].re)) / 16384.0;
        if (v < 2) begin
          u[v] = u4[v]; c[v] = c4[v];
          er = er4; ei = ei4;
        end
      end
      @(negedge clk);
      checks += 4;
      if (out_valid != in_valid || ov4 != in_valid) begin failures++; $display("FAIL: valid"); end
      if (rabs(real'(y.re) - er) > 2.0 || rabs(real'(y.im) - ei) > 2.0) begin
        failures++; $display("FAIL: V=2 y=(%0d,%0d) want (%f,%f)", y.re, y.im, er, ei);
      end
      if (rabs(real'(y4.re) - er4) > 4.0 || rabs(real'(y4.im) - ei4) > 4.0) begin
        failures++; $display("FAIL: V=4 y=(%0d,%0d) want (%f,%f)", y4.re, y4.im, er4, ei4);
      end
      if (longint'(pwr) != longint'(y.re) * y.re + longint'(y.im) * y.im) begin
        failures++; $display("FAIL: pwr");
      end
    end
    // saturation: two large in-phase samples
    u[0] = '{re: 16'sd30000, im: -16'sd30000}; u[1] = u[0];
    c[0] = '{re: 16'sd16384, im: 16'sd0}; c[1] = c[0];
    in_valid = 1;
    @(negedge clk);
    checks++;
    if (y.re != 16'sd32767 || y.im != -16'sd32768) begin failures++; $display("FAIL: saturation (%0d,%0d)", y.re, y.im); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

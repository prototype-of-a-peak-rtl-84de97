// Testbench of the complex multiplier: random operands against an integer model of
// (a*b) >> 14 with round-half-up, plus exact products by 1, -1, j and -j.
module tb_cmplx_mult;
  import dsi_pkg::*;
  cplx_t a, p;
  twid_t b;
  int checks = 0, failures = 0;
  cmplx_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rshr(input longint x);
    return (x + (1 << 13)) >>> 14;
  endfunction

  initial begin
    longint er, ei;
    for (int i = 0; i < 2000; i++) begin
      a.re = DW'($urandom_range(32767, 0) - 16384);
      a.im = DW'($urandom_range(32767, 0) - 16384);
      case (i % 5)
        0: b = '{re: 16'sd16384, im: 16'sd0};
        1: b = '{re: -16'sd16384, im: 16'sd0};
        2: b = '{re: 16'sd0, im: 16'sd16384};
        3: b = '{re: 16'sd11585, im: -16'sd11585};
        default: begin
          b.re = TW'($urandom_range(32768, 0) - 16384);
          b.im = TW'($urandom_range(32768, 0) - 16384);
        end
      endcase
      #1;
      er = rshr(longint'(a.re) * longint'(b.re) - longint'(a.im) * longint'(b.im));
      ei = rshr(longint'(a.re) * longint'(b.im) + longint'(a.im) * longint'(b.re));
      checks++;
      if (longint'(p.re) != er || longint'(p.im) != ei) begin
        failures++;
        $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d) want (%0d,%0d)", a.re, a.im, b.re, b.im, p.re, p.im, er, ei);
      end
      if (i % 5 == 1) begin
        checks++;
        if (p.re != -a.re || p.im != -a.im) begin failures++; $display("FAIL: times -1"); end
      end
      if (i % 5 == 2) begin
        checks++;
        if (p.re != -a.im || p.im != a.re) begin failures++; $display("FAIL: times j"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

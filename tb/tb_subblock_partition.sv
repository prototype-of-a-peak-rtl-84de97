// Testbench of sub-block partitioning: adjacent (V=2 and V=4) and interleaved (V=4)
// instances; every index goes to exactly one sub-block, the right one, and the sub-blocks
// sum back to U.
module tb_subblock_partition;
  import dsi_pkg::*;
  logic [7:0] idx;
  cplx_t u;
  cplx_t [1:0] a2;
  cplx_t [3:0] a4, i4;
  int checks = 0, failures = 0;
  subblock_partition #(.N(256), .V(2), .ADJACENT(1'b1)) dut (.idx(idx), .u(u), .uv(a2));
  subblock_partition #(.N(256), .V(4), .ADJACENT(1'b1)) dut_a4 (.idx(idx), .u(u), .uv(a4));
  subblock_partition #(.N(256), .V(4), .ADJACENT(1'b0)) dut_i4 (.idx(idx), .u(u), .uv(i4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      idx = 8'(n);
      u.re = DW'($urandom_range(2000, 1)); u.im = -DW'($urandom_range(2000, 1));
      #1;
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (a2[v] != ((n / 128 == v) ? u : '0)) begin failures++; $display("FAIL: adjacent V=2 n=%0d v=%0d", n, v); end
      end
      for (int v = 0; v < 4; v++) begin
        checks += 2;
        if (a4[v] != ((n / 64 == v) ? u : '0)) begin failures++; $display("FAIL: adjacent V=4 n=%0d v=%0d", n, v); end
        if (i4[v] != ((n % 4 == v) ? u : '0)) begin failures++; $display("FAIL: interleaved V=4 n=%0d v=%0d", n, v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

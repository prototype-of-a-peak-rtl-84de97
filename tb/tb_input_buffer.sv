// Testbench of the symbol buffer: fills all 201 words, reads them back in two orders with
// the one-cycle latency, and checks that a write during reads does not disturb other words.
module tb_input_buffer;
  import dsi_pkg::*;
  localparam int DEPTH = 201;
  logic clk = 0, we = 0;
  logic [7:0] waddr = '0, raddr = '0;
  cplx_t wdata = '0, rdata;
  cplx_t model [DEPTH];
  int checks = 0, failures = 0;
  input_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i);
      wdata.re = DW'($urandom); wdata.im = DW'($urandom);
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < DEPTH; i++) begin
        int a;
        a = pass == 0 ? i : (i * 17) % DEPTH;
        raddr = 8'(a);
        // rewrite a different word at the same time
        we = 1; waddr = 8'((a + 1) % DEPTH); wdata.re = DW'($urandom); wdata.im = DW'($urandom);
        @(negedge clk);
        model[(a + 1) % DEPTH] = wdata;
        checks++;
        if (rdata != model[a]) begin failures++; $display("FAIL: word %0d", a); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

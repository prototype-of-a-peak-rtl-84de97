// Testbench of the dummy-sequence generator: after reset the output follows the sequence
// of the 16-bit LFSR x^16+x^14+x^13+x^11+1 stepped twice per value, mapped to +-AMP QPSK
// points; it holds when step is low, load overrides step with a given state, the state
// output always shows the register, and the output changes often.
module tb_dummy_seq_gen;
  import dsi_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, load = 0;
  logic [15:0] load_val = '0, state;
  cplx_t dummy;
  int checks = 0, failures = 0;
  dummy_seq_gen #(.AMP(4096)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] s;
    cplx_t prev;
    int changes;
    s = 16'hACE1;
    changes = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      step = ($urandom_range(3, 0) != 0);
      load = ($urandom_range(15, 0) == 0);
      load_val = 16'($urandom_range(16'hFFFF, 1));
      checks += 2;
      if (state != s) begin failures++; $display("FAIL: state %0d", i); end
      if (dummy.re != (s[0] ? -16'sd4096 : 16'sd4096) || dummy.im != (s[1] ? -16'sd4096 : 16'sd4096)) begin
        failures++; $display("FAIL: value %0d", i);
      end
      prev = dummy;
      @(negedge clk);
      if (load) begin
        s = load_val;
      end else if (step) begin
        for (int k = 0; k < 2; k++) s = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
        if (dummy != prev) changes++;
      end else begin
        checks++;
        if (dummy != prev) begin failures++; $display("FAIL: changed without step"); end
      end
    end
    checks++;
    if (changes < 100) begin failures++; $display("FAIL: output rarely changes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

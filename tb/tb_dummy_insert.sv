// Testbench of dummy insertion with N=256, L=55 and an oversampled S=4 instance: indices
// below N-L pass data, the next L pass the dummy value, the oversampling tail is zero.
module tb_dummy_insert;
  import dsi_pkg::*;
  logic [7:0] idx;
  logic [9:0] idx4;
  cplx_t data, dummy, u, u4;
  logic is_data, is_dummy, is_data4, is_dummy4;
  int checks = 0, failures = 0;
  dummy_insert #(.N(256), .L(55), .S(1)) dut (.*);
  dummy_insert #(.N(256), .L(55), .S(4)) dut4 (.idx(idx4), .data(data), .dummy(dummy), .u(u4),
                                                .is_data(is_data4), .is_dummy(is_dummy4));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data  = '{re: 16'sd1111, im: -16'sd2222};
    dummy = '{re: -16'sd4096, im: 16'sd4096};
    for (int n = 0; n < 1024; n++) begin
      cplx_t e;
      idx = 8'(n); idx4 = 10'(n);
      #1;
      e = (n < 201) ? data : (n < 256) ? dummy : '0;
      checks++;
      if (u4 != e || is_data4 != (n < 201) || is_dummy4 != (n >= 201 && n < 256)) begin
        failures++; $display("FAIL: S=4 index %0d", n);
      end
      if (n < 256) begin
        checks++;
        if (u != e || is_data != (n < 201) || is_dummy != (n >= 201)) begin
          failures++; $display("FAIL: index %0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

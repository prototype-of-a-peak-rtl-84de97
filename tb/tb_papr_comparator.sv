// Testbench of the PAPR comparator with NS=256: bursts of random powers for P candidates
// (P = 2 and 4), checked against a model of argmin-peak, the earliest candidate on ties,
// and the threshold test peak*NS/sum < th; also checks clear and that done waits for s_final.
module tb_papr_comparator;
  localparam int NS = 256, PW = 33, CW = 2;
  logic clk = 0, rst_n = 0, clear = 0, s_valid = 0, s_last = 0, s_final = 0, pass, done;
  logic [PW-1:0] s_pwr = '0, best_peak;
  logic [CW-1:0] s_cand = '0, best_cand;
  logic [PW+7:0] best_sum;
  logic [15:0] papr_th = '0;
  int checks = 0, failures = 0;
  papr_comparator #(.NS(NS), .PW(PW), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint pk [4], sm [4];
    int best, np;
    real papr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      np = (trial % 2 == 0) ? 2 : 4;
      clear = 1; @(negedge clk); clear = 0;
      for (int p = 0; p < np; p++) begin
        pk[p] = 0; sm[p] = 0;
        for (int n = 0; n < NS; n++) begin
          longint v;
          v = longint'($urandom_range(200000, 0));
          if (n == 17 && trial % 5 == 0) v = 2000000;          // forced equal peaks
          else if (n == 100 + p) v = 1000000 + p * 37 * (trial % 3);
          s_valid = ($urandom_range(3, 0) != 0);
          while (!s_valid) begin
            @(negedge clk);
            s_valid = 1;
          end
          s_pwr = PW'(v); s_cand = CW'(p);
          s_last = (n == NS - 1); s_final = s_last && (p == np - 1);
          if (v > pk[p]) pk[p] = v;
          sm[p] += v;
          @(negedge clk);
          if (!(s_final)) check(!done, "done too early");
        end
      end
      s_valid = 0; s_last = 0; s_final = 0;
      best = 0;
      for (int p = 1; p < np; p++) if (pk[p] < pk[best]) best = p;
      papr = real'(pk[best]) * real'(NS) / real'(sm[best]);
      papr_th = 16'(int'((papr + ((trial % 4 < 2) ? 0.05 : -0.05)) * 256.0));
      #1;
      check(done, "done after final");
      check(int'(best_cand) == best, $sformatf("best %0d want %0d", best_cand, best));
      check(longint'(best_peak) == pk[best] && longint'(best_sum) == sm[best], "best peak/sum");
      check(pass == (longint'(best_peak) * NS * 256 < longint'(papr_th) * sm[best]),
            $sformatf("pass %0d papr %f th %0d", pass, papr, papr_th));
      check(pass == (trial % 4 < 2), "pass follows threshold side");
      @(negedge clk);
    end
    clear = 1; @(negedge clk); clear = 0;
    check(!done, "clear resets done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

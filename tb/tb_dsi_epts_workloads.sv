// Workload testbench: runs the transmitter in the configurations the scheme is evaluated
// in: N=512 sub-carriers oversampled by S=4 (2048-point IFFTs) with V=2, D=1; V=2, D=2;
// V=4, D=1; and N=256 with the interleaved partition at S=1. Each runs a few random symbols
// against the floating-point model in dsi_epts_harness and reports the mean PAPR of the
// plain symbol and of the transmitted one. A configuration whose transmitted mean PAPR is
// not below the plain symbol's is a failure.
module tb_dsi_epts_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 4;
  logic fin [NC];
  int   ch [NC], fl [NC], rt [NC], lm [NC], rp [NC];
  real  pp [NC], pt [NC];
  string names [NC] = '{"N=512 S=4 V=2 D=1 (P=2)", "N=512 S=4 V=2 D=2 (P=4)",
                        "N=512 S=4 V=4 D=1 (P=8)", "N=256 S=1 V=2 D=1 interleaved"};

  dsi_epts_harness #(.N(512), .V(2), .D(1), .S(4), .NSYM(5), .TH_Q88(1280)) h0 (
    .clk, .finished(fin[0]), .checks(ch[0]), .failures(fl[0]), .papr_plain_db(pp[0]), .papr_tx_db(pt[0]), .retries(rt[0]), .limits(lm[0]), .replays(rp[0]));
  dsi_epts_harness #(.N(512), .V(2), .D(2), .S(4), .NSYM(5), .TH_Q88(1280)) h1 (
    .clk, .finished(fin[1]), .checks(ch[1]), .failures(fl[1]), .papr_plain_db(pp[1]), .papr_tx_db(pt[1]), .retries(rt[1]), .limits(lm[1]), .replays(rp[1]));
  dsi_epts_harness #(.N(512), .V(4), .D(1), .S(4), .NSYM(4), .TH_Q88(1280)) h2 (
    .clk, .finished(fin[2]), .checks(ch[2]), .failures(fl[2]), .papr_plain_db(pp[2]), .papr_tx_db(pt[2]), .retries(rt[2]), .limits(lm[2]), .replays(rp[2]));
  dsi_epts_harness #(.N(256), .V(2), .D(1), .S(1), .ADJACENT(1'b0), .NSYM(8), .TH_Q88(1280)) h3 (
    .clk, .finished(fin[3]), .checks(ch[3]), .failures(fl[3]), .papr_plain_db(pp[3]), .papr_tx_db(pt[3]), .retries(rt[3]), .limits(lm[3]), .replays(rp[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;   // let the harnesses clear their finished flags first
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int c = 0; c < NC; c++) begin
      checks += ch[c] + 1;
      failures += fl[c];
      if (!(pt[c] < pp[c])) begin
        failures++;
        $display("FAIL: %s gives no PAPR reduction", names[c]);
      end
      $display("%-32s mean PAPR plain %5.2f dB, transmitted %5.2f dB, retries %0d, at limit %0d, replays %0d",
               names[c], pp[c], pt[c], rt[c], lm[c], rp[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

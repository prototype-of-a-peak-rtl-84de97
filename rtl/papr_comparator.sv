// PAPR comparator and optimum-candidate selector.
//
// For every candidate phase sequence it receives the NS values |u'[n]|^2 in a burst
// (s_valid; s_last on the candidate's last sample, s_cand its index). It keeps the peak
// and the sum of the burst. At s_last the candidate becomes the best one if its peak is
// strictly below the best so far (argmin of the peak, ties keep the earlier candidate).
// With s_final on the last sample of the last candidate, `done` rises one cycle later
// and holds, together with best_cand/best_peak/best_sum, until `clear`.
// `pass` (valid with done) is the PAPR test peak/mean < papr_th, evaluated without a
// divider as  best_peak * NS * 256 < papr_th * best_sum,  papr_th being a linear power ratio
// in unsigned Q8.8. Choosing the candidate with the smallest peak and testing PAPR against a
// threshold follow the scheme; the threshold format and the tie rule are this design's choice.
module papr_comparator #(
  parameter int NS = 256,
  parameter int PW = 33,
  parameter int CW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          s_valid,
  input  logic [PW-1:0] s_pwr,
  input  logic          s_last,
  input  logic          s_final,
  input  logic [CW-1:0] s_cand,
  input  logic [15:0]   papr_th,
  output logic [CW-1:0] best_cand,
  output logic [PW-1:0] best_peak,
  output logic [PW+$clog2(NS)-1:0] best_sum,
  output logic          pass,
  output logic          done
);
  localparam int SUMW = PW + $clog2(NS);
  localparam int MW   = SUMW + 16;

  logic [PW-1:0]   cur_peak;
  logic [SUMW-1:0] cur_sum;
  logic            have_best;

  logic [PW-1:0]   nxt_peak;
  logic [SUMW-1:0] nxt_sum;
  always_comb begin
    nxt_peak = (s_pwr > cur_peak) ? s_pwr : cur_peak;
    nxt_sum  = cur_sum + SUMW'(s_pwr);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cur_peak  <= '0;
      cur_sum   <= '0;
      have_best <= 1'b0;
      best_cand <= '0;
      best_peak <= '0;
      best_sum  <= '0;
      done      <= 1'b0;
    end else if (s_valid) begin
      if (s_last) begin
        cur_peak <= '0;
        cur_sum  <= '0;
        if (!have_best || nxt_peak < best_peak) begin
          have_best <= 1'b1;
          best_cand <= s_cand;
          best_peak <= nxt_peak;
          best_sum  <= nxt_sum;
        end
        if (s_final) done <= 1'b1;
      end else begin
        cur_peak <= nxt_peak;
        cur_sum  <= nxt_sum;
      end
    end
  end

  assign pass = done && ((MW'(best_peak) * MW'(NS) * MW'(256)) < (MW'(papr_th) * MW'(best_sum)));
endmodule

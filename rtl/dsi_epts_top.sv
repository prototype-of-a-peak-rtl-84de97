// DSI-EPTS transmitter: dummy-sequence-insertion enhanced partial transmit sequence PAPR
// reduction for one OFDM symbol at a time.
//
// Data path: the K = N-L data sub-carriers of a symbol arrive serially (in_valid/in_ready)
// and are stored in input_buffer. For every iteration the vector U = [data, dummy] is
// rebuilt index by index (dummy_insert, with fresh values from dummy_seq_gen), split into V
// disjoint sub-blocks (subblock_partition) and loaded into V radix4_fft cores working as
// IFFTs of N*S points. When the IFFTs are done, all P = D*W^(V-1) candidate phase sequences
// of phase_seq_matrix are tried: for each candidate the N*S combined samples
// sum_v c_v[n] u_v[n] are formed by pts_combiner and papr_comparator keeps the peak and
// mean power, choosing the candidate with the smallest peak. If that candidate's PAPR is
// below papr_th its combined signal is streamed out; otherwise a new dummy sequence is
// inserted and the symbol goes round again. After MAX_ITER failed iterations the iteration
// with the lowest PAPR is sent: if it is an earlier one, the dummy generator is set back to
// the state it had at the start of that iteration and the IFFTs are run once more (replay)
// to regenerate it, and its recorded candidate is transmitted without a new search.
//
// Interface: in_data is accepted on in_valid && in_ready. The output stream has no back
// pressure: out_valid is high for N*S consecutive cycles, out_first marks sample 0, and si
// (the chosen candidate, the side information for the receiver), papr_ok, iterations and
// replayed (an earlier iteration was regenerated) are steady while it streams. The
// phase matrix may be rewritten through pm_* when busy is low.
// Timing, for N*S = NS, counted from the edge that took the last input: each iteration
// takes NS+2 cycles to load the IFFTs, ceil(log4(NS))*(NS/4+1) to transform and P*NS+4 to
// search and decide; a replay adds NS+2+ceil(log4(NS))*(NS/4+1); the first output sample
// appears 4 cycles after the last decision (or after the replayed transform).
//
// Follows the scheme: the block chain of dummy insertion, partitioning, per-sub-block IFFT,
// phase rotation, summation and PAPR comparison with a retry on failure, the interleaved
// matrix with P = D*W^(V-1) rows, and the N=256, V=2, W=2, L=55 prototype configuration.
// This design's own choices: the iteration limit MAX_ITER, sending the best of all
// iterations (by replay) when the limit is reached, the candidate-to-row mapping, the
// fixed-point formats and the handshake.
module dsi_epts_top
  import dsi_pkg::*;
#(
  parameter int N        = 256,
  parameter int V        = 2,
  parameter int W        = 2,
  parameter int D        = 1,
  parameter int L        = 55,
  parameter int S        = 1,
  parameter int MAX_ITER = 4,
  parameter bit ADJACENT = 1'b1,
  parameter int DUMMY_AMP = 4096,
  localparam int NS  = N * S,
  localparam int NB  = $clog2(NS),
  localparam int P   = D * (W ** (V - 1)),
  localparam int PB  = (P > 1) ? $clog2(P) : 1,
  localparam int CB  = (N / P > 1) ? $clog2(N / P) : 1,
  localparam int WB  = $clog2(W),
  localparam int K   = N - L,
  localparam int KB  = $clog2(K),
  localparam int IB  = $clog2(MAX_ITER + 1),
  localparam int PW  = 2 * DW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // data sub-carriers in
  input  logic          in_valid,
  output logic          in_ready,
  input  cplx_t         in_data,
  // PAPR threshold, linear power ratio in unsigned Q8.8
  input  logic [15:0]   papr_th,
  // phase-sequence matrix write port
  input  logic          pm_we,
  input  logic [PB-1:0] pm_row,
  input  logic [CB-1:0] pm_col,
  input  logic [WB-1:0] pm_val,
  // transmitted signal out
  output logic          out_valid,
  output logic          out_first,
  output cplx_t         out_data,
  output logic [PB-1:0] si,
  output logic          papr_ok,
  output logic [IB-1:0] iterations,
  output logic          replayed,
  output logic          busy
);
  initial begin
    assert (L < K) else $fatal(1, "dsi_epts_top: L must be smaller than N-L");
    assert (MAX_ITER >= 1) else $fatal(1, "dsi_epts_top: MAX_ITER must be at least 1");
  end

  typedef enum logic [2:0] {
    ST_IN, ST_FEED, ST_FFT, ST_SEARCH, ST_DRAIN, ST_DECIDE, ST_TX, ST_TXDRAIN
  } state_t;
  localparam int SUMW = PW + NB;
  state_t state;

  logic [KB-1:0] wr_cnt;
  logic [NB-1:0] n;
  logic [PB-1:0] cand;
  logic [IB-1:0] iter;

  // ------------------------------------------------------------------ input buffer
  logic  buf_we;
  cplx_t buf_rdata;
  logic [KB-1:0] buf_raddr;
  assign in_ready  = (state == ST_IN);
  assign buf_we    = in_valid && in_ready;
  assign buf_raddr = (int'(n) < K) ? KB'(n) : '0;

  input_buffer #(.DEPTH(K)) u_buf (
    .clk(clk), .we(buf_we), .waddr(wr_cnt), .wdata(in_data),
    .raddr(buf_raddr), .rdata(buf_rdata)
  );

  // ------------------------------------------------------------------ U build and IFFT load
  logic          f_valid;      // one cycle behind the FEED issue, aligned with buf_rdata
  logic [NB-1:0] f_idx;
  cplx_t         dummy, u;
  logic          is_dummy;
  cplx_t [V-1:0] uv;

  // best iteration so far: dummy-generator state at its start, its candidate, peak and sum
  logic [15:0]     dg_state, it_state, bi_state;
  logic            dg_load, replay, bi_valid;
  logic [PB-1:0]   bi_cand;
  logic [PW-1:0]   bi_peak;
  logic [SUMW-1:0] bi_sum;

  dummy_seq_gen #(.AMP(DUMMY_AMP)) u_dgen (
    .clk(clk), .rst_n(rst_n), .step(f_valid && is_dummy),
    .load(dg_load), .load_val(bi_state), .state(dg_state), .dummy(dummy)
  );

  dummy_insert #(.N(N), .L(L), .S(S)) u_dsi (
    .idx(f_idx), .data(buf_rdata), .dummy(dummy), .u(u), .is_data(), .is_dummy(is_dummy)
  );

  subblock_partition #(.N(N), .V(V), .S(S), .ADJACENT(ADJACENT)) u_part (
    .idx(f_idx), .u(u), .uv(uv)
  );

  logic          fft_start;
  logic [V-1:0]  fft_done, fft_ready;
  cplx_t [V-1:0] fft_q;

  for (genvar v = 0; v < V; v++) begin : g_ifft
    radix4_fft #(.NFFT(NS)) u_ifft (
      .clk(clk), .rst_n(rst_n), .inverse(1'b1), .start(fft_start),
      .ld_valid(f_valid), .ld_data(uv[v]), .ld_ready(fft_ready[v]), .done(fft_done[v]),
      .rd_addr(n), .rd_data(fft_q[v])
    );
  end

  // ------------------------------------------------------------------ search / transmit
  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic          final_;
    logic          tx;
    logic [PB-1:0] cand;
  } tag_t;

  tag_t          issue_tag, tag1, tag2;
  twid_t [V-1:0] phase;
  logic          cmb_valid;
  cplx_t         cmb_y;
  logic [PW-1:0] cmb_pwr;

  always_comb begin
    issue_tag.valid  = (state == ST_SEARCH) || (state == ST_TX);
    issue_tag.first  = (n == '0);
    issue_tag.last   = (int'(n) == NS - 1);
    issue_tag.final_ = issue_tag.last && (int'(cand) == P - 1);
    issue_tag.tx     = (state == ST_TX);
    issue_tag.cand   = cand;
  end

  phase_seq_matrix #(.N(N), .V(V), .W(W), .D(D), .S(S)) u_pm (
    .clk(clk), .rst_n(rst_n), .we(pm_we && !busy), .wrow(pm_row), .wcol(pm_col), .wval(pm_val),
    .cand(cand), .n(n), .c(phase)
  );

  pts_combiner #(.V(V)) u_comb (
    .clk(clk), .rst_n(rst_n), .in_valid(tag1.valid), .u(fft_q), .c(phase),
    .out_valid(cmb_valid), .y(cmb_y), .pwr(cmb_pwr)
  );

  logic          cmp_clear, cmp_pass, cmp_done;
  logic [PB-1:0] best_cand;
  logic [PW-1:0] best_peak;
  logic [SUMW-1:0] best_sum;

  papr_comparator #(.NS(NS), .PW(PW), .CW(PB)) u_cmp (
    .clk(clk), .rst_n(rst_n), .clear(cmp_clear),
    .s_valid(tag2.valid && !tag2.tx), .s_pwr(cmb_pwr), .s_last(tag2.last), .s_final(tag2.final_),
    .s_cand(tag2.cand), .papr_th(papr_th),
    .best_cand(best_cand), .best_peak(best_peak), .best_sum(best_sum),
    .pass(cmp_pass), .done(cmp_done)
  );

  assign out_valid = tag2.valid && tag2.tx;
  assign out_first = out_valid && tag2.first;
  assign out_data  = cmb_y;
  assign busy      = (state != ST_IN);
  assign replayed  = replay;

  // decision: accept this iteration, retry with new dummies, or (at the limit) send the
  // best iteration, replaying it if it is not the current one
  logic accept, at_limit, cur_better, do_replay;
  assign at_limit   = (int'(iter) == MAX_ITER - 1);
  assign cur_better = !bi_valid ||
                      ((2*SUMW)'(best_peak) * (2*SUMW)'(bi_sum) < (2*SUMW)'(bi_peak) * (2*SUMW)'(best_sum));
  assign accept     = cmp_pass || (at_limit && cur_better);
  assign do_replay  = !cmp_pass && at_limit && !cur_better;
  assign dg_load    = (state == ST_DECIDE) && do_replay;
  assign fft_start = (state == ST_IN && buf_we && int'(wr_cnt) == K - 1) ||
                     (state == ST_DECIDE && !accept);
  assign cmp_clear = (state == ST_FFT);

  // ------------------------------------------------------------------ control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_IN;
      wr_cnt     <= '0;
      n          <= '0;
      cand       <= '0;
      iter       <= '0;
      f_valid    <= 1'b0;
      f_idx      <= '0;
      tag1       <= '0;
      tag2       <= '0;
      si         <= '0;
      papr_ok    <= 1'b0;
      iterations <= '0;
      replay     <= 1'b0;
      bi_valid   <= 1'b0;
      bi_cand    <= '0;
      bi_peak    <= '0;
      bi_sum     <= '0;
      bi_state   <= '0;
      it_state   <= '0;
    end else begin
      f_valid <= (state == ST_FEED);
      f_idx   <= n;
      tag1    <= issue_tag;
      tag2    <= tag1;
      unique case (state)
        ST_IN: if (buf_we) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (int'(wr_cnt) == K - 1) begin
            wr_cnt   <= '0;
            iter     <= '0;
            n        <= '0;
            replay   <= 1'b0;
            bi_valid <= 1'b0;
            it_state <= dg_state;
            state    <= ST_FEED;
          end
        end
        ST_FEED: begin
          n <= n + 1'b1;
          if (int'(n) == NS - 1) begin
            n     <= '0;
            state <= ST_FFT;
          end
        end
        ST_FFT: if (&fft_done) begin
          n <= '0;
          if (replay) begin
            cand  <= bi_cand;       // recorded candidate of the replayed iteration
            state <= ST_TX;
          end else begin
            cand  <= '0;
            state <= ST_SEARCH;
          end
        end
        ST_SEARCH: begin
          n <= n + 1'b1;
          if (int'(n) == NS - 1) begin
            n    <= '0;
            cand <= cand + 1'b1;
            if (int'(cand) == P - 1) begin
              cand  <= '0;
              state <= ST_DRAIN;
            end
          end
        end
        ST_DRAIN: if (cmp_done) state <= ST_DECIDE;
        ST_DECIDE: begin
          papr_ok    <= cmp_pass;
          iterations <= iter + 1'b1;
          n          <= '0;
          if (cur_better) begin
            bi_valid <= 1'b1;
            bi_cand  <= best_cand;
            bi_peak  <= best_peak;
            bi_sum   <= best_sum;
            bi_state <= it_state;
          end
          if (accept) begin
            si    <= best_cand;
            cand  <= best_cand;
            state <= ST_TX;
          end else if (do_replay) begin
            si     <= bi_cand;
            replay <= 1'b1;
            state  <= ST_FEED;
          end else begin
            iter     <= iter + 1'b1;
            it_state <= dg_state;
            state    <= ST_FEED;
          end
        end
        ST_TX: begin
          n <= n + 1'b1;
          if (int'(n) == NS - 1) begin
            n     <= '0;
            state <= ST_TXDRAIN;
          end
        end
        ST_TXDRAIN: if (out_valid && tag2.last) begin
          cand  <= '0;
          state <= ST_IN;
        end
        default: state <= ST_IN;
      endcase
    end
  end

  // the IFFT cores take samples only while loading; the combiner's valid tracks the tag pipe
  always_ff @(posedge clk) begin
    if (rst_n && f_valid) begin
      assert (&fft_ready) else $error("dsi_epts_top: IFFT not ready for a sample");
    end
    if (rst_n) begin
      assert (cmb_valid == tag2.valid) else $error("dsi_epts_top: combiner out of step");
    end
  end
endmodule

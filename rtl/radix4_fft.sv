// Burst-I/O radix-4 IFFT/FFT core of NFFT = 4**k or 2*4**k points.
//
// Organisation: four data RAMs (bank_ram), an input path, a "switch" that routes the four
// banks to the four legs of one radix-4 dragonfly and back, a twiddle ROM, and an output
// multiplexer. Address a lives in bank (sum of base-4 digits of a) mod 4 at row a/4, so the
// four operands of every butterfly sit in four different banks and one butterfly is read
// and written per cycle; the switch is a rotation by the bank of the butterfly's first leg.
//
// Operation (burst I/O, no overlap of load and compute):
//   LOAD : ld_ready=1. NFFT samples are taken on ld_valid in natural order and written at
//          their base-4 digit-reversed address.
//   COMP : LOG4 = floor(log4(NFFT)) in-place decimation-in-time passes; pass s combines
//          groups of span 4**s. One butterfly issue per cycle, one idle cycle after each pass
//          so that a pass never reads a word the previous pass is still writing.
//          COMP lasts NPASS*(NFFT/4+1) cycles, NPASS = ceil(log4(NFFT)).
// When NFFT = 2*4**k the even and odd input samples are loaded (digit-reversed) into the
// lower and upper half, the radix-4 passes transform both halves, and one closing radix-2
// pass forms X[q] and X[q+NFFT/2] from the half results E[q] and W^q*O[q]. That pass does
// two butterflies per cycle, on the words q, q+NFFT/2, q+2 and q+2+NFFT/2; the top address
// bit counts as one more digit in the bank sum, so these four also sit in four banks.
//   DONE : done=1. The result X[n] (natural order) is read with rd_addr=n and appears on
//          rd_data one cycle later; it may be read any number of times in any order.
//   start (any state) discards the frame and returns to LOAD.
// inverse=1 computes the IDFT sum_k x[k] exp(+j2pi kn/N), inverse=0 the DFT; both are
// scaled by 1/NFFT (1/4 per radix-4 pass, 1/2 for the radix-2 pass). inverse must be held
// constant while a frame is in the core.
// Inputs must keep |re|,|im| < 2**(DW-2). The structure follows the burst-I/O radix-4 block
// diagram of four data RAMs, switches, dragonfly and twiddle ROM; the address mapping,
// scheduling, scaling and the radix-2 closing pass are this design's choices.
module radix4_fft
  import dsi_pkg::*;
#(
  parameter int NFFT = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    inverse,
  input  logic                    start,
  input  logic                    ld_valid,
  input  cplx_t                   ld_data,
  output logic                    ld_ready,
  output logic                    done,
  input  logic [$clog2(NFFT)-1:0] rd_addr,
  output cplx_t                   rd_data
);
  localparam int AW    = $clog2(NFFT);
  localparam int LOG4  = AW / 2;            // radix-4 passes
  localparam int R2    = AW % 2;            // 1: one closing radix-2 pass
  localparam int NPASS = LOG4 + R2;
  localparam int NDIG  = NPASS;             // bank digits; the top bit is a digit when R2
  localparam int DEPTH = NFFT / 4;
  localparam int RW    = (AW > 2) ? AW - 2 : 1;

  initial begin
    assert (NFFT >= 16 && (1 << AW) == NFFT)
      else $fatal(1, "radix4_fft: NFFT must be a power of 2, at least 16");
  end

  typedef enum logic [1:0] {LOAD, COMP, DONE} state_t;
  state_t state;

  logic [AW-1:0]   ld_cnt;
  logic [AW-3:0]   bf;          // butterfly index within a pass
  logic [$clog2(NPASS+1)-1:0] pass;
  logic            r2pass;      // the closing radix-2 pass is running
  logic            bubble;      // idle cycle between passes
  logic            issue;       // a butterfly is read this cycle

  // ---------------------------------------------------------------- address generation
  logic [AW-1:0] leg_addr [4];
  logic [AW-1:0] tw_addr  [3];
  logic [1:0]    bank0;

  assign r2pass = (R2 == 1) && (int'(pass) == LOG4);

  always_comb begin
    int unsigned span, g, j, base, q;
    q    = 0;
    span = 1 << (2 * pass);
    g    = int'(bf) >> (2 * pass);
    j    = int'(bf) & (span - 1);
    base = (g << (2 * pass + 2)) | j;
    for (int m = 0; m < 4; m++) leg_addr[m] = AW'(base + m * span);
    // twiddle of leg m: W_(4*span)^(m*j) = W_NFFT^(m*j*NFFT/(4*span))
    for (int m = 1; m < 4; m++) tw_addr[m-1] = AW'((m * j) << (AW - 2 - 2 * int'(pass)));
    if (r2pass) begin
      // two radix-2 butterflies: (q, q+NFFT/2) and (q+2, q+2+NFFT/2), base-4 digit 0 of q < 2
      q    = ((int'(bf) >> 1) << 2) | (int'(bf) & 1);
      base = q;
      leg_addr[0] = AW'(q);
      leg_addr[1] = AW'(q + NFFT / 2);
      leg_addr[2] = AW'(q + 2);
      leg_addr[3] = AW'(q + 2 + NFFT / 2);
      tw_addr[0]  = AW'(q);
      tw_addr[1]  = '0;
      tw_addr[2]  = AW'(q + 2);
    end
    bank0 = bank_of(base, NDIG);
  end

  // ---------------------------------------------------------------- bank ports
  logic                we   [4];
  logic [RW-1:0]       wa   [4];
  cplx_t               wd   [4];
  logic [RW-1:0]       ra   [4];
  cplx_t               rdq  [4];

  for (genvar b = 0; b < 4; b++) begin : g_bank
    bank_ram #(.DEPTH(DEPTH)) u_ram (
      .clk(clk), .we(we[b]), .waddr(wa[b]), .wdata(wd[b]),
      .raddr(ra[b]), .rdata(rdq[b])
    );
  end

  // pipeline register between read and write-back of a butterfly
  logic          wb_valid;
  logic [RW-1:0] wb_row [4];    // row of leg m
  logic [1:0]    wb_bank0;
  logic [1:0]    out_bank;      // bank of the result word being read out

  twid_t tw [3];
  for (genvar m = 0; m < 3; m++) begin : g_rom
    twiddle_rom #(.NFFT(NFFT)) u_rom (.clk(clk), .addr(tw_addr[m]), .inverse(inverse), .w(tw[m]));
  end

  // switch in: bank (bank0+m)%4 feeds leg m
  cplx_t [3:0] leg_in, leg_out;
  twid_t [2:0] leg_tw;
  always_comb begin
    for (int m = 0; m < 4; m++) leg_in[m] = rdq[2'(wb_bank0 + 2'(m))];
    for (int m = 0; m < 3; m++) leg_tw[m] = tw[m];
  end

  // the radix-2 mode must follow the pass of the word being written back
  logic wb_r2;
  radix4_dragonfly u_df (.inverse(inverse), .radix2(wb_r2), .x(leg_in), .w(leg_tw), .y(leg_out));

  // load address: digit-reversed
  logic [AW-1:0] ld_addr;
  logic [1:0]    ld_bank;
  always_comb begin
    if (R2 == 1)   // even samples to the lower half, odd ones to the upper half
      ld_addr = AW'((int'(ld_cnt[0]) << (AW - 1)) | digit_rev4(int'(ld_cnt) >> 1, LOG4));
    else
      ld_addr = AW'(digit_rev4(int'(ld_cnt), LOG4));
    ld_bank = bank_of(int'(ld_addr), NDIG);
  end

  assign issue    = (state == COMP) && !bubble;
  assign ld_ready = (state == LOAD);
  assign done     = (state == DONE);

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      we[b] = 1'b0;
      wa[b] = RW'(ld_addr >> 2);
      wd[b] = ld_data;
      ra[b] = RW'(rd_addr >> 2);
    end
    if (state == LOAD) begin
      we[ld_bank] = ld_valid;
    end
    if (issue) begin
      for (int m = 0; m < 4; m++) ra[bank_of(int'(leg_addr[m]), NDIG)] = RW'(leg_addr[m] >> 2);
    end
    if (wb_valid) begin
      for (int m = 0; m < 4; m++) begin
        we[2'(wb_bank0 + 2'(m))] = 1'b1;
        wa[2'(wb_bank0 + 2'(m))] = wb_row[m];
        wd[2'(wb_bank0 + 2'(m))] = leg_out[m];
      end
    end
  end

  assign rd_data = rdq[out_bank];

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= LOAD;
      ld_cnt   <= '0;
      bf       <= '0;
      pass     <= '0;
      bubble   <= 1'b0;
      wb_valid <= 1'b0;
      wb_bank0 <= '0;
      wb_r2    <= 1'b0;
      out_bank <= '0;
      for (int m = 0; m < 4; m++) wb_row[m] <= '0;
    end else begin
      wb_valid <= issue;
      if (issue) begin
        wb_bank0 <= bank0;
        wb_r2    <= r2pass;
        for (int m = 0; m < 4; m++) wb_row[m] <= RW'(leg_addr[m] >> 2);
      end
      out_bank <= bank_of(int'(rd_addr), NDIG);
      if (start) begin
        state  <= LOAD;
        ld_cnt <= '0;
        wb_valid <= 1'b0;
      end else begin
        unique case (state)
          LOAD: if (ld_valid) begin
            ld_cnt <= ld_cnt + 1'b1;
            if (ld_cnt == AW'(NFFT - 1)) begin
              state  <= COMP;
              bf     <= '0;
              pass   <= '0;
              bubble <= 1'b0;
            end
          end
          COMP: begin
            if (bubble) begin
              bubble <= 1'b0;
              if (int'(pass) == NPASS) state <= DONE;
            end else begin
              bf <= bf + 1'b1;
              if (bf == '1) begin
                pass   <= pass + 1'b1;
                bubble <= 1'b1;
              end
            end
          end
          DONE: ;
          default: state <= LOAD;
        endcase
      end
    end
  end
endmodule

// Fully digital TR UWB receiver back-end, parallel (high-throughput) version.
//
// Same signal format and control flow as the sequential receiver
// (tr_receiver_seq): FILL the acquisition shift register, synchronize, CHECK
// the threshold, ALIGN the first window, find the block start from a training
// pattern (BSYNC), then demodulate (DEMOD). The arithmetic is parallel:
//   * symbol-level synchronization evaluates all NF correlation values in one
//     clock (par_sync_correlator) and takes the argmax in a comparator tree
//     (max_tree): three clocks instead of NP(NF+NW-1);
//   * demodulation stores the NR+ND windows of a block, (NR+ND)(NW+2) samples,
//     and evaluates template and all ND early/on-time/late correlations in one
//     clock (par_demodulator) once the last data window has arrived; the ND bits
//     come out together.
// Block-level synchronization uses the parallel demodulator structure with one
// reference and one data window (previous and current frame), which yields the
// differential bit b(m) XNOR b(m-1) for the training-pattern search. Tracking
// moves the window start by the early-late decision of the last data symbol of
// each block (in BSYNC, of every differential decision). The parallel
// structures follow the document; the block-wise tracking, the differential
// use of the parallel demodulator and the control flow are this design's own.
//
// Interface: as tr_receiver_seq, except that data leave as blocks: bits_valid
// pulses with bits[ND-1:0] (bit d = data pulse d of the block, 1 = +1), two
// clocks after the last data window of the block is complete.
module tr_receiver_par
  import tr_pkg::*;
#(
  parameter int unsigned NF          = 1000,
  parameter int unsigned NW          = 100,
  parameter int unsigned NP          = 3,
  parameter int unsigned NR          = 2,
  parameter int unsigned ND          = 8,
  parameter int unsigned NAD         = 10,
  parameter int unsigned NBITS       = 4,
  parameter int unsigned AIN_W       = 12,
  parameter map_e        MAPPING     = MAP_SIGN_MAG,
  parameter logic [NR-1:0] REF_PATTERN = '1,
  parameter int unsigned TRAIN_LEN   = 8,
  parameter logic [TRAIN_LEN-1:0] TRAIN = 8'b0010_1101,
  // derived sizes
  parameter int unsigned DEPTH       = (((NP + 1) * NF + NW - 1 + NAD - 1) / NAD) * NAD,
  parameter int unsigned KW          = $clog2(NF),
  parameter int unsigned SVW         = 2 * (NBITS + 1) + $clog2(NW) + 1 + $clog2(NP) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ain_valid,
  input  logic signed [AIN_W-1:0] ain [NAD],
  input  logic [SVW-1:0]          threshold,
  output logic                    bits_valid,
  output logic [ND-1:0]           bits,
  output logic [2:0]              state_o,
  output logic                    acq_done,
  output logic                    acq_reject,
  output logic [KW-1:0]           acq_kmax,
  output logic [SVW-1:0]          acq_smax,
  output logic [31:0]             acq_start,
  output logic                    block_found,
  output logic                    track_applied,
  output logic signed [1:0]       track_applied_dir
);

  localparam int unsigned TW   = 32;
  localparam int unsigned QW   = 16;
  localparam int unsigned EW   = 8;
  localparam int unsigned NBLK = NR + ND;
  localparam int unsigned RW   = $clog2(NBLK);
  localparam int unsigned WL   = NW + 2;

  typedef enum logic [2:0] {
    S_FILL, S_CORR, S_WAIT, S_CHECK, S_ALIGN, S_BSYNC, S_DEMOD
  } state_e;

  state_e st;

  // A/D bank and absolute sample counter
  logic             code_valid;
  logic [NBITS-1:0] code [NAD];
  logic [TW-1:0]    chunk_abs;

  adc_bank #(.NAD(NAD), .NBITS(NBITS), .AIN_W(AIN_W), .MAPPING(MAPPING)) u_adc (
    .clk, .rst_n, .din_valid(ain_valid), .din(ain), .code_valid, .code);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          chunk_abs <= '0;
    else if (code_valid) chunk_abs <= chunk_abs + TW'(NAD);
  end

  // acquisition: buffer, parallel correlator, comparator tree
  logic                   buf_clear, buf_full;
  logic [DEPTH*NBITS-1:0] contents;
  logic                   corr_start, s_valid, max_valid;
  logic [NF*SVW-1:0]      s_all;
  logic [SVW-1:0]         max_val;
  logic [KW-1:0]          max_idx;
  logic [TW-1:0]          last_abs, a0, begin_abs;

  capture_buffer #(.NAD(NAD), .NBITS(NBITS), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .clear(buf_clear), .shift_en(code_valid && st == S_FILL), .din(code),
    .full(buf_full), .addr_a('0), .addr_b('0), .data_a(), .data_b(), .contents);

  par_sync_correlator #(.NF(NF), .NW(NW), .NP(NP), .NBITS(NBITS), .MAPPING(MAPPING),
                        .DEPTH(DEPTH), .SVW(SVW)) u_psync (
    .clk, .rst_n, .start(corr_start), .r_flat(contents), .s_valid, .s_all);

  max_tree #(.N(NF), .VW(SVW), .IW(KW)) u_tree (
    .clk, .rst_n, .in_valid(s_valid), .vals(s_all), .out_valid(max_valid), .max_val, .max_idx);

  // windows
  logic             arm, win_valid, wc_active, adj_applied;
  logic [NBITS-1:0] win [WL];
  logic [WL*NBITS-1:0] win_flat, prev_flat;
  logic [QW-1:0]    win_seq, diff_seq;
  logic [EW-1:0]    win_epoch, cur_epoch, diff_epoch, blk_epoch;
  logic [TW-1:0]    next_begin;
  logic signed [1:0] adj_req;
  logic [EW-1:0]    adj_epoch;

  window_capture #(.NF(NF), .NW(NW), .NAD(NAD), .NBITS(NBITS), .TW(TW), .QW(QW), .EW(EW)) u_win (
    .clk, .rst_n, .chunk_valid(code_valid), .chunk_abs, .din(code), .arm, .begin_abs,
    .adj_req, .adj_epoch, .active(wc_active), .win_valid, .win, .win_seq,
    .win_epoch, .next_begin, .epoch(cur_epoch), .adj_applied, .adj_dir(track_applied_dir));

  always_comb begin
    for (int s = 0; s < int'(WL); s++) win_flat[s*NBITS +: NBITS] = win[s];
  end

  // differential decisions for block synchronization
  logic              diff_start, diff_valid;
  logic [0:0]        diff_bit;
  logic signed [1:0] diff_track [1];

  par_demodulator #(.NW(NW), .NR(1), .ND(1), .NBITS(NBITS), .MAPPING(MAPPING),
                    .REF_PATTERN(1'b1)) u_diff (
    .clk, .rst_n, .start(diff_start), .win_flat({win_flat, prev_flat}),
    .out_valid(diff_valid), .bits(diff_bit), .track(diff_track));

  logic          bs_clear, bs_found, bs_locked;
  logic [QW-1:0] bs_seq, first_ref;
  logic          diff_primed;

  // compare each window with the previous one (prev_flat is replaced at the
  // same edge, after the comparison has been registered)
  assign diff_start = win_valid && st == S_BSYNC && diff_primed;

  block_sync #(.TRAIN_LEN(TRAIN_LEN), .TRAIN(TRAIN), .QW(QW)) u_bsync (
    .clk, .rst_n, .clear(bs_clear), .dec_valid(diff_valid && st == S_BSYNC), .dec_bit(diff_bit[0]),
    .dec_seq(diff_seq), .found(bs_found), .found_seq(bs_seq), .locked(bs_locked));

  // block buffer and parallel demodulator
  logic [NBLK*WL*NBITS-1:0] blk;
  logic [RW-1:0]            role;
  logic                     blk_start, blk_valid;
  logic signed [1:0]        blk_track [ND];

  par_demodulator #(.NW(NW), .NR(NR), .ND(ND), .NBITS(NBITS), .MAPPING(MAPPING),
                    .REF_PATTERN(REF_PATTERN)) u_pdem (
    .clk, .rst_n, .start(blk_start), .win_flat(blk), .out_valid(blk_valid), .bits,
    .track(blk_track));

  assign bits_valid = blk_valid;

  // tracking requests: differential decisions in BSYNC, last data symbol in DEMOD
  always_comb begin
    adj_req   = 2'sd0;
    adj_epoch = '0;
    if (diff_valid && st == S_BSYNC) begin
      adj_req   = diff_track[0];
      adj_epoch = diff_epoch;
    end else if (blk_valid) begin
      adj_req   = blk_track[ND-1];
      adj_epoch = blk_epoch;
    end
  end

  always_ff @(posedge clk) begin
    if (win_valid) begin
      prev_flat <= win_flat;
      if (st == S_DEMOD && win_seq >= first_ref) blk[role*WL*NBITS +: WL*NBITS] <= win_flat;
    end
  end

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_FILL;
      buf_clear   <= 1'b1;
      corr_start  <= 1'b0;
      last_abs    <= '0;
      a0          <= '0;
      begin_abs   <= '0;
      arm         <= 1'b0;
      bs_clear    <= 1'b1;
      first_ref   <= '0;
      role        <= '0;
      diff_primed <= 1'b0;
      diff_seq    <= '0;
      diff_epoch  <= '0;
      blk_start   <= 1'b0;
      blk_epoch   <= '0;
      acq_done    <= 1'b0;
      acq_reject  <= 1'b0;
      acq_kmax    <= '0;
      acq_smax    <= '0;
      acq_start   <= '0;
    end else begin
      buf_clear  <= 1'b0;
      corr_start <= 1'b0;
      arm        <= 1'b0;
      bs_clear   <= 1'b0;
      acq_done   <= 1'b0;
      acq_reject <= 1'b0;
      blk_start  <= 1'b0;
      unique case (st)
        S_FILL: begin
          if (code_valid && !buf_full && !buf_clear) last_abs <= chunk_abs;
          if (buf_full && !buf_clear) begin
            a0         <= last_abs + TW'(NAD) - TW'(DEPTH);
            corr_start <= 1'b1;
            st         <= S_CORR;
          end
        end
        S_CORR: if (max_valid) st <= S_WAIT;
        S_WAIT: st <= S_CHECK;
        S_CHECK: begin
          acq_kmax  <= max_idx;
          acq_smax  <= max_val;
          acq_start <= a0 + TW'(max_idx);
          if (max_val < threshold) begin
            acq_reject <= 1'b1;
            buf_clear  <= 1'b1;
            st         <= S_FILL;
          end else begin
            acq_done  <= 1'b1;
            begin_abs <= a0 + TW'(max_idx) + TW'(NF) - 1;
            st        <= S_ALIGN;
          end
        end
        S_ALIGN: begin
          if (begin_abs < chunk_abs + TW'(2 * NAD)) begin
            begin_abs <= begin_abs + TW'(NF);
          end else begin
            arm         <= 1'b1;
            bs_clear    <= 1'b1;
            diff_primed <= 1'b0;
            st          <= S_BSYNC;
          end
        end
        S_BSYNC: begin
          if (win_valid) begin
            diff_primed <= 1'b1;
            diff_seq    <= win_seq;
            diff_epoch  <= win_epoch;
          end
          if (bs_found) begin
            first_ref <= bs_seq + QW'(2);
            role      <= '0;
            st        <= S_DEMOD;
          end
        end
        S_DEMOD: begin
          if (win_valid && win_seq >= first_ref) begin
            if (int'(role) == int'(NBLK) - 1) begin
              role      <= '0;
              blk_start <= 1'b1;
              blk_epoch <= win_epoch;
            end else begin
              role <= role + 1'b1;
            end
          end
        end
        default: st <= S_FILL;
      endcase
    end
  end

  assign state_o       = st;
  assign block_found   = bs_found;
  assign track_applied = adj_applied;

endmodule

// Fully digital transmitted-reference (TR) UWB receiver back-end, sequential
// (minimum-area) version: from the interleaved A/D bank to the demodulated bits.
//
// Signal format. Pulses repeat every frame of NF samples; NW samples of each
// frame carry the multipath-spread pulse. Data are sent in blocks of NR
// reference pulses (signs given by the known pattern REF_PATTERN) followed by ND
// pulses whose signs are the data bits. The receiver averages the reference
// pulses into a template and correlates each data pulse with it, so no channel
// estimate is needed.
//
// Operation (controller states):
//   FILL   the A/D stream (NAD samples per clock) fills the acquisition shift
//          register with (NP+1)NF+NW-1 samples; its absolute start A0 is kept.
//   CORR   the sequential synchronizer computes S(k) = sum_j |sum_i r[i]r[i+jNF]|
//          for every k of one frame and the argmax k_max, NP(NF+NW-1) clocks.
//          Samples arriving meanwhile are lost; the absolute sample counter
//          keeps the frame phase, so no alignment is lost with them.
//   CHECK  if max S is below `threshold` the capture held only noise: refill.
//   ALIGN  the first window start (A0 + k_max, minus one for the early sample)
//          is advanced by whole frames until it lies ahead of the stream.
//   BSYNC  windows are demodulated differentially while the block synchronizer
//          looks for the training pattern; the block starts with the second
//          frame after the last training frame (one guard frame covers the
//          decision latency).
//   DEMOD  frame roles cycle through NR references (template adder) and ND data
//          pulses (three MACs, early/on-time/late). The early-late decision
//          moves the window start by one sample.
// Symbol-level synchronization, its threshold, early-late demodulation and
// tracking, the shift-register buffer and the sequential resource counts follow
// the document. The training preamble and guard frame, the differential mode,
// the non-realtime acquisition with lost samples and the clocking (NAD samples
// per clock, f_ck = f_s/NAD) are this design's choices; with the default sizes
// the demodulator uses exactly its NW clocks out of the NF/NAD available per
// frame, which is the document's bound f_ck >= f_s*NW/NF.
//
// Interface: ain/ain_valid carry NAD finely resolved input amplitudes per clock
// into the A/D model. bit_valid/bit_out deliver one data bit per data pulse
// (bit 1 = symbol +1). Status outputs expose the state, the acquisition result
// and the tracking and error events.
module tr_receiver_seq
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
  parameter logic [NR-1:0] REF_PATTERN = '1,          // bit r: sign of reference r, 1 = +1
  parameter int unsigned TRAIN_LEN   = 8,
  parameter logic [TRAIN_LEN-1:0] TRAIN = 8'b0010_1101,
  // derived sizes
  parameter int unsigned DEPTH       = (((NP + 1) * NF + NW - 1 + NAD - 1) / NAD) * NAD,
  parameter int unsigned BAW         = $clog2(DEPTH),
  parameter int unsigned KW          = $clog2(NF),
  parameter int unsigned SVW         = 2 * (NBITS + 1) + $clog2(NW) + 1 + $clog2(NP) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ain_valid,
  input  logic signed [AIN_W-1:0] ain [NAD],
  input  logic [SVW-1:0]          threshold,
  output logic                    bit_valid,
  output logic                    bit_out,
  output logic [2:0]              state_o,
  output logic                    acq_done,       // pulse: acquisition accepted
  output logic                    acq_reject,     // pulse: acquisition below threshold
  output logic [KW-1:0]           acq_kmax,
  output logic [SVW-1:0]          acq_smax,
  output logic [31:0]             acq_start,      // absolute sample index A0 + k_max
  output logic                    block_found,    // pulse: training pattern matched
  output logic                    tmpl_step,      // pulse: one reference pulse added to the template
  output logic                    track_valid,    // pulse: early-late decision on a data pulse
  output logic signed [1:0]       track_dir,
  output logic                    track_applied,  // pulse: window start moved
  output logic signed [1:0]       track_applied_dir, // -1 earlier, +1 later
  output logic                    overrun
);

  localparam int unsigned TW   = 32;
  localparam int unsigned QW   = 16;
  localparam int unsigned EW   = 8;
  localparam int unsigned TAGW = 1 + EW + QW;
  localparam int unsigned NBLK = NR + ND;
  localparam int unsigned RW   = $clog2(NBLK);

  typedef enum logic [2:0] {
    S_FILL, S_CORR, S_WAIT, S_CHECK, S_ALIGN, S_BSYNC, S_DEMOD
  } state_e;

  typedef struct packed {
    logic          is_data;
    logic [EW-1:0] epoch;
    logic [QW-1:0] seq;
  } tag_t;

  state_e st;

  // A/D bank
  logic             code_valid;
  logic [NBITS-1:0] code [NAD];
  logic [TW-1:0]    chunk_abs;

  adc_bank #(.NAD(NAD), .NBITS(NBITS), .AIN_W(AIN_W), .MAPPING(MAPPING)) u_adc (
    .clk, .rst_n, .din_valid(ain_valid), .din(ain), .code_valid, .code);

  // absolute index of lane 0 of the current chunk
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          chunk_abs <= '0;
    else if (code_valid) chunk_abs <= chunk_abs + TW'(NAD);
  end

  // acquisition buffer and synchronizer
  logic             buf_clear, buf_full;
  logic [BAW-1:0]   addr_a, addr_b;
  logic [NBITS-1:0] data_a, data_b;
  logic             corr_start, corr_busy, corr_done;
  logic             s_valid;
  logic [KW-1:0]    s_k;
  logic [SVW-1:0]   s_val;
  logic             max_found;
  logic [KW-1:0]    max_idx;
  logic [SVW-1:0]   max_val;
  logic [TW-1:0]    last_abs, a0, begin_abs;

  capture_buffer #(.NAD(NAD), .NBITS(NBITS), .DEPTH(DEPTH), .AW(BAW)) u_buf (
    .clk, .rst_n, .clear(buf_clear), .shift_en(code_valid && st == S_FILL), .din(code),
    .full(buf_full), .addr_a, .addr_b, .data_a, .data_b, .contents());

  seq_sync_correlator #(.NF(NF), .NW(NW), .NP(NP), .NBITS(NBITS), .MAPPING(MAPPING),
                        .AW(BAW), .KW(KW), .SW_OUT(SVW)) u_sync (
    .clk, .rst_n, .start(corr_start), .busy(corr_busy), .done(corr_done),
    .addr_a, .addr_b, .data_a, .data_b, .s_valid, .s_k, .s_val);

  seq_max_search #(.VW(SVW), .IW(KW)) u_max (
    .clk, .rst_n, .clear(corr_start), .valid(s_valid), .idx(s_k), .val(s_val),
    .found(max_found), .max_idx, .max_val);

  // window capture and demodulation
  logic             arm, win_valid, wc_active, adj_applied;
  logic [NBITS-1:0] win [NW+2];
  logic [QW-1:0]    win_seq;
  logic [EW-1:0]    win_epoch, cur_epoch;
  logic [TW-1:0]    next_begin;
  logic signed [1:0] adj_req;
  tag_t             dtag_in, dtag_out;
  logic [TAGW-1:0]  dtag_out_bits;
  demod_op_e        dop;
  logic             dpos;
  logic             dm_busy, dec_valid, dec_bit, tmpl_done, dm_overrun;
  logic signed [1:0] dec_track;

  window_capture #(.NF(NF), .NW(NW), .NAD(NAD), .NBITS(NBITS), .TW(TW), .QW(QW), .EW(EW)) u_win (
    .clk, .rst_n, .chunk_valid(code_valid), .chunk_abs, .din(code), .arm, .begin_abs,
    .adj_req, .adj_epoch(dtag_out.epoch), .active(wc_active), .win_valid, .win, .win_seq,
    .win_epoch, .next_begin, .epoch(cur_epoch), .adj_applied, .adj_dir(track_applied_dir));

  seq_demodulator #(.NW(NW), .NR(NR), .NBITS(NBITS), .MAPPING(MAPPING), .TAGW(TAGW)) u_dem (
    .clk, .rst_n, .start(win_valid), .op(dop), .ref_pos(dpos), .tag(TAGW'(dtag_in)), .win,
    .busy(dm_busy), .dec_valid, .dec_bit, .dec_track, .dec_tag(dtag_out_bits),
    .tmpl_done, .overrun(dm_overrun), .c_early(), .c_on(), .c_late());

  assign dtag_out = tag_t'(dtag_out_bits);
  assign adj_req  = dec_valid ? dec_track : 2'sd0;

  // block synchronizer
  logic          bs_clear, bs_found, bs_locked;
  logic [QW-1:0] bs_seq, first_ref;
  logic [RW-1:0] role;

  block_sync #(.TRAIN_LEN(TRAIN_LEN), .TRAIN(TRAIN), .QW(QW)) u_bsync (
    .clk, .rst_n, .clear(bs_clear), .dec_valid(dec_valid && st == S_BSYNC), .dec_bit,
    .dec_seq(dtag_out.seq), .found(bs_found), .found_seq(bs_seq), .locked(bs_locked));

  // operation for the window being dispatched
  always_comb begin
    dop     = OP_DIFF;
    dpos    = 1'b1;
    dtag_in = '{is_data: 1'b0, epoch: win_epoch, seq: win_seq};
    if (st == S_DEMOD && win_seq >= first_ref) begin
      if (int'(role) < int'(NR)) begin
        dop  = (role == '0) ? OP_TMPL_FIRST : OP_TMPL_ACC;
        dpos = REF_PATTERN[role[$clog2(NR > 1 ? NR : 2)-1:0]];
      end else begin
        dop             = OP_DATA;
        dtag_in.is_data = 1'b1;
      end
    end
  end

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_FILL;
      buf_clear  <= 1'b1;
      corr_start <= 1'b0;
      last_abs   <= '0;
      a0         <= '0;
      begin_abs  <= '0;
      arm        <= 1'b0;
      bs_clear   <= 1'b1;
      first_ref  <= '0;
      role       <= '0;
      acq_done   <= 1'b0;
      acq_reject <= 1'b0;
      acq_kmax   <= '0;
      acq_smax   <= '0;
      acq_start  <= '0;
    end else begin
      buf_clear  <= 1'b0;
      corr_start <= 1'b0;
      arm        <= 1'b0;
      bs_clear   <= 1'b0;
      acq_done   <= 1'b0;
      acq_reject <= 1'b0;
      unique case (st)
        S_FILL: begin
          if (code_valid && !buf_full && !buf_clear) last_abs <= chunk_abs;
          if (buf_full && !buf_clear) begin
            a0         <= last_abs + TW'(NAD) - TW'(DEPTH);
            corr_start <= 1'b1;
            st         <= S_CORR;
          end
        end
        S_CORR: if (corr_done) st <= S_WAIT;
        S_WAIT: st <= S_CHECK;
        S_CHECK: begin
          acq_kmax <= max_idx;
          acq_smax <= max_val;
          acq_start <= a0 + TW'(max_idx);
          if (!max_found || max_val < threshold) begin
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
            arm      <= 1'b1;
            bs_clear <= 1'b1;
            st       <= S_BSYNC;
          end
        end
        S_BSYNC: begin
          if (bs_found) begin
            first_ref <= bs_seq + QW'(2);
            role      <= '0;
            st        <= S_DEMOD;
          end
        end
        S_DEMOD: begin
          if (win_valid && win_seq >= first_ref)
            role <= (int'(role) == int'(NBLK) - 1) ? '0 : role + 1'b1;
        end
        default: st <= S_FILL;
      endcase
    end
  end

  assign state_o       = st;
  assign bit_valid     = dec_valid && dtag_out.is_data;
  assign bit_out       = dec_bit;
  assign block_found   = bs_found;
  assign tmpl_step     = tmpl_done;
  assign track_valid   = dec_valid && dtag_out.is_data;
  assign track_dir     = dec_track;
  assign track_applied = adj_applied;
  assign overrun       = dm_overrun;

endmodule

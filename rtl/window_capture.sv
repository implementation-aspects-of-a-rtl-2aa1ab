// Frame window capture with early-late timing adjustment.
//
// After synchronization the receiver only needs, in every frame of NF samples,
// the NW samples that hold the pulse, plus one sample before and one after for
// the early and late correlations: NW+2 samples starting at `next_begin`
// (absolute sample index of the early sample). This unit watches the parallel
// A/D stream (NAD samples per clock, lane 0 earliest, absolute index of lane 0
// = chunk_abs), writes the samples that fall in the current window into a work
// buffer, and when the last one arrives copies the window into the output
// buffer (double buffering), pulses win_valid and moves next_begin one frame
// on. The output window stays unchanged for NF/NAD clocks, which is the time
// the sequential demodulator has to process it.
//
// Tracking: a request adj_req (-1: start one sample earlier, +1: later), tagged
// with the epoch of the window it was measured on, is accepted only if that
// epoch is the current one and no other adjustment is pending; it is applied at
// the next window completion and increments the epoch. Windows captured before
// an adjustment took effect therefore cannot ask for it a second time. The
// document states only that the start of the next symbol is moved by one
// sample; the epoch rule is this design's way of handling the processing
// latency of one frame.
//
// Interface: `arm` (with begin_abs) starts capturing at that absolute index and
// resets win_seq and the epoch; begin_abs must lie at least one clock ahead.
module window_capture #(
  parameter int unsigned NF    = 1000,
  parameter int unsigned NW    = 100,
  parameter int unsigned NAD   = 10,
  parameter int unsigned NBITS = 4,
  parameter int unsigned TW    = 32,     // absolute sample index width
  parameter int unsigned QW    = 16,     // window sequence number width
  parameter int unsigned EW    = 8       // epoch width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             chunk_valid,
  input  logic [TW-1:0]    chunk_abs,
  input  logic [NBITS-1:0] din [NAD],
  input  logic             arm,
  input  logic [TW-1:0]    begin_abs,
  input  logic signed [1:0] adj_req,
  input  logic [EW-1:0]    adj_epoch,
  output logic             active,
  output logic             win_valid,
  output logic [NBITS-1:0] win [NW+2],
  output logic [QW-1:0]    win_seq,
  output logic [EW-1:0]    win_epoch,
  output logic [TW-1:0]    next_begin,
  output logic [EW-1:0]    epoch,
  output logic             adj_applied,
  output logic signed [1:0] adj_dir      // direction of the applied move
);

  localparam int unsigned WL = NW + 2;

  logic [NBITS-1:0] work [WL];
  logic [NBITS-1:0] work_n [WL];
  logic             complete;
  logic signed [1:0] pending;
  logic [QW-1:0]    seq;

  always_comb begin
    logic [TW-1:0] off;
    work_n   = work;
    complete = 1'b0;
    for (int l = 0; l < int'(NAD); l++) begin
      off = chunk_abs + TW'(l) - next_begin;
      if (off < TW'(WL)) begin
        work_n[off] = din[l];
        if (off == TW'(WL - 1)) complete = 1'b1;
      end
    end
    complete = complete & chunk_valid & active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      next_begin  <= '0;
      win_valid   <= 1'b0;
      win_seq     <= '0;
      win_epoch   <= '0;
      seq         <= '0;
      epoch       <= '0;
      pending     <= '0;
      adj_applied <= 1'b0;
      adj_dir     <= '0;
      for (int i = 0; i < int'(WL); i++) begin
        work[i] <= '0;
        win[i]  <= '0;
      end
    end else begin
      win_valid   <= 1'b0;
      adj_applied <= 1'b0;
      if (arm) begin
        active     <= 1'b1;
        next_begin <= begin_abs;
        seq        <= '0;
        epoch      <= '0;
        pending    <= '0;
      end else begin
        if (active && chunk_valid) work <= work_n;
        if (adj_req != 2'sd0 && adj_epoch == epoch && pending == 2'sd0 && active)
          pending <= adj_req;
        if (complete) begin
          win        <= work_n;
          win_valid  <= 1'b1;
          win_seq    <= seq;
          win_epoch  <= epoch;
          seq        <= seq + 1'b1;
          next_begin <= next_begin + TW'(NF) + TW'(signed'(pending));
          if (pending != 2'sd0) begin
            epoch       <= epoch + 1'b1;
            pending     <= '0;
            adj_applied <= 1'b1;
            adj_dir     <= pending;
          end
        end
      end
    end
  end

endmodule

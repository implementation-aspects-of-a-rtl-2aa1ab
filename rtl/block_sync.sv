// Block-level synchronizer using a training sequence.
//
// Once the symbol timing is known, the receiver must still find where the
// blocks of NR reference + ND data pulses begin. Here the transmitter precedes
// the blocks with a training preamble, and the demodulator runs in
// differential mode, so each frame yields the bit b(m) XNOR b(m-1) of two
// consecutive pulses. This unit keeps the last TRAIN_LEN such bits in a shift
// register and reports a match with the known pattern TRAIN (bit TRAIN_LEN-1
// is the oldest). The first decision after `clear` compares against a stale
// template and is discarded. The document names both a blind search and a
// training sequence for this step without giving either in detail; the
// pattern, its length and the matching rule here are this design's choices.
//
// Interface: `clear` restarts the search; each dec_valid delivers one
// differential bit with its window number dec_seq. `found` pulses one cycle
// after the matching bit, with found_seq = the window number of the last
// training frame; `locked` stays high until the next clear.
module block_sync #(
  parameter int unsigned       TRAIN_LEN = 8,
  parameter logic [TRAIN_LEN-1:0] TRAIN  = 8'b0010_1101,
  parameter int unsigned       QW        = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          dec_valid,
  input  logic          dec_bit,
  input  logic [QW-1:0] dec_seq,
  output logic          found,
  output logic [QW-1:0] found_seq,
  output logic          locked
);

  localparam int unsigned CW = $clog2(TRAIN_LEN + 2);

  logic [TRAIN_LEN-1:0] hist, hist_n;
  logic [CW-1:0]        cnt;

  assign hist_n = {hist[TRAIN_LEN-2:0], dec_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      cnt       <= '0;
      found     <= 1'b0;
      found_seq <= '0;
      locked    <= 1'b0;
    end else if (clear) begin
      hist   <= '0;
      cnt    <= '0;
      found  <= 1'b0;
      locked <= 1'b0;
    end else begin
      found <= 1'b0;
      if (dec_valid && !locked) begin
        hist <= hist_n;
        if (int'(cnt) <= int'(TRAIN_LEN)) cnt <= cnt + 1'b1;
        // cnt counts decisions already in; this one is decision cnt+1
        if (int'(cnt) >= int'(TRAIN_LEN) && hist_n == TRAIN) begin
          found     <= 1'b1;
          found_seq <= dec_seq;
          locked    <= 1'b1;
        end
      end
    end
  end

endmodule

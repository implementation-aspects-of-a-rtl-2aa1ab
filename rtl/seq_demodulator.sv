// Sequential TR demodulator with early-late tracking.
//
// Works on one captured frame window w[0..NW+1] at a time (w[1..NW] are the NW
// on-time samples, w[0] one sample early, w[NW+1] one late), one sample per
// clock, NW clocks per window:
//   OP_TMPL_FIRST / OP_TMPL_ACC: template adder. t[i] := (+-)w[i+1], then
//     t[i] += (+-)w[i+1] for the further reference pulses; the sign is the
//     reference pattern bit p of that pulse. The template is the document's
//     average over the NR reference pulses without the 1/NR scaling, which
//     changes no decision.
//   OP_DATA: three MACs form c_early = sum t[i] w[i], c_on = sum t[i] w[i+1]
//     and c_late = sum t[i] w[i+2]. The bit is the sign of the correlation with
//     the largest magnitude (bit 1 for >= 0, i.e. symbol +1); if the early
//     (late) one wins, the start of later windows should move one sample
//     earlier (later): track = -1 (+1).
//   OP_DIFF: as OP_DATA, with the previous window as template; afterwards the
//     template holds this window. This differential mode serves block-level
//     synchronization before any reference pulse position is known.
// The adder/3-MAC structure and the decision rule follow the document; the
// differential mode, the tie rules (on-time preferred, then early) and the
// sign of zero are this design's choices.
//
// Timing: `start` (with op, ref_pos, tag and the window) is taken in a cycle in
// which busy is low, and sample 0 is processed in that same cycle, so the
// window only has to be stable for NW clocks from start. Results (dec_valid,
// dec_bit, dec_track, dec_tag) are registered and appear NW clocks after start;
// a new start is accepted in that same cycle. A start while busy is an overrun,
// flagged in the sticky `overrun` output.
module seq_demodulator
  import tr_pkg::*;
#(
  parameter int unsigned NW      = 100,
  parameter int unsigned NR      = 2,
  parameter int unsigned NBITS   = 4,
  parameter map_e        MAPPING = MAP_SIGN_MAG,
  parameter int unsigned TAGW    = 24,
  parameter int unsigned SW      = NBITS + 1,
  parameter int unsigned TTW     = SW + $clog2(NR + 1),
  parameter int unsigned ACCW    = TTW + SW + $clog2(NW) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  demod_op_e              op,
  input  logic                   ref_pos,     // reference pattern bit: 1 = +1
  input  logic [TAGW-1:0]        tag,
  input  logic [NBITS-1:0]       win [NW+2],
  output logic                   busy,
  output logic                   dec_valid,
  output logic                   dec_bit,
  output logic signed [1:0]      dec_track,
  output logic [TAGW-1:0]        dec_tag,
  output logic                   tmpl_done,
  output logic                   overrun,
  output logic signed [ACCW-1:0] c_early,
  output logic signed [ACCW-1:0] c_on,
  output logic signed [ACCW-1:0] c_late
);

  localparam int unsigned IW = $clog2(NW);

  logic signed [TTW-1:0] tmpl [NW];
  logic [IW-1:0]         i_r, cur_i;
  demod_op_e             op_r, cur_op;
  logic                  pos_r, cur_pos;
  logic [TAGW-1:0]       tag_r, cur_tag;
  logic                  en, first, last, corr_op;
  logic signed [SW-1:0]  w_e, w_o, w_l;
  logic signed [TTW-1:0] t_cur;
  logic signed [ACCW-1:0] ae, ao, al;    // accumulators
  logic signed [ACCW-1:0] ne, no, nl;    // next accumulator values
  logic [ACCW-1:0]       me, mo, ml;

  assign en      = busy | start;
  assign cur_i   = busy ? i_r   : '0;
  assign cur_op  = busy ? op_r  : op;
  assign cur_pos = busy ? pos_r : ref_pos;
  assign cur_tag = busy ? tag_r : tag;
  assign first   = (cur_i == '0);
  assign last    = (int'(cur_i) == int'(NW) - 1);
  assign corr_op = (cur_op == OP_DATA) || (cur_op == OP_DIFF);

  assign w_e   = SW'(decode_sample(8'(win[cur_i]),            NBITS, MAPPING));
  assign w_o   = SW'(decode_sample(8'(win[cur_i + 1]), NBITS, MAPPING));
  assign w_l   = SW'(decode_sample(8'(win[cur_i + 2]),        NBITS, MAPPING));
  assign t_cur = tmpl[cur_i];

  mac_unit #(.AW_IN(TTW), .BW_IN(SW), .ACCW(ACCW)) u_mac_early (
    .clk, .rst_n, .en(en & corr_op), .first, .a(t_cur), .b(w_e), .acc(ae), .acc_next(ne));
  mac_unit #(.AW_IN(TTW), .BW_IN(SW), .ACCW(ACCW)) u_mac_on (
    .clk, .rst_n, .en(en & corr_op), .first, .a(t_cur), .b(w_o), .acc(ao), .acc_next(no));
  mac_unit #(.AW_IN(TTW), .BW_IN(SW), .ACCW(ACCW)) u_mac_late (
    .clk, .rst_n, .en(en & corr_op), .first, .a(t_cur), .b(w_l), .acc(al), .acc_next(nl));

  assign me = ne[ACCW-1] ? ACCW'(-ne) : ACCW'(ne);
  assign mo = no[ACCW-1] ? ACCW'(-no) : ACCW'(no);
  assign ml = nl[ACCW-1] ? ACCW'(-nl) : ACCW'(nl);

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      i_r       <= '0;
      op_r      <= OP_DATA;
      pos_r     <= 1'b1;
      tag_r     <= '0;
      dec_valid <= 1'b0;
      dec_bit   <= 1'b0;
      dec_track <= '0;
      dec_tag   <= '0;
      tmpl_done <= 1'b0;
      overrun   <= 1'b0;
      c_early   <= '0;
      c_on      <= '0;
      c_late    <= '0;
    end else begin
      dec_valid <= 1'b0;
      tmpl_done <= 1'b0;
      if (start && busy) overrun <= 1'b1;
      if (en) begin
        if (!busy) begin
          op_r  <= op;
          pos_r <= ref_pos;
          tag_r <= tag;
        end
        if (last) begin
          busy    <= 1'b0;
          i_r     <= '0;
          dec_tag <= cur_tag;
          if (corr_op) begin
            dec_valid <= 1'b1;
            c_early   <= ne;
            c_on      <= no;
            c_late    <= nl;
            if (me > mo && me >= ml) begin
              dec_bit   <= ~ne[ACCW-1];
              dec_track <= -2'sd1;
            end else if (ml > mo) begin
              dec_bit   <= ~nl[ACCW-1];
              dec_track <= 2'sd1;
            end else begin
              dec_bit   <= ~no[ACCW-1];
              dec_track <= 2'sd0;
            end
          end else begin
            tmpl_done <= 1'b1;
          end
        end else begin
          busy <= 1'b1;
          i_r  <= cur_i + 1'b1;
        end
      end
    end
  end

  // template memory with its adder
  always_ff @(posedge clk) begin
    if (en) begin
      unique case (cur_op)
        OP_TMPL_FIRST: tmpl[cur_i] <= cur_pos ? TTW'(w_o) : TTW'(-w_o);
        OP_TMPL_ACC:   tmpl[cur_i] <= tmpl[cur_i] + (cur_pos ? TTW'(w_o) : TTW'(-w_o));
        OP_DIFF:       tmpl[cur_i] <= TTW'(w_o);
        default:       ;
      endcase
    end
  end

  // the window processor must be free when the next window arrives
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("seq_demodulator: window arrived while previous one still in process");

endmodule

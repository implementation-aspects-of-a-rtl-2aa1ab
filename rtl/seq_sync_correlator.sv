// Sequential symbol-level synchronizer (sliding correlation).
//
// Computes, over the frozen acquisition buffer r[0 .. (NP+1)NF+NW-2],
//   S(k) = sum_{j=1..NP} | s(k,j) |,   s(k,j) = sum_{i=k}^{k+NW-1} r[i] r[i+jNF]
// for k = 0 .. NF-1, and streams the final S(k) values (during the last pass)
// to a maximum search. The window sums use the document's recursion
//   s(k,j) = s(k-1,j) - p(k-1,j) + p(k+NW-1,j),  p(i,j) = r[i] r[i+jNF]
// so each clock needs one multiplier, one adder and one subtractor, plus the
// outer adder that accumulates |s(k,j)| over j. This resource count and the
// schedule of about NP(NF+NW) cycles follow the document. Two structures are
// this design's own: the product p(k-1,j) that leaves the window is not
// recomputed but taken from an NW-deep product delay line, and the partial sums
// over j are kept in an NF-entry accumulator memory.
//
// Schedule: pass j = 1..NP, step c = 0..NF+NW-2. Step c reads r[c] and
// r[c+jNF] (combinational buffer reads), forms p(c,j), and from step NW-1 on
// writes S(k) for k = c-NW+1. Total NP*(NF+NW-1) cycles from `start` to `done`.
// Interface: pulse `start` (ignored while busy); `busy` while running; `done`
// pulses for one cycle after the last step. s_valid/s_k/s_val deliver S(k) in
// increasing k during the last pass.
module seq_sync_correlator
  import tr_pkg::*;
#(
  parameter int unsigned NF      = 1000,
  parameter int unsigned NW      = 100,
  parameter int unsigned NP      = 3,
  parameter int unsigned NBITS   = 4,
  parameter map_e        MAPPING = MAP_SIGN_MAG,
  parameter int unsigned AW      = $clog2((NP + 1) * NF + NW),
  parameter int unsigned KW      = $clog2(NF),
  // |product| <= (2^NBITS-1)^2; window sum of NW products; outer sum of NP
  parameter int unsigned PW      = 2 * (NBITS + 1),
  parameter int unsigned SUMW    = PW + $clog2(NW) + 1,
  parameter int unsigned SW_OUT  = SUMW + $clog2(NP) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // buffer read ports
  output logic [AW-1:0]     addr_a,
  output logic [AW-1:0]     addr_b,
  input  logic [NBITS-1:0]  data_a,
  input  logic [NBITS-1:0]  data_b,
  // final S(k) stream
  output logic              s_valid,
  output logic [KW-1:0]     s_k,
  output logic [SW_OUT-1:0] s_val
);

  localparam int unsigned STEPS = NF + NW - 1;
  localparam int unsigned CW    = $clog2(STEPS + 1);
  localparam int unsigned JW    = $clog2(NP + 1);

  logic [CW-1:0]            c;
  logic [JW-1:0]            j;
  logic signed [PW-1:0]     prod;
  logic signed [PW-1:0]     dl [NW];      // product delay line, dl[NW-1] = p(c-NW)
  logic signed [SUMW-1:0]   s_acc, s_next;
  logic        [SUMW-1:0]   s_abs;
  logic        [SW_OUT-1:0] smem [NF];
  logic        [SW_OUT-1:0] s_new;
  logic        [KW-1:0]     k;
  logic                     k_active;

  assign addr_a = AW'(c);
  assign addr_b = AW'(c) + AW'(j * NF);

  always_comb begin
    prod   = PW'(decode_sample(8'(data_a), NBITS, MAPPING) * decode_sample(8'(data_b), NBITS, MAPPING));
    // one ADD (incoming product) and one SUB (product leaving the window)
    s_next = ((c == '0) ? '0 : s_acc) + SUMW'(prod)
             - ((int'(c) >= int'(NW)) ? SUMW'(dl[NW-1]) : '0);
    s_abs  = s_next[SUMW-1] ? SUMW'(-s_next) : SUMW'(s_next);
    k_active = (int'(c) >= int'(NW) - 1);
    k      = KW'(int'(c) - int'(NW) + 1);
    // outer adder over j
    s_new  = ((j == JW'(1)) ? '0 : smem[k]) + SW_OUT'(s_abs);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      c       <= '0;
      j       <= JW'(1);
      s_acc   <= '0;
      s_valid <= 1'b0;
      s_k     <= '0;
      s_val   <= '0;
    end else begin
      done    <= 1'b0;
      s_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          c    <= '0;
          j    <= JW'(1);
        end
      end else begin
        s_acc <= s_next;
        if (k_active && j == JW'(NP)) begin
          s_valid <= 1'b1;
          s_k     <= k;
          s_val   <= s_new;
        end
        if (int'(c) == int'(STEPS) - 1) begin
          c <= '0;
          if (j == JW'(NP)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  // product delay line and accumulator memory (no reset needed: every entry is
  // written before it is read within a run)
  always_ff @(posedge clk) begin
    if (busy) begin
      dl[0] <= prod;
      for (int i = 1; i < int'(NW); i++) dl[i] <= dl[i-1];
      if (k_active) smem[k] <= s_new;
    end
  end

endmodule

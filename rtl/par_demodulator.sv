// Parallel TR demodulator with early-late correlations: one whole block at once.
//
// Input: the NR reference windows and ND data windows of one block, each of
// NW+2 samples (sample 0 one early, 1..NW on time, NW+1 one late). Window w,
// sample s sits in bits [(w*(NW+2)+s)*NBITS +: NBITS]; windows 0..NR-1 are the
// references. The template t[i] = sum_r p_r x_r[i+1] needs NW(NR-1) adders (the
// 1/NR scaling of the average is left out; it changes no decision). Each data
// symbol d is correlated with the template by NW multipliers and an adder
// tree, and, as the document says for early-late operation, this
// multiply-accumulate structure is present three times (early, on time, late).
// bit[d] is the sign of the correlation with the largest magnitude (1 = symbol
// +1, ties prefer on time, then early) and track[d] says which one won (-1
// early, 0 on time, +1 late). The structure and resource counts follow the
// document; the tie rules and the window format are this design's own.
//
// Timing: everything is combinational up to one output register: `start`
// gives out_valid with bits/track one clock later.
module par_demodulator
  import tr_pkg::*;
#(
  parameter int unsigned NW      = 100,
  parameter int unsigned NR      = 2,
  parameter int unsigned ND      = 8,
  parameter int unsigned NBITS   = 4,
  parameter map_e        MAPPING = MAP_SIGN_MAG,
  parameter logic [NR-1:0] REF_PATTERN = '1,           // bit r: sign of reference r, 1 = +1
  parameter int unsigned SW      = NBITS + 1,
  parameter int unsigned TTW     = SW + $clog2(NR + 1),
  parameter int unsigned ACCW    = TTW + SW + $clog2(NW) + 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [(NR+ND)*(NW+2)*NBITS-1:0]   win_flat,
  output logic                              out_valid,
  output logic [ND-1:0]                     bits,
  output logic signed [1:0]                 track [ND]
);

  localparam int unsigned WL = NW + 2;

  function automatic int smp(int w, int s);
    return decode_sample(8'(win_flat[(w*WL + s)*NBITS +: NBITS]), NBITS, MAPPING);
  endfunction

  // template: sum of the reference pulses, each with its pattern sign
  logic signed [TTW-1:0] tmpl [NW];
  always_comb begin
    for (int i = 0; i < int'(NW); i++) begin
      tmpl[i] = '0;
      for (int r = 0; r < int'(NR); r++)
        tmpl[i] = tmpl[i] + (REF_PATTERN[r] ? TTW'(smp(r, i + 1)) : TTW'(-smp(r, i + 1)));
    end
  end

  logic [ND-1:0]     bit_n;
  logic signed [1:0] trk_n [ND];

  for (genvar d = 0; d < int'(ND); d++) begin : g_sym
    logic signed [ACCW-1:0] c [3];     // 0 early, 1 on time, 2 late
    logic        [ACCW-1:0] m [3];
    for (genvar e = 0; e < 3; e++) begin : g_el
      always_comb begin
        c[e] = '0;
        for (int i = 0; i < int'(NW); i++)
          c[e] = c[e] + ACCW'(tmpl[i] * TTW'(smp(int'(NR) + d, i + e)));
      end
      assign m[e] = c[e][ACCW-1] ? ACCW'(-c[e]) : ACCW'(c[e]);
    end
    always_comb begin
      if (m[0] > m[1] && m[0] >= m[2]) begin
        bit_n[d] = ~c[0][ACCW-1];
        trk_n[d] = -2'sd1;
      end else if (m[2] > m[1]) begin
        bit_n[d] = ~c[2][ACCW-1];
        trk_n[d] = 2'sd1;
      end else begin
        bit_n[d] = ~c[1][ACCW-1];
        trk_n[d] = 2'sd0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bits      <= '0;
      for (int d = 0; d < int'(ND); d++) track[d] <= '0;
    end else begin
      out_valid <= start;
      if (start) begin
        bits <= bit_n;
        for (int d = 0; d < int'(ND); d++) track[d] <= trk_n[d];
      end
    end
  end

endmodule

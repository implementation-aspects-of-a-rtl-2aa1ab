// Parallel symbol-level synchronizer: all NF sliding-correlation values at once.
//
// From the frozen acquisition buffer r[0 .. (NP+1)NF+NW-2] (flat vector, entry
// i in bits [i*NBITS +: NBITS]) it computes, for k = 0 .. NF-1,
//   S(k) = sum_{j=1..NP} | sum_{i=k}^{k+NW-1} r[i] r[i+jNF] |.
// As in the document's loop simplification, each distinct product
// p(i,j) = r[i] r[i+jNF] is formed once: NP(NF+NW-1) multipliers instead of
// NW*NP*NF. The sharing of the window additions is this design's own (the
// document only counts its adders): per j, a running sum C(i) of the products
// is formed and every window sum is one subtraction, s(k,j) = C(k+NW) - C(k);
// then |.| and the outer sum over j. The running sum is a ripple chain; a
// faster implementation would cut it with pipeline registers.
//
// Timing: `start` registers all NF values of S in one clock: s_valid pulses
// with s_all one cycle after start (s_all element k in bits [k*SVW +: SVW]).
module par_sync_correlator
  import tr_pkg::*;
#(
  parameter int unsigned NF      = 1000,
  parameter int unsigned NW      = 100,
  parameter int unsigned NP      = 3,
  parameter int unsigned NBITS   = 4,
  parameter map_e        MAPPING = MAP_SIGN_MAG,
  parameter int unsigned DEPTH   = (NP + 1) * NF + NW - 1,
  parameter int unsigned PW      = 2 * (NBITS + 1),
  parameter int unsigned SUMW    = PW + $clog2(NF + NW) + 1,
  parameter int unsigned SVW     = PW + $clog2(NW) + 1 + $clog2(NP) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [DEPTH*NBITS-1:0] r_flat,
  output logic                   s_valid,
  output logic [NF*SVW-1:0]      s_all
);

  localparam int unsigned NPROD = NF + NW - 1;

  logic        [SVW-1:0]  s_abs [NP][NF];
  logic        [SVW-1:0]  s_tot [NF];

  for (genvar j = 0; j < int'(NP); j++) begin : g_j
    // running sum of the products: g_c[i].c = p(0,j) + ... + p(i-1,j)
    for (genvar i = 0; i <= int'(NPROD); i++) begin : g_c
      logic signed [SUMW-1:0] c;
      if (i == 0) begin : g_zero
        assign c = '0;
      end else begin : g_add
        logic signed [PW-1:0] prod;   // one multiplier per distinct product
        assign prod = PW'(decode_sample(8'(r_flat[(i-1)*NBITS +: NBITS]), NBITS, MAPPING)
                          * decode_sample(8'(r_flat[((i-1) + (j + 1) * NF)*NBITS +: NBITS]), NBITS, MAPPING));
        assign c = g_c[i-1].c + SUMW'(prod);
      end
    end
    for (genvar k = 0; k < int'(NF); k++) begin : g_k
      logic signed [SUMW-1:0] w;
      assign w = g_c[k+NW].c - g_c[k].c;
      assign s_abs[j][k] = w[SUMW-1] ? SVW'(-w) : SVW'(w);
    end
  end

  always_comb begin
    for (int k = 0; k < int'(NF); k++) begin
      s_tot[k] = '0;
      for (int j = 0; j < int'(NP); j++) s_tot[k] = s_tot[k] + s_abs[j][k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_valid <= 1'b0;
    else        s_valid <= start;
  end

  // result register (read only after s_valid, so it needs no reset)
  always_ff @(posedge clk) begin
    if (start)
      for (int k = 0; k < int'(NF); k++) s_all[k*SVW +: SVW] <= s_tot[k];
  end

endmodule

// Sequential demodulator test, NW=8, NR=2, 4-bit sign-magnitude samples.
// Each block: two reference windows (pattern +1, -1) build the template, then
// data windows hold the same random pulse with a random sign, shifted by -1, 0
// or +1 sample, plus random windows. A reference model computes the template,
// the three correlations, the bit and the tracking decision. Windows are
// started back to back, one every NW clocks (the rate the receiver needs), and
// results must appear exactly NW clocks after their start. Differential mode
// (correlate with the current template, then keep the window as template) is checked too, and the overrun flag must stay low.
module tb_seq_demodulator;
  import tr_pkg::*;
  localparam int NW = 8, NR = 2, NBITS = 4, TAGW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ref_pos, busy, dec_valid, dec_bit, tmpl_done, overrun;
  demod_op_e op;
  logic [TAGW-1:0] tag, dec_tag;
  logic [NBITS-1:0] win [NW+2];
  logic signed [1:0] dec_track;
  localparam int ACCW = (NBITS + 1) + $clog2(NR + 1) + (NBITS + 1) + $clog2(NW) + 1;
  logic signed [ACCW-1:0] c_early, c_on, c_late;
  int checks = 0, failures = 0;

  seq_demodulator #(.NW(NW), .NR(NR), .NBITS(NBITS), .MAPPING(MAP_SIGN_MAG), .TAGW(TAGW)) dut (.*);

  function automatic logic [3:0] enc(int v);
    return v < 0 ? 4'(8 | -v) : 4'(v);
  endfunction

  int T [NW];
  int W [NW+2];
  int prevW [NW+2];
  int exp_bit [256];
  int exp_trk [256];
  int exp_ce [256];
  int exp_co [256];
  int exp_cl [256];
  bit is_corr [256];
  int start_cyc [256];
  int cyc = 0, ntag = 0, nres = 0, ntrk [3] = '{0, 0, 0};

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (dec_valid || tmpl_done) begin
      automatic int t = int'(dec_tag);
      checks += 2;
      if (cyc - start_cyc[t] != NW) begin failures++; $display("FAIL latency %0d", cyc - start_cyc[t]); end
      if (dec_valid != is_corr[t]) begin failures++; $display("FAIL result type for tag %0d", t); end
      if (dec_valid) begin
        checks += 5;
        if (int'(c_early) != exp_ce[t] || int'(c_on) != exp_co[t] || int'(c_late) != exp_cl[t]) begin
          failures++; $display("FAIL corr tag %0d: %0d %0d %0d exp %0d %0d %0d", t, c_early, c_on, c_late, exp_ce[t], exp_co[t], exp_cl[t]);
        end
        if (int'(dec_bit) != exp_bit[t]) begin failures++; $display("FAIL bit tag %0d", t); end
        if (int'(dec_track) != exp_trk[t]) begin failures++; $display("FAIL track tag %0d", t); end
        ntrk[int'(dec_track) + 1]++;
      end
      nres++;
    end
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic issue(demod_op_e o, logic p);
    automatic int ce = 0, co = 0, cl = 0;
    @(negedge clk);
    for (int i = 0; i < NW + 2; i++) win[i] = enc(W[i]);
    op = o; ref_pos = p; tag = TAGW'(ntag); start = 1;
    start_cyc[ntag] = cyc;
    is_corr[ntag] = (o == OP_DATA || o == OP_DIFF);
    if (is_corr[ntag]) begin
      for (int i = 0; i < NW; i++) begin
        ce += T[i] * W[i]; co += T[i] * W[i + 1]; cl += T[i] * W[i + 2];
      end
      exp_ce[ntag] = ce; exp_co[ntag] = co; exp_cl[ntag] = cl;
      if (iabs(ce) > iabs(co) && iabs(ce) >= iabs(cl)) begin exp_bit[ntag] = ce >= 0; exp_trk[ntag] = -1; end
      else if (iabs(cl) > iabs(co))                    begin exp_bit[ntag] = cl >= 0; exp_trk[ntag] = 1; end
      else                                             begin exp_bit[ntag] = co >= 0; exp_trk[ntag] = 0; end
    end
    if (o == OP_TMPL_FIRST) for (int i = 0; i < NW; i++) T[i] = p ? W[i + 1] : -W[i + 1];
    if (o == OP_TMPL_ACC)   for (int i = 0; i < NW; i++) T[i] += p ? W[i + 1] : -W[i + 1];
    if (o == OP_DIFF) for (int i = 0; i < NW; i++) T[i] = W[i + 1];
    prevW = W;
    ntag++;
    @(posedge clk); #1;
    start = 0;
    // the window must stay stable only while it is being processed
    repeat (NW - 1) @(posedge clk);
  endtask

  int P [NW+4];
  initial begin
    start = 0; op = OP_DATA; ref_pos = 1; tag = '0;
    for (int i = 0; i < NW + 2; i++) begin win[i] = '0; W[i] = 0; prevW[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int blk = 0; blk < 12; blk++) begin
      for (int i = 0; i < NW + 4; i++) P[i] = int'($urandom_range(0, 14)) - 7;
      for (int r = 0; r < NR; r++) begin
        for (int i = 0; i < NW + 2; i++) W[i] = (r == 0) ? P[i + 1] : -P[i + 1];
        issue(r == 0 ? OP_TMPL_FIRST : OP_TMPL_ACC, r == 0);
      end
      for (int d = 0; d < 6; d++) begin
        automatic int sh = int'($urandom_range(0, 2)) - 1;
        automatic int sg = $urandom_range(0, 1) ? 1 : -1;
        for (int i = 0; i < NW + 2; i++) W[i] = (d == 5) ? int'($urandom_range(0, 14)) - 7 : sg * P[i + 1 - sh];
        issue(OP_DATA, 1'b1);
      end
      for (int d = 0; d < 2; d++) begin
        for (int i = 0; i < NW + 2; i++) W[i] = int'($urandom_range(0, 14)) - 7;
        issue(OP_DIFF, 1'b1);
      end
    end
    repeat (NW + 2) @(posedge clk);
    checks += 3;
    if (nres != ntag) begin failures++; $display("FAIL results %0d of %0d", nres, ntag); end
    if (overrun) begin failures++; $display("FAIL overrun at nominal rate"); end
    if (ntrk[0] == 0 || ntrk[2] == 0) begin failures++; $display("FAIL tracking directions not all seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

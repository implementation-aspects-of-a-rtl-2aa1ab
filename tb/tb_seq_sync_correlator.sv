// Sequential synchronizer test with two instances:
//  * u_ex: the worked example of the sliding correlation (NF=5, NW=3, NP=1,
//    samples 0,-1,2,-1,0, 0,1,-2,1,1, 0,-1), whose estimates are
//    S = (5,6,5,1,1) with the maximum at the second sample;
//  * u_rnd: NF=23, NW=6, NP=3 on random 4-bit samples, every S(k) compared
//    with a direct evaluation of the double sum.
// Both feed a seq_max_search; the argmax and the run time NP(NF+NW-1) clocks
// are checked as well.
module tb_seq_sync_correlator;
  import tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- worked example, 3-bit sign-magnitude codes
  localparam int EXF = 5, EXW = 3, EXP = 1, EXL = (EXP + 1) * EXF + EXW - 1;
  int ex_r [EXL] = '{0, -1, 2, -1, 0, 0, 1, -2, 1, 1, 0, -1};
  int ex_s [EXF] = '{5, 6, 5, 1, 1};
  logic ex_start, ex_busy, ex_done, ex_sv, ex_found;
  logic [3:0] ex_aa, ex_ab;
  logic [2:0] ex_da, ex_db;
  logic [2:0] ex_k, ex_midx;
  logic [14:0] ex_sval, ex_mval;

  function automatic logic [2:0] sm3(int v);
    return v < 0 ? 3'(4 | -v) : 3'(v);
  endfunction
  assign ex_da = (int'(ex_aa) < EXL) ? sm3(ex_r[ex_aa]) : '0;
  assign ex_db = (int'(ex_ab) < EXL) ? sm3(ex_r[ex_ab]) : '0;

  seq_sync_correlator #(.NF(EXF), .NW(EXW), .NP(EXP), .NBITS(3), .MAPPING(MAP_SIGN_MAG),
                        .AW(4), .KW(3), .SW_OUT(15)) u_ex (
    .clk, .rst_n, .start(ex_start), .busy(ex_busy), .done(ex_done), .addr_a(ex_aa), .addr_b(ex_ab),
    .data_a(ex_da), .data_b(ex_db), .s_valid(ex_sv), .s_k(ex_k), .s_val(ex_sval));
  seq_max_search #(.VW(15), .IW(3)) u_exmax (.clk, .rst_n, .clear(ex_start), .valid(ex_sv),
    .idx(ex_k), .val(ex_sval), .found(ex_found), .max_idx(ex_midx), .max_val(ex_mval));

  // ---------------- random case, 4-bit offset-binary codes
  localparam int RF = 23, RW = 6, RP = 3, RL = (RP + 1) * RF + RW - 1;
  logic [3:0] rc [RL];
  logic r_start, r_busy, r_done, r_sv, r_found;
  logic [6:0] r_aa, r_ab;
  logic [3:0] r_da, r_db;
  logic [4:0] r_k, r_midx;
  logic [19:0] r_sval, r_mval;
  assign r_da = (int'(r_aa) < RL) ? rc[r_aa] : '0;
  assign r_db = (int'(r_ab) < RL) ? rc[r_ab] : '0;

  seq_sync_correlator #(.NF(RF), .NW(RW), .NP(RP), .NBITS(4), .MAPPING(MAP_OFFSET_BINARY),
                        .AW(7), .KW(5), .SW_OUT(20)) u_rnd (
    .clk, .rst_n, .start(r_start), .busy(r_busy), .done(r_done), .addr_a(r_aa), .addr_b(r_ab),
    .data_a(r_da), .data_b(r_db), .s_valid(r_sv), .s_k(r_k), .s_val(r_sval));
  seq_max_search #(.VW(20), .IW(5)) u_rmax (.clk, .rst_n, .clear(r_start), .valid(r_sv),
    .idx(r_k), .val(r_sval), .found(r_found), .max_idx(r_midx), .max_val(r_mval));

  function automatic int lvl(logic [3:0] c);  // offset binary level
    return 2 * int'(c) - 15;
  endfunction
  function automatic int s_ref(int k);
    int tot = 0;
    for (int j = 1; j <= RP; j++) begin
      int s = 0;
      for (int i = k; i < k + RW; i++) s += lvl(rc[i]) * lvl(rc[i + j * RF]);
      tot += (s < 0) ? -s : s;
    end
    return tot;
  endfunction

  int nseen_ex = 0, nseen_r = 0, cyc = 0, t0_ex = 0, t0_r = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ex_sv) begin
      checks++;
      if (int'(ex_sval) != ex_s[ex_k]) begin failures++; $display("FAIL ex S(%0d)=%0d exp %0d", ex_k, ex_sval, ex_s[ex_k]); end
      nseen_ex++;
    end
    if (r_sv) begin
      checks++;
      if (int'(r_sval) != s_ref(int'(r_k))) begin failures++; $display("FAIL rnd S(%0d)=%0d exp %0d", r_k, r_sval, s_ref(int'(r_k))); end
      nseen_r++;
    end
    if (ex_done) begin
      checks++;
      if (cyc - t0_ex != EXP * (EXF + EXW - 1) + 1) begin failures++; $display("FAIL ex cycles %0d", cyc - t0_ex); end
    end
    if (r_done) begin
      checks++;
      if (cyc - t0_r != RP * (RF + RW - 1) + 1) begin failures++; $display("FAIL rnd cycles %0d", cyc - t0_r); end
    end
  end

  initial begin
    ex_start = 0; r_start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int best, bi, v;
      for (int i = 0; i < RL; i++) rc[i] = 4'($urandom);
      if (run == 3) begin   // plant a strong repeating pulse at k = 9
        for (int f = 0; f <= RP; f++) for (int i = 0; i < RW; i++) rc[9 + f * RF + i] = (i % 2) ? 4'd15 : 4'd0;
      end
      @(negedge clk); ex_start = (run == 0); r_start = 1; t0_ex = cyc; t0_r = cyc;
      @(negedge clk); ex_start = 0; r_start = 0;
      wait (r_done); @(posedge clk); #1;
      best = -1; bi = 0;
      for (int k = 0; k < RF; k++) begin v = s_ref(k); if (v > best) begin best = v; bi = k; end end
      checks += 2;
      if (int'(r_midx) != bi || int'(r_mval) != best) begin failures++; $display("FAIL rnd argmax %0d/%0d exp %0d/%0d", r_midx, r_mval, bi, best); end
      if (run == 3 && int'(r_midx) != 9) begin failures++; $display("FAIL planted pulse not found"); end
      if (run == 0) begin
        checks += 2;
        if (ex_midx != 3'd1) begin failures++; $display("FAIL ex argmax %0d", ex_midx); end
        if (nseen_ex != EXF) begin failures++; $display("FAIL ex count %0d", nseen_ex); end
      end
    end
    checks++;
    if (nseen_r != 4 * RF) begin failures++; $display("FAIL rnd count %0d", nseen_r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

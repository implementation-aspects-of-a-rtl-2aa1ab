// Parallel demodulator test, NW=8, NR=2 (pattern +1, -1), ND=5: each block
// holds two references built from a random pulse and data windows with the
// same pulse, a random sign and a shift of -1, 0 or +1 sample (plus one random
// window). A reference model computes the template, the early/on-time/late
// correlations, the bits and the tracking decisions; results one clock after
// start.
module tb_par_demodulator;
  import tr_pkg::*;
  localparam int NW = 8, NR = 2, ND = 5, NBITS = 4, WL = NW + 2;
  localparam logic [NR-1:0] PAT = 2'b01;   // reference 0: +1, reference 1: -1
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, out_valid;
  logic [(NR+ND)*WL*NBITS-1:0] win_flat;
  logic [ND-1:0] bits;
  logic signed [1:0] track [ND];
  int checks = 0, failures = 0;
  int ntrk [3] = '{0, 0, 0};

  par_demodulator #(.NW(NW), .NR(NR), .ND(ND), .NBITS(NBITS), .MAPPING(MAP_SIGN_MAG),
                    .REF_PATTERN(PAT)) dut (.*);

  int W [NR+ND][WL];
  int P [WL+2];
  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    start = 0; win_flat = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 200; blk++) begin
      int T [NW];
      @(negedge clk);
      for (int i = 0; i < WL + 2; i++) P[i] = int'($urandom_range(0, 14)) - 7;
      for (int r = 0; r < NR; r++) for (int s = 0; s < WL; s++) W[r][s] = PAT[r] ? P[s + 1] : -P[s + 1];
      for (int d = 0; d < ND; d++) begin
        automatic int sh = int'($urandom_range(0, 2)) - 1;
        automatic int sg = $urandom_range(0, 1) ? 1 : -1;
        for (int s = 0; s < WL; s++) W[NR + d][s] = (d == ND - 1) ? int'($urandom_range(0, 14)) - 7 : sg * P[s + 1 - sh];
      end
      for (int w = 0; w < NR + ND; w++) for (int s = 0; s < WL; s++)
        win_flat[(w*WL + s)*NBITS +: NBITS] = W[w][s] < 0 ? 4'(8 | -W[w][s]) : 4'(W[w][s]);
      for (int i = 0; i < NW; i++) begin
        T[i] = 0;
        for (int r = 0; r < NR; r++) T[i] += PAT[r] ? W[r][i + 1] : -W[r][i + 1];
      end
      start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      for (int d = 0; d < ND; d++) begin
        int ce, co, cl, eb, et;
        ce = 0; co = 0; cl = 0;
        for (int i = 0; i < NW; i++) begin
          ce += T[i] * W[NR + d][i]; co += T[i] * W[NR + d][i + 1]; cl += T[i] * W[NR + d][i + 2];
        end
        if (iabs(ce) > iabs(co) && iabs(ce) >= iabs(cl)) begin eb = ce >= 0; et = -1; end
        else if (iabs(cl) > iabs(co))                    begin eb = cl >= 0; et = 1; end
        else                                             begin eb = co >= 0; et = 0; end
        checks += 2;
        if (int'(bits[d]) != eb) begin failures++; $display("FAIL blk %0d bit %0d", blk, d); end
        if (int'(track[d]) != et) begin failures++; $display("FAIL blk %0d track %0d: %0d exp %0d", blk, d, track[d], et); end
        ntrk[et + 1]++;
      end
    end
    checks++;
    if (ntrk[0] == 0 || ntrk[1] == 0 || ntrk[2] == 0) begin failures++; $display("FAIL not all tracking outcomes seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

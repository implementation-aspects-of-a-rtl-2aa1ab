// Parallel synchronizer test, NF=23, NW=6, NP=3, 4-bit offset-binary samples:
// all NF values S(k) from one start are compared with a direct evaluation of
// the double sum, and a comparator tree on the result must find the argmax.
// The worked example of the sliding correlation (NF=5, NW=3, NP=1, estimates
// 5,6,5,1,1) is run on a second instance. Result latency: one clock.
module tb_par_sync_correlator;
  import tr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int RF = 23, RW = 6, RP = 3, RL = (RP + 1) * RF + RW - 1, SVW = 20;
  logic [RL*4-1:0] r_flat;
  logic start, s_valid, t_valid;
  logic [RF*SVW-1:0] s_all;
  logic [SVW-1:0] t_val;
  logic [4:0] t_idx;

  par_sync_correlator #(.NF(RF), .NW(RW), .NP(RP), .NBITS(4), .MAPPING(MAP_OFFSET_BINARY),
                        .DEPTH(RL), .SVW(SVW)) dut (.clk, .rst_n, .start, .r_flat, .s_valid, .s_all);
  max_tree #(.N(RF), .VW(SVW), .IW(5)) u_tree (.clk, .rst_n, .in_valid(s_valid), .vals(s_all),
    .out_valid(t_valid), .max_val(t_val), .max_idx(t_idx));

  // worked example with 3-bit sign-magnitude codes
  localparam int EXF = 5, EXW = 3, EXL = 2 * EXF + EXW - 1;
  int ex_r [EXL] = '{0, -1, 2, -1, 0, 0, 1, -2, 1, 1, 0, -1};
  int ex_s [EXF] = '{5, 6, 5, 1, 1};
  logic [EXL*3-1:0] ex_flat;
  logic ex_valid;
  logic [EXF*12-1:0] ex_all;
  par_sync_correlator #(.NF(EXF), .NW(EXW), .NP(1), .NBITS(3), .MAPPING(MAP_SIGN_MAG),
                        .DEPTH(EXL), .SVW(12)) u_ex (.clk, .rst_n, .start, .r_flat(ex_flat),
                        .s_valid(ex_valid), .s_all(ex_all));

  function automatic int lvl(int i);
    return 2 * int'(r_flat[i*4 +: 4]) - 15;
  endfunction
  function automatic int s_ref(int k);
    int tot = 0;
    for (int j = 1; j <= RP; j++) begin
      int s = 0;
      for (int i = k; i < k + RW; i++) s += lvl(i) * lvl(i + j * RF);
      tot += (s < 0) ? -s : s;
    end
    return tot;
  endfunction

  initial begin
    start = 0; r_flat = '0;
    for (int i = 0; i < EXL; i++) ex_flat[i*3 +: 3] = ex_r[i] < 0 ? 3'(4 | -ex_r[i]) : 3'(ex_r[i]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int best, bi, v;
      @(negedge clk);
      for (int i = 0; i < RL; i++) r_flat[i*4 +: 4] = 4'($urandom);
      if (run == 5)
        for (int f = 0; f <= RP; f++) for (int i = 0; i < RW; i++) r_flat[(14 + f * RF + i)*4 +: 4] = (i % 3 == 0) ? 4'd0 : 4'd15;
      start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!s_valid) begin failures++; $display("FAIL s_valid latency"); end
      best = -1; bi = 0;
      for (int k = 0; k < RF; k++) begin
        v = s_ref(k);
        if (v > best) begin best = v; bi = k; end
        checks++;
        if (int'(s_all[k*SVW +: SVW]) != v) begin failures++; $display("FAIL S(%0d)=%0d exp %0d", k, s_all[k*SVW +: SVW], v); end
      end
      if (run == 0)
        for (int k = 0; k < EXF; k++) begin
          checks++;
          if (int'(ex_all[k*12 +: 12]) != ex_s[k]) begin failures++; $display("FAIL example S(%0d)", k); end
        end
      @(negedge clk);
      checks += 2;
      if (!t_valid || int'(t_idx) != bi || int'(t_val) != best) begin failures++; $display("FAIL argmax %0d exp %0d", t_idx, bi); end
      if (run == 5 && t_idx != 5'd14) begin failures++; $display("FAIL planted pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Comparator tree test with N=13 (not a power of two): random vectors with
// many equal values; the maximum and its lowest index are compared with a
// linear scan, one clock after in_valid.
module tb_max_tree;
  localparam int N = 13, VW = 6, IW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [N*VW-1:0] vals;
  logic [VW-1:0] max_val;
  logic [IW-1:0] max_idx;
  int checks = 0, failures = 0;
  max_tree #(.N(N), .VW(VW), .IW(IW)) dut (.*);
  initial begin
    in_valid = 0; vals = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int best, bi;
      @(negedge clk);
      best = -1; bi = 0;
      for (int k = 0; k < N; k++) begin
        vals[k*VW +: VW] = VW'((t % 3 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 63));
        if (int'(vals[k*VW +: VW]) > best) begin best = vals[k*VW +: VW]; bi = k; end
      end
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks += 3;
      if (!out_valid) begin failures++; $display("FAIL latency"); end
      if (int'(max_val) != best) begin failures++; $display("FAIL max %0d exp %0d", max_val, best); end
      if (int'(max_idx) != bi) begin failures++; $display("FAIL idx %0d exp %0d", max_idx, bi); end
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

// Streams random values (with repeats) into the sequential argmax and checks
// the maximum and its first index after every value and after a clear.
module tb_seq_max_search;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, valid, found;
  logic [5:0] idx, max_idx;
  logic [7:0] val, max_val;
  int checks = 0, failures = 0;
  int bestv, besti;
  seq_max_search #(.VW(8), .IW(6)) dut (.*);
  initial begin
    clear = 0; valid = 0; idx = 0; val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      checks++; if (found) begin failures++; $display("FAIL found after clear"); end
      bestv = -1; besti = 0;
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        valid = 1; idx = 6'(k); val = 8'($urandom_range(0, 40) + run);
        if (int'(val) > bestv) begin bestv = val; besti = k; end
        @(posedge clk); #1; valid = 0;
        checks += 2;
        if (int'(max_val) != bestv) begin failures++; $display("FAIL max %0d exp %0d", max_val, bestv); end
        if (int'(max_idx) != besti) begin failures++; $display("FAIL idx %0d exp %0d", max_idx, besti); end
      end
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

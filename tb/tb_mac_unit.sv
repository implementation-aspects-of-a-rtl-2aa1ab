// Random multiply-accumulate sequences against a reference sum, including
// restart with `first` and hold while en is low.
module tb_mac_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, first;
  logic signed [7:0] a;
  logic signed [4:0] b;
  logic signed [19:0] acc, acc_next;
  int checks = 0, failures = 0;
  int expv;
  mac_unit #(.AW_IN(8), .BW_IN(5), .ACCW(20)) dut (.*);
  initial begin
    en = 0; first = 0; a = 0; b = 0; expv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      first = (t % 37 == 0);
      a = 8'($urandom);
      b = 5'($urandom);
      if (en) expv = (first ? 0 : expv) + int'(a) * int'(b);
      @(posedge clk); #1;
      checks++;
      if (int'(acc) != expv) begin failures++; $display("FAIL t=%0d acc=%0d exp=%0d", t, acc, expv); end
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

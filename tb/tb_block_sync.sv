// Block synchronizer test: feeds differential decisions made of random bits
// that avoid the pattern, then the 8-bit training pattern, and checks that
// `found` pulses exactly once, after the last pattern bit, with its window
// number; decisions after lock are ignored; the first decision after a clear
// is discarded (a pattern completed by it must not match).
module tb_block_sync;
  localparam int L = 8, QW = 16;
  localparam logic [L-1:0] TRAIN = 8'b0010_1101;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, dec_valid, dec_bit, found, locked;
  logic [QW-1:0] dec_seq, found_seq;
  int checks = 0, failures = 0, nfound = 0;
  int seq = 0;
  logic [L-1:0] hist;

  block_sync #(.TRAIN_LEN(L), .TRAIN(TRAIN), .QW(QW)) dut (.*);

  always @(posedge clk) if (rst_n && found) nfound++;

  task automatic send(logic b);
    @(negedge clk);
    dec_valid = 1; dec_bit = b; dec_seq = QW'(seq);
    seq++;
    @(negedge clk);
    dec_valid = 0;
  endtask

  initial begin
    clear = 0; dec_valid = 0; dec_bit = 0; dec_seq = '0; hist = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // case 1: the pattern is completed only counting the discarded first bit
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = L - 1; i >= 0; i--) send(TRAIN[i]);
    checks++;
    if (nfound != 0) begin failures++; $display("FAIL matched on a discarded decision"); end
    // case 2: random prefix, then the pattern
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    hist = '0;
    for (int i = 0; i < 40; i++) begin
      logic b;
      b = 1'($urandom);
      if ({hist[L-2:0], b} == TRAIN) b = ~b;
      hist = {hist[L-2:0], b};
      send(b);
    end
    checks++;
    if (nfound != 0) begin failures++; $display("FAIL false match"); end
    for (int i = L - 1; i >= 0; i--) begin
      send(TRAIN[i]);
      if (i == 0) begin
        @(posedge clk); #1;
        checks += 3;
        if (nfound != 1) begin failures++; $display("FAIL no match after pattern"); end
        if (int'(found_seq) != seq - 1) begin failures++; $display("FAIL found_seq %0d exp %0d", found_seq, seq - 1); end
        if (!locked) begin failures++; $display("FAIL not locked"); end
      end
    end
    for (int i = L - 1; i >= 0; i--) send(TRAIN[i]);
    checks++;
    if (nfound != 1) begin failures++; $display("FAIL matched again while locked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

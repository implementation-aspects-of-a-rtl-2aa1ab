// Streams samples whose code is (absolute index mod 16) through the window
// capture unit, NAD=4 per clock, NF=40, NW=6. Checks each window's contents,
// its sequence number, the spacing of NF/NAD clocks between windows, and the
// early-late moves: a request tagged with the current epoch moves the next
// window by one sample, a second request with a stale epoch is ignored.
module tb_window_capture;
  localparam int NF = 40, NW = 6, NAD = 4, NBITS = 4, TW = 32, QW = 16, EW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic chunk_valid;
  logic [TW-1:0] chunk_abs, begin_abs, next_begin;
  logic [NBITS-1:0] din [NAD];
  logic arm, active, win_valid, adj_applied;
  logic signed [1:0] adj_req, adj_dir;
  logic [EW-1:0] adj_epoch, win_epoch, epoch;
  logic [NBITS-1:0] win [NW+2];
  logic [QW-1:0] win_seq;
  int checks = 0, failures = 0;

  window_capture #(.NF(NF), .NW(NW), .NAD(NAD), .NBITS(NBITS), .TW(TW), .QW(QW), .EW(EW)) dut (.*);

  int exp_begin, nwin = 0, last_cyc = -1, cyc = 0, napplied = 0;
  int chunk = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (win_valid) begin
      for (int i = 0; i < NW + 2; i++) begin
        checks++;
        if (win[i] != NBITS'(exp_begin + i)) begin failures++; $display("FAIL win %0d[%0d]=%0d exp %0d", nwin, i, win[i], NBITS'(exp_begin + i)); end
      end
      checks++;
      if (int'(win_seq) != nwin) begin failures++; $display("FAIL seq"); end
      if (last_cyc >= 0 && nwin != 4 && nwin != 5) begin
        checks++;
        if (cyc - last_cyc != NF / NAD) begin failures++; $display("FAIL spacing %0d", cyc - last_cyc); end
      end
      last_cyc = cyc;
      nwin++;
      exp_begin += NF;
    end
    if (adj_applied) begin
      napplied++;
      exp_begin += int'(adj_dir);
    end
  end

  initial begin
    chunk_valid = 0; chunk_abs = '0; arm = 0; begin_abs = '0; adj_req = '0; adj_epoch = '0;
    for (int l = 0; l < NAD; l++) din[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        forever begin
          @(negedge clk);
          chunk_valid = 1;
          chunk_abs = TW'(chunk * NAD);
          for (int l = 0; l < NAD; l++) din[l] = NBITS'(chunk * NAD + l);
          chunk++;
        end
      end
      begin
        @(negedge clk); @(negedge clk);
        arm = 1; begin_abs = 51; exp_begin = 51;  // window crosses a chunk edge
        @(negedge clk); arm = 0;
        wait (nwin == 3);
        @(negedge clk); adj_req = 2'sd1; adj_epoch = epoch;        // later by one
        @(negedge clk); adj_req = 2'sd1; adj_epoch = epoch - 1'b1; // stale: ignored
        @(negedge clk); adj_req = 2'sd0;
        wait (nwin == 6);
        @(negedge clk); adj_req = -2'sd1; adj_epoch = epoch;       // earlier by one
        @(negedge clk); adj_req = 2'sd0;
        wait (nwin == 10);
        checks += 2;
        if (napplied != 2) begin failures++; $display("FAIL applied %0d", napplied); end
        if (epoch != 8'd2) begin failures++; $display("FAIL epoch %0d", epoch); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Fills the acquisition shift register with a known sample sequence, checks
// that it reports full after DEPTH samples, freezes, holds the oldest sample at
// entry 0 and reads correctly through both ports; then clears and refills.
module tb_capture_buffer;
  localparam int NAD = 4, NBITS = 4, DEPTH = 24, AW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, shift_en, full;
  logic [NBITS-1:0] din [NAD];
  logic [AW-1:0] addr_a, addr_b;
  logic [NBITS-1:0] data_a, data_b;
  logic [DEPTH*NBITS-1:0] contents;
  int checks = 0, failures = 0;

  capture_buffer #(.NAD(NAD), .NBITS(NBITS), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  task automatic fill(int base, int rows);
    for (int r = 0; r < rows; r++) begin
      @(negedge clk);
      shift_en = 1;
      for (int l = 0; l < NAD; l++) din[l] = NBITS'(base + r * NAD + l);
    end
    @(negedge clk);
    shift_en = 0;
  endtask

  task automatic check_contents(int base);
    for (int i = 0; i < DEPTH; i++) begin
      addr_a = AW'(i);
      addr_b = AW'(DEPTH - 1 - i);
      #1;
      checks += 2;
      if (data_a != NBITS'(base + i)) begin failures++; $display("FAIL a[%0d]=%0d", i, data_a); end
      if (data_b != NBITS'(base + DEPTH - 1 - i)) begin failures++; $display("FAIL b[%0d]", i); end
      checks++;
      if (contents[i*NBITS +: NBITS] != NBITS'(base + i)) begin failures++; $display("FAIL contents[%0d]", i); end
    end
  endtask

  initial begin
    clear = 0; shift_en = 0; addr_a = '0; addr_b = '0;
    for (int l = 0; l < NAD; l++) din[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fill(3, DEPTH / NAD - 1);
    checks++; if (full) begin failures++; $display("FAIL full too early"); end
    fill(3 + DEPTH - NAD, 1);
    checks++; if (!full) begin failures++; $display("FAIL not full"); end
    fill(100, 2);                       // must be ignored while full
    check_contents(3);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++; if (full) begin failures++; $display("FAIL full after clear"); end
    fill(7, DEPTH / NAD);
    check_contents(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

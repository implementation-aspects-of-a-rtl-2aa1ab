// Checks the A/D bank model against an independent real-valued quantizer for
// both code mappings (4 bits), including saturation beyond +-0.5 and the
// one-clock latency.
module tb_adc_bank;
  import tr_pkg::*;
  localparam int NAD = 4, NBITS = 4, AIN_W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic din_valid;
  logic signed [AIN_W-1:0] din [NAD];
  logic v1, v2;
  logic [NBITS-1:0] c1 [NAD];
  logic [NBITS-1:0] c2 [NAD];
  int checks = 0, failures = 0;

  adc_bank #(.NAD(NAD), .NBITS(NBITS), .AIN_W(AIN_W), .MAPPING(MAP_OFFSET_BINARY)) u1 (
    .clk, .rst_n, .din_valid, .din, .code_valid(v1), .code(c1));
  adc_bank #(.NAD(NAD), .NBITS(NBITS), .AIN_W(AIN_W), .MAPPING(MAP_SIGN_MAG)) u2 (
    .clk, .rst_n, .din_valid, .din, .code_valid(v2), .code(c2));

  // mapping 1: 16 steps of 1/16 over [-0.5,0.5], amplitude 1.0 = 2048
  function automatic int ref1(int x);
    real a = x / 2048.0;
    int c;
    if (a > 0.5) a = 0.5;
    if (a < -0.5) a = -0.5;
    c = int'($floor((a + 0.5) * 16.0));
    if (c > 15) c = 15;
    return c;
  endfunction
  // mapping 2: 15 levels, step 1/15, nearest, sign-magnitude
  function automatic int ref2(int x);
    real a = x / 2048.0;
    int m;
    if (a > 0.5) a = 0.5;
    if (a < -0.5) a = -0.5;
    m = int'($floor((a < 0 ? -a : a) * 15.0 + 0.5));
    if (m > 7) m = 7;
    return (a < 0 && m != 0) ? (8 | m) : m;
  endfunction

  int xs [NAD];
  initial begin
    din_valid = 0;
    for (int l = 0; l < NAD; l++) din[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int l = 0; l < NAD; l++) begin
        xs[l] = (t < 8) ? (l * 512 - 2048 + t * 64) : int'($urandom_range(0, 4095)) - 2048;
        din[l] = AIN_W'(xs[l]);
      end
      din_valid = 1;
      @(posedge clk);
      #1;
      checks++;
      if (!(v1 && v2)) begin failures++; $display("FAIL: valid not one cycle after input"); end
      for (int l = 0; l < NAD; l++) begin
        checks += 2;
        if (int'(c1[l]) != ref1(xs[l])) begin failures++; $display("FAIL m1 x=%0d got %0d exp %0d", xs[l], c1[l], ref1(xs[l])); end
        if (int'(c2[l]) != ref2(xs[l])) begin failures++; $display("FAIL m2 x=%0d got %0d exp %0d", xs[l], c2[l], ref2(xs[l])); end
        // decoded levels keep the sign of the input
        checks++;
        if (xs[l] > 200 && decode_sample(8'(c2[l]), NBITS, MAP_SIGN_MAG) <= 0) begin failures++; $display("FAIL sign"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

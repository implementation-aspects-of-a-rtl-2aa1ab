// Behavioural model of the bank of NAD time-interleaved A/D converters.
//
// The real part is mixed-signal: NAD converters clocked on NAD phases spaced
// 1/fs apart, each running at fs/NAD, so that one receiver clock delivers NAD
// consecutive samples. This model stands in for it at the digital boundary:
// each lane receives the ideal, finely resolved input amplitude for its sampling
// instant (AIN_W-bit two's complement, 2^(AIN_W-1) = amplitude 1.0 after the
// gain control), and the model reproduces the converter transfer function:
//   * saturation at +-0.5, the level that holds 99% of the amplitude density;
//   * mapping 1 (offset binary): 2^n uniform steps over [-0.5, 0.5], no zero;
//   * mapping 2 (sign-magnitude): 2^n-1 levels with step 1/(2^n-1) and a code
//     for zero, rounding to the nearest level.
// Both mappings and the +-0.5 saturation follow the document; the input format
// and the one-cycle register latency are choices of this model.
//
// Timing: din is sampled on each rising clock edge while din_valid is high;
// codes and code_valid appear one cycle later. Lane 0 is the earliest sample.
module adc_bank
  import tr_pkg::*;
#(
  parameter int unsigned NAD     = 10,
  parameter int unsigned NBITS   = 4,
  parameter int unsigned AIN_W   = 12,
  parameter map_e        MAPPING = MAP_SIGN_MAG
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    din_valid,
  input  logic signed [AIN_W-1:0] din  [NAD],
  output logic                    code_valid,
  output logic        [NBITS-1:0] code [NAD]
);

  localparam int HALF   = 1 << (AIN_W - 2);           // amplitude 0.5
  localparam int LEVELS = (1 << NBITS) - 1;

  function automatic logic [NBITS-1:0] quantize(logic signed [AIN_W-1:0] x);
    int xs;
    int c;
    int mag;
    xs = int'(x);
    if (xs >  HALF) xs =  HALF;
    if (xs < -HALF) xs = -HALF;
    if (MAPPING == MAP_OFFSET_BINARY) begin
      // 2^NBITS equal steps over [-HALF, HALF]
      c = ((xs + HALF) << NBITS) / (2 * HALF);
      if (c > LEVELS) c = LEVELS;
      return NBITS'(c);
    end
    // step = 2*HALF/LEVELS, nearest level
    mag = ((xs < 0 ? -xs : xs) * LEVELS * 2 + 2 * HALF) / (4 * HALF);
    if (mag > (1 << (NBITS - 1)) - 1) mag = (1 << (NBITS - 1)) - 1;
    c = mag;
    if (xs < 0 && mag != 0) c = c | (1 << (NBITS - 1));
    return NBITS'(c);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_valid <= 1'b0;
      for (int l = 0; l < NAD; l++) code[l] <= '0;
    end else begin
      code_valid <= din_valid;
      if (din_valid) begin
        for (int l = 0; l < NAD; l++) code[l] <= quantize(din[l]);
      end
    end
  end

endmodule

// Shared types and helpers of the transmitted-reference (TR) UWB receiver.
//
// Samples travel through the receiver as the n-bit codes produced by the A/D
// converters. Two code mappings are supported, both taken from the document's
// A/D study:
//   MAP_OFFSET_BINARY (mapping 1): all 2^n codes used, no code for zero; code c
//     stands for the odd level 2c-(2^n-1) in half-step units.
//   MAP_SIGN_MAG (mapping 2): 2^n-1 levels with a code for zero, MSB = sign,
//     remaining bits = magnitude. Small inputs map to exact zero, which removes
//     "idle noise" activity in the arithmetic downstream.
// decode_sample() turns a code into a signed integer level so that all
// arithmetic units (correlators, template adder, MACs) work on plain two's
// complement numbers. The integer scale differs between the two mappings, which
// does not matter: every decision in the receiver is a sign or a comparison of
// quantities with the same scale.
package tr_pkg;

  typedef enum logic {
    MAP_OFFSET_BINARY = 1'b0,
    MAP_SIGN_MAG      = 1'b1
  } map_e;

  // Operations the sequential demodulator can run on one captured window.
  typedef enum logic [1:0] {
    OP_TMPL_FIRST = 2'd0,  // template := p * window   (first reference pulse)
    OP_TMPL_ACC   = 2'd1,  // template += p * window   (further reference pulses)
    OP_DATA       = 2'd2,  // early/on-time/late correlation with the template
    OP_DIFF       = 2'd3   // correlate with the previous window, then keep this one
  } demod_op_e;

  // Width of a decoded sample: one bit more than the code covers both mappings.
  function automatic int unsigned sample_w(int unsigned nbits);
    return nbits + 1;
  endfunction

  // Code -> signed level. Result is returned as int and is always within
  // +-(2^nbits - 1), i.e. fits in sample_w(nbits) bits.
  function automatic int decode_sample(logic [7:0] code, int unsigned nbits, map_e mapping);
    int mag;
    int c;
    c = int'(code) & ((1 << nbits) - 1);
    if (mapping == MAP_OFFSET_BINARY) begin
      return 2 * c - ((1 << nbits) - 1);
    end
    mag = c & ((1 << (nbits - 1)) - 1);
    return c[nbits-1] ? -mag : mag;
  endfunction

endpackage

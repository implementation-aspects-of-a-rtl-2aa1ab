// Multiply-accumulate unit of the sequential demodulator.
//
// acc := (first ? 0 : acc) + a*b on every clock with `en`. The demodulator uses
// three of these in parallel, for the early, on-time and late correlations of
// the early-late tracking loop, as the document's sequential structure does.
// acc_next shows the value the accumulator takes at the next edge, so that a
// decision can be formed in the same cycle as the last accumulation.
module mac_unit #(
  parameter int unsigned AW_IN = 8,     // width of operand a
  parameter int unsigned BW_IN = 5,     // width of operand b
  parameter int unsigned ACCW  = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic signed [AW_IN-1:0] a,
  input  logic signed [BW_IN-1:0] b,
  output logic signed [ACCW-1:0]  acc,
  output logic signed [ACCW-1:0]  acc_next
);

  logic signed [AW_IN+BW_IN-1:0] prod;

  assign prod     = a * b;
  assign acc_next = (first ? '0 : acc) + ACCW'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule

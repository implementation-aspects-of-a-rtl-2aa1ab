// Acquisition buffer: the A/D outputs organised as a shift register.
//
// Each clock with shift_en, the NAD new codes of the interleaved A/D bank enter
// at the top and every stored code moves down by NAD places, so entry 0 always
// holds the oldest sample. Organising the converter outputs as shift registers,
// with no write-address decoder, follows the document; its length of
// (NP+1)*NF+NW-1 samples is the memory the document counts for the
// synchronizer (rounded up here to a whole number of NAD-sample rows).
//
// Interface: `clear` restarts the fill count; `full` rises once DEPTH samples
// have entered since the last clear and stays high until the next clear. While
// full, shifting stops (the contents are frozen for the synchronizer). Two
// combinational read ports (addr_a/addr_b -> data_a/data_b) serve the sequential
// correlator, which reads r[i] and r[i+j*NF] in the same cycle; the read ports
// are this design's choice. The parallel synchronizer instead reads all
// entries at once through `contents` (entry i in bits [i*NBITS +: NBITS]).
module capture_buffer #(
  parameter int unsigned NAD   = 10,
  parameter int unsigned NBITS = 4,
  parameter int unsigned DEPTH = 4100,               // multiple of NAD
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift_en,
  input  logic [NBITS-1:0] din [NAD],
  output logic             full,
  input  logic [AW-1:0]    addr_a,
  input  logic [AW-1:0]    addr_b,
  output logic [NBITS-1:0] data_a,
  output logic [NBITS-1:0] data_b,
  output logic [DEPTH*NBITS-1:0] contents   // whole buffer, for a parallel synchronizer
);

  localparam int unsigned ROWS = DEPTH / NAD;
  localparam int unsigned RW   = $clog2(ROWS + 1);

  // entry i lives in bits [i*NBITS +: NBITS]; entry 0 is the oldest sample
  logic [DEPTH*NBITS-1:0] sr;
  logic [NAD*NBITS-1:0]   din_flat;
  logic [RW-1:0]          rows;

  always_comb begin
    for (int l = 0; l < int'(NAD); l++) din_flat[l*NBITS +: NBITS] = din[l];
  end

  assign full = (rows == RW'(ROWS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows <= '0;
    end else if (clear) begin
      rows <= '0;
    end else if (shift_en && !full) begin
      rows <= rows + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (shift_en && !full && !clear) begin
      sr <= {din_flat, sr[DEPTH*NBITS-1 : NAD*NBITS]};
    end
  end

  assign contents = sr;
  assign data_a = (int'(addr_a) < int'(DEPTH)) ? sr[addr_a*NBITS +: NBITS] : '0;
  assign data_b = (int'(addr_b) < int'(DEPTH)) ? sr[addr_b*NBITS +: NBITS] : '0;

  initial begin
    assert (DEPTH % NAD == 0) else $error("DEPTH must be a multiple of NAD");
  end

endmodule

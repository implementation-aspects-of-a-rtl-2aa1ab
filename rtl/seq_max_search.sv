// Sequential maximum search (argmax) over a stream of correlation values.
//
// One comparator and one register pair holding the running maximum and its
// index, as the document describes for the sequential synchronizer: the NF
// values S(k) arrive one per clock and each is compared with the stored
// maximum. On equal values the earlier index is kept (this design's choice).
//
// Interface: `clear` empties the search (the next valid value is taken as is).
// For each cycle with `valid`, (idx, val) is compared; max_idx/max_val reflect
// it from the next cycle on. `found` tells that at least one value was seen.
module seq_max_search #(
  parameter int unsigned VW = 20,
  parameter int unsigned IW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          valid,
  input  logic [IW-1:0] idx,
  input  logic [VW-1:0] val,
  output logic          found,
  output logic [IW-1:0] max_idx,
  output logic [VW-1:0] max_val
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found   <= 1'b0;
      max_idx <= '0;
      max_val <= '0;
    end else if (clear) begin
      found   <= 1'b0;
      max_idx <= '0;
      max_val <= '0;
    end else if (valid && (!found || val > max_val)) begin
      found   <= 1'b1;
      max_idx <= idx;
      max_val <= val;
    end
  end

endmodule

// Comparator tree for the parallel maximum search (argmax of N values).
//
// The N inputs are padded to the next power of two with zeros and reduced by
// log2 levels of two-input comparators, each passing on the larger value and
// its index; on equal values the lower index wins. This is the tree of
// comparators the document shows for the parallel synchronizer; the padding,
// the tie rule and the single output register are this design's choices.
//
// Timing: with `in_valid`, the result (max_val, max_idx) is registered and
// out_valid pulses one clock later. Input k sits in bits [k*VW +: VW].
module max_tree #(
  parameter int unsigned N  = 1000,
  parameter int unsigned VW = 20,
  parameter int unsigned IW = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [N*VW-1:0] vals,
  output logic            out_valid,
  output logic [VW-1:0]   max_val,
  output logic [IW-1:0]   max_idx
);

  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NL = 1 << LV;

  // level l holds NL >> l candidates; level 0 are the (padded) inputs
  for (genvar l = 0; l <= int'(LV); l++) begin : g_lvl
    logic [VW-1:0] lv [NL >> l];
    logic [IW-1:0] li [NL >> l];
    for (genvar n = 0; n < int'(NL >> l); n++) begin : g_node
      if (l == 0) begin : g_leaf
        if (n < int'(N)) begin : g_in
          assign lv[n] = vals[n*VW +: VW];
        end else begin : g_pad
          assign lv[n] = '0;
        end
        assign li[n] = IW'(n);
      end else begin : g_cmp
        logic right_wins;
        assign right_wins = g_lvl[l-1].lv[2*n+1] > g_lvl[l-1].lv[2*n];
        assign lv[n] = right_wins ? g_lvl[l-1].lv[2*n+1] : g_lvl[l-1].lv[2*n];
        assign li[n] = right_wins ? g_lvl[l-1].li[2*n+1] : g_lvl[l-1].li[2*n];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      max_val   <= '0;
      max_idx   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        max_val <= g_lvl[LV].lv[0];
        max_idx <= g_lvl[LV].li[0];
      end
    end
  end

endmodule

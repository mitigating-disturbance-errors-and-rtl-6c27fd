// Tree pseudo-LRU replacement state for the RMW cache.
//
// ENTRIES-1 node bits form a binary tree over the entries (ENTRIES a power of
// two). Following the node bits from the root gives the victim, an entry that
// was not used recently. `touch_en` marks `touch_idx` as most recently used
// by pointing every node on its path away from it (clock edge). The victim is
// combinational. This approximates the LRU policy of the cache at a cost of
// one bit per entry instead of a full age ordering.
module rmw_plru #(
  parameter int unsigned ENTRIES = 32768
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        touch_en,
  input  logic [$clog2(ENTRIES)-1:0]  touch_idx,
  output logic [$clog2(ENTRIES)-1:0]  victim
);

  localparam int unsigned LV = $clog2(ENTRIES);

  logic [ENTRIES-1:0] tree_q;   // node n at bit n, n = 1 .. ENTRIES-1

  always_comb begin
    logic [LV-1:0] node;
    node = LV'(1);
    // after LV steps the leading one has been shifted out: the leaf number
    // minus ENTRIES, i.e. the entry index, is left
    for (int l = 0; l < LV; l++) node = {node[LV-2:0], tree_q[node]};
    victim = node;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < ENTRIES; n++) tree_q[n] <= 1'b0;
    end else if (touch_en) begin
      // node at depth l on the path to touch_idx gets the branch not taken
      for (int l = 0; l < LV; l++)
        tree_q[LV'({1'b1, touch_idx} >> (LV - l))] <= ~touch_idx[LV-1-l];
    end
  end

endmodule

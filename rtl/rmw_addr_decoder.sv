// Address decoder of the RMW cache: a fully associative index lookup table.
//
// Each LUT slot holds a tag (the page address) and the cache index the tag is
// mapped to. The page address of a command is compared with every tag at
// once; the per-slot match vector is a one-hot code that selects the index
// column, and the OR of the vector is the `found` flag. The slot count equals
// the number of cache entries. Slot i is written with index i when a page is
// allocated to cache entry i (`wr_*`, effective at the clock edge); reset
// clears all slots. The lookup is combinational.
module rmw_addr_decoder
  import rmw_pkg::*;
#(
  parameter int unsigned ENTRIES = 32768
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  page_t                       lk_page,
  output logic                        found,
  output logic [$clog2(ENTRIES)-1:0]  index,
  input  logic                        wr_en,
  input  logic [$clog2(ENTRIES)-1:0]  wr_slot,
  input  page_t                       wr_page
);

  localparam int unsigned EI_W = $clog2(ENTRIES);

  logic [ENTRIES-1:0] used_q;
  page_t              tag_q [ENTRIES];
  logic [EI_W-1:0]    idx_q [ENTRIES];
  logic [ENTRIES-1:0] onehot;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) onehot[i] = used_q[i] && (tag_q[i] == lk_page);
  end

  always_comb begin
    index = '0;
    for (int i = 0; i < ENTRIES; i++) index |= onehot[i] ? idx_q[i] : '0;
  end

  assign found = |onehot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) used_q[i] <= 1'b0;
    end else begin
      if (wr_en) used_q[wr_slot] <= 1'b1;
      // A page is never mapped to two slots, so the match vector is one-hot.
      assert ($onehot0(onehot));
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[wr_slot] <= wr_page;
      idx_q[wr_slot] <= wr_slot;
    end
  end

endmodule

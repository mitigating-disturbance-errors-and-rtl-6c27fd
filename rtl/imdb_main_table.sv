// IMDB main table: tracks the write addresses that may become
// write-disturbance aggressors.
//
// Row&Col live in a content-addressable part (valid bit + address per entry,
// compared with the looked-up address in parallel); ZeroFlipCntr (8 x 9 b),
// MaxZFCIdx (3 b) and RewriteCntr (8 b) live in a RAM part with one read port
// and one write port. The block also reports the lowest-numbered free entry,
// used to fill a table that is not yet full.
//
// Timing: lookup, free-entry search and read are combinational; a write
// (`wr_en`) updates the entry, including its valid bit, at the clock edge.
// Reset clears all valid bits. Combinational read ports are a simplification
// of this design; the table organisation follows the described CAM + SRAM.
module imdb_main_table
  import imdb_pkg::*;
#(
  parameter int unsigned ENTRIES = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // CAM lookup
  input  addr_t                       lk_addr,
  output logic                        lk_hit,
  output logic [$clog2(ENTRIES)-1:0]  lk_idx,
  // free entry
  output logic                        free_any,
  output logic [$clog2(ENTRIES)-1:0]  free_idx,
  // read port
  input  logic [$clog2(ENTRIES)-1:0]  rd_idx,
  output logic                        rd_valid,
  output mt_entry_t                   rd_entry,
  // write port
  input  logic                        wr_en,
  input  logic [$clog2(ENTRIES)-1:0]  wr_idx,
  input  logic                        wr_valid,
  input  mt_entry_t                   wr_entry
);

  localparam int unsigned EI_W = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  addr_t              cam_q [ENTRIES];
  mt_entry_t          ram_q [ENTRIES];

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && cam_q[i] == lk_addr) begin
        lk_hit = 1'b1;
        lk_idx = EI_W'(i);
      end
    end
  end

  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        free_any = 1'b1;
        free_idx = EI_W'(i);
      end
    end
  end

  assign rd_valid = valid_q[rd_idx];
  always_comb begin
    rd_entry      = ram_q[rd_idx];
    rd_entry.addr = cam_q[rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      cam_q[wr_idx] <= wr_entry.addr;
      ram_q[wr_idx] <= wr_entry;
    end
  end

endmodule

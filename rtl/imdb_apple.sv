// AppLE: approximate lowest-number estimator for the IMDB main table
// replacement policy.
//
// The exact policy (evict the entry with the smallest ZeroFlipCntr, ties
// broken by the smallest RewriteCntr) would need one read port per entry.
// AppLE splits the table into ENTRIES/GROUP_SIZE groups of GROUP_SIZE
// consecutive entries and, over one cycle per group, reads one randomly
// chosen entry of each group through the table's single read port
// (address = group_index * GROUP_SIZE + random offset). One comparator and
// one register keep the best candidate. A round therefore takes exactly
// N_GROUPS enabled cycles (32 for 256 entries and group size 8), which is
// hidden in the 120-cycle idle time after a PCM write.
//
// Interface: while `en` is high the block owns the table read port: it drives
// `rd_idx` and samples `rd_valid`/`rd_zfc`/`rd_rwc` (combinational read) in
// the same cycle. `done` rises after the last group and `victim_idx` holds the
// chosen entry until `restart` starts a new round. The value compared is the
// largest ZeroFlipCntr sub-counter of an entry (the one MaxZFCIdx points at);
// an invalid sampled entry always wins. The random offsets come from a 16-bit
// Fibonacci LFSR; the LFSR and the tie-break on the earlier sample are choices
// of this design.
module imdb_apple
  import imdb_pkg::*;
#(
  parameter int unsigned ENTRIES    = 256,
  parameter int unsigned GROUP_SIZE = 8,
  parameter logic [15:0] SEED       = 16'hACE1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic                        restart,
  output logic [$clog2(ENTRIES)-1:0]  rd_idx,
  input  logic                        rd_valid,
  input  zfc_t                        rd_zfc,
  input  rwc_t                        rd_rwc,
  output logic                        done,
  output logic [$clog2(ENTRIES)-1:0]  victim_idx
);

  localparam int unsigned N_GROUPS = ENTRIES / GROUP_SIZE;
  localparam int unsigned GI_W     = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1;
  localparam int unsigned OFF_W    = (GROUP_SIZE > 1) ? $clog2(GROUP_SIZE) : 1;
  localparam int unsigned EI_W     = $clog2(ENTRIES);

  logic [15:0]     lfsr;
  logic [GI_W-1:0] group;
  logic            have_best;
  logic            best_inv;
  zfc_t            best_zfc;
  rwc_t            best_rwc;
  logic [EI_W-1:0] best_idx;
  logic [OFF_W-1:0] offset;

  assign offset = (GROUP_SIZE > 1) ? lfsr[OFF_W-1:0] : '0;

  always_comb begin
    rd_idx = EI_W'(group) * EI_W'(GROUP_SIZE) + EI_W'(offset);
  end

  // Is the sampled entry a better victim than the one held?
  logic better;
  always_comb begin
    if (!have_best)            better = 1'b1;
    else if (best_inv)         better = 1'b0;
    else if (!rd_valid)        better = 1'b1;
    else if (rd_zfc < best_zfc) better = 1'b1;
    else if (rd_zfc == best_zfc && rd_rwc < best_rwc) better = 1'b1;
    else                       better = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      group     <= '0;
      have_best <= 1'b0;
      best_inv  <= 1'b0;
      best_zfc  <= '0;
      best_rwc  <= '0;
      best_idx  <= '0;
      done      <= 1'b0;
    end else if (restart) begin
      group     <= '0;
      have_best <= 1'b0;
      done      <= 1'b0;
    end else if (en && !done) begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (better) begin
        have_best <= 1'b1;
        best_inv  <= !rd_valid;
        best_zfc  <= rd_zfc;
        best_rwc  <= rd_rwc;
        best_idx  <= rd_idx;
      end
      if (group == GI_W'(N_GROUPS - 1)) done <= 1'b1;
      else                              group <= group + 1'b1;
    end
  end

  assign victim_idx = best_idx;

endmodule

// IMDB barrier buffer: a few-entry data cache for lines that became
// write-disturbance aggressors.
//
// Each entry holds Row&Col (content-addressable), the 64 B line, the
// RewriteCntr inherited from the main table and a FreqCntr counting the
// writes that hit the entry. Two lookup ports (one for the write path, one
// for reads served from the buffer) match in parallel. The replacement
// candidate is the first free entry, or, when the buffer is full, the least
// frequently used entry (smallest FreqCntr, lowest index on a tie).
//
// Ports: `upd_*` overwrites the data of a hitting entry and increments its
// saturating FreqCntr; `ins_*` writes a whole entry (promotion) with FreqCntr
// set to 1; `inv_*` clears an entry (flush). All updates take effect at the
// clock edge; lookups, the victim choice and the read port are
// combinational. Starting a promoted entry at FreqCntr 1 is a choice of this
// design. Reset clears all valid bits.
module imdb_barrier_buffer
  import imdb_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup port A (write path)
  input  addr_t                       lka_addr,
  output logic                        lka_hit,
  output logic [$clog2(ENTRIES)-1:0]  lka_idx,
  // lookup port B (read path)
  input  addr_t                       lkb_addr,
  output logic                        lkb_hit,
  output line_t                       lkb_data,
  // replacement candidate
  output logic                        full,
  output logic [$clog2(ENTRIES)-1:0]  victim_idx,
  // read port
  input  logic [$clog2(ENTRIES)-1:0]  rd_idx,
  output logic                        rd_valid,
  output bb_entry_t                   rd_entry,
  // data update on a write hit
  input  logic                        upd_en,
  input  logic [$clog2(ENTRIES)-1:0]  upd_idx,
  input  line_t                       upd_data,
  // insertion of a promoted entry
  input  logic                        ins_en,
  input  logic [$clog2(ENTRIES)-1:0]  ins_idx,
  input  addr_t                       ins_addr,
  input  line_t                       ins_data,
  input  rwc_t                        ins_rwc,
  // invalidation
  input  logic                        inv_en,
  input  logic [$clog2(ENTRIES)-1:0]  inv_idx
);

  localparam int unsigned EI_W = $clog2(ENTRIES);

  logic [ENTRIES-1:0] valid_q;
  bb_entry_t          ent_q [ENTRIES];

  always_comb begin
    lka_hit = 1'b0;
    lka_idx = '0;
    lkb_hit = 1'b0;
    lkb_data = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && ent_q[i].addr == lka_addr) begin
        lka_hit = 1'b1;
        lka_idx = EI_W'(i);
      end
      if (valid_q[i] && ent_q[i].addr == lkb_addr) begin
        lkb_hit  = 1'b1;
        lkb_data = ent_q[i].data;
      end
    end
  end

  always_comb begin
    logic  found_free;
    freq_t best;
    found_free = 1'b0;
    victim_idx = '0;
    best       = '1;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!found_free) begin
        if (!valid_q[i]) begin
          found_free = 1'b1;
          victim_idx = EI_W'(i);
        end else if (i == 0 || ent_q[i].freq < best) begin
          best       = ent_q[i].freq;
          victim_idx = EI_W'(i);
        end
      end
    end
    full = !found_free;
  end

  assign rd_valid = valid_q[rd_idx];
  assign rd_entry = ent_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else begin
      if (ins_en) valid_q[ins_idx] <= 1'b1;
      if (inv_en) valid_q[inv_idx] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_en) begin
      ent_q[ins_idx].addr <= ins_addr;
      ent_q[ins_idx].data <= ins_data;
      ent_q[ins_idx].rwc  <= ins_rwc;
      ent_q[ins_idx].freq <= FREQ_W'(1);
    end else if (upd_en) begin
      ent_q[upd_idx].data <= upd_data;
      if (ent_q[upd_idx].freq != '1) ent_q[upd_idx].freq <= ent_q[upd_idx].freq + 1'b1;
    end
  end

endmodule

// Cache-based read-modify-write (RMW) front end with typeless command merging.
//
// The host issues 64 B reads and writes; the PCM is accessed in pages of
// BLOCKS blocks. Every command is turned into a page access (a write becomes
// a page read, remembering its original type in the T-bit), so the page is
// fetched once into a cache entry and later commands to any block of that
// page are served from it. Each cache entry has a U-bit (update on the PCM in
// progress), a V-bit (page data valid) and per block an M-bit
// (a command is merged on this block), a T-bit (its type) and the block data.
//
// Command at the head of InputQ (one per cycle), page found in the cache:
//   * V=0 (page still being fetched): the command is merged into the entry if
//     its block's M-bit is clear (M set, T recorded, write data stored);
//     otherwise it waits;
//   * V=1, write: if U=0 the block is updated, U is set and a page
//     write-back is queued; if U=1 it waits (no write-after-write overlap);
//   * V=1, read: the block is returned to the host from the cache.
// Page not found: the pseudo-LRU victim is taken if it is not busy (U=0) and
// the Merger is free; the entry gets U=1, V=0 and the command's M/T bits.
// The Merger then holds the page read for PENDING cycles, each cycle merging
// one InputQ command (oldest first) to the same page and another block, and
// then dispatches the read. When the page returns (ModifyQ), the De-merger
// fills the page, keeping merged write blocks, returns one response per
// merged read block, queues one page write-back if any write was merged, and
// sets V=1 and clears the M-bits. Responses and write-backs leave through
// RespQ; page reads and write-backs share the PCM port, granted first-come
// first-served by issue order.
//
// Choices of this design where the description is silent or open: the cache
// is an on-chip array indexed through the fully associative decoder; the
// replacement is tree pseudo-LRU; U stays set until the PCM acknowledges a
// write-back, also after a de-merge that queued one; while the De-merger
// works, head processing and the Merger pause; the Merger merges one command
// per cycle and only in cycles in which the head did not change the cache.
// Interfaces are valid/ready; all outputs of the block are registered or come
// from queue heads, lookups are combinational.
// Every write is written back at once, so no dirty bit is kept: a U=0 entry
// always matches the PCM and can be replaced without a write-back. The
// occupancy outputs of RespQ and ModifyQ (rq_count, mq_count) are left unread
// because their ready signals already give the back-pressure; the lint tool
// reports them as unused.
module rmw_merge
  import rmw_pkg::*;
#(
  parameter int unsigned ENTRIES     = 32768,
  parameter int unsigned BLOCKS      = 4,
  parameter int unsigned INQ_DEPTH   = 32,
  parameter int unsigned PENDING     = 8,
  parameter int unsigned MODQ_DEPTH  = 4,
  parameter int unsigned RESPQ_DEPTH = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // host requests (64 B)
  input  logic                              req_valid,
  output logic                              req_ready,
  input  cmd_e                              req_type,
  input  id_t                               req_id,
  input  page_t                             req_page,
  input  logic [$clog2(BLOCKS)-1:0]         req_off,
  input  blk_t                              req_data,
  // host read responses
  output logic                              rsp_valid,
  input  logic                              rsp_ready,
  output id_t                               rsp_id,
  output blk_t                              rsp_data,
  // page requests to the PCM controller
  output logic                              mreq_valid,
  input  logic                              mreq_ready,
  output cmd_e                              mreq_type,
  output page_t                             mreq_page,
  output logic [$clog2(ENTRIES)-1:0]        mreq_tag,
  output logic [BLOCKS*BLK_W-1:0]           mreq_data,
  // page read data / write acknowledgements from the PCM controller
  input  logic                              mrsp_valid,
  output logic                              mrsp_ready,
  input  cmd_e                              mrsp_type,
  input  logic [$clog2(ENTRIES)-1:0]        mrsp_tag,
  input  logic [BLOCKS*BLK_W-1:0]           mrsp_data,
  // event pulses
  output logic                              ev_read_hit,
  output logic                              ev_write_hit,
  output logic                              ev_miss,
  output logic                              ev_merge_head,
  output logic                              ev_merge_scan,
  output logic                              ev_stall,
  output logic                              ev_dispatch,
  output logic                              ev_writeback
);

  localparam int unsigned EI_W  = $clog2(ENTRIES);
  localparam int unsigned OFF_W = $clog2(BLOCKS);
  localparam int unsigned IQ_W  = $clog2(INQ_DEPTH);
  localparam int unsigned PAGE_W = BLOCKS * BLK_W;

  typedef struct packed {
    cmd_e              typ;
    id_t               id;
    page_t             page;
    logic [OFF_W-1:0]  off;
    blk_t              data;
  } iq_t;

  typedef struct packed {
    logic              wb;      // 1: page write-back, 0: host read response
    id_t               id;
    logic [EI_W-1:0]   idx;
    page_t             page;
    blk_t              data;
    logic [7:0]        seq;
  } rq_t;

  typedef struct packed {
    logic [EI_W-1:0]   tag;
    logic [PAGE_W-1:0] data;
  } mq_t;

  // ---------------- InputQ --------------------------------------------------
  iq_t                 iq_q [INQ_DEPTH];
  logic [INQ_DEPTH-1:0] iq_v_q;
  logic [IQ_W-1:0]     iq_wp_q, iq_rp_q;
  logic [IQ_W:0]       iq_occ_q;

  logic head_pop;
  logic scan_hit;
  logic [IQ_W-1:0] scan_slot;

  assign req_ready = (iq_occ_q != (IQ_W+1)'(INQ_DEPTH));

  iq_t  head;
  logic head_present, head_live;
  assign head         = iq_q[iq_rp_q];
  assign head_present = (iq_occ_q != '0);
  assign head_live    = head_present && iq_v_q[iq_rp_q];

  // ---------------- cache state --------------------------------------------
  logic [ENTRIES-1:0]             v_q, u_q;
  logic [ENTRIES-1:0][BLOCKS-1:0] m_q, t_q;
  logic [PAGE_W-1:0]              data_q [ENTRIES];
  page_t                          page_q [ENTRIES];         // page of each entry
  id_t                            id_q [ENTRIES][BLOCKS];   // IDs of merged commands

  // ---------------- decoder and replacement ---------------------------------
  logic            dec_found;
  logic [EI_W-1:0] dec_idx, victim;
  logic            dec_wr, plru_touch;
  logic [EI_W-1:0] touch_idx;

  rmw_addr_decoder #(.ENTRIES(ENTRIES)) u_dec (
    .clk, .rst_n,
    .lk_page(head.page), .found(dec_found), .index(dec_idx),
    .wr_en(dec_wr), .wr_slot(victim), .wr_page(head.page)
  );

  rmw_plru #(.ENTRIES(ENTRIES)) u_plru (
    .clk, .rst_n, .touch_en(plru_touch), .touch_idx(touch_idx), .victim(victim)
  );

  // ---------------- Merger latch and dispatch register ---------------------
  logic            lat_v_q;
  logic [EI_W-1:0] lat_idx_q;
  page_t           lat_page_q;
  logic [$clog2(PENDING+1):0] lat_cnt_q;
  logic            dsp_v_q;
  logic [EI_W-1:0] dsp_idx_q;
  page_t           dsp_page_q;
  logic [7:0]      dsp_seq_q;
  logic [7:0]      seq_q;

  // ---------------- queues ---------------------------------------------------
  rq_t  rq_in, rq_out;
  logic rq_push, rq_in_ready, rq_out_valid, rq_pop;
  logic [$clog2(RESPQ_DEPTH):0] rq_count;

  sync_fifo #(.T(rq_t), .DEPTH(RESPQ_DEPTH)) u_respq (
    .clk, .rst_n,
    .in_valid(rq_push), .in_ready(rq_in_ready), .in_data(rq_in),
    .out_valid(rq_out_valid), .out_ready(rq_pop), .out_data(rq_out), .count(rq_count)
  );

  mq_t  mq_in, mq_out;
  logic mq_push, mq_in_ready, mq_out_valid, mq_pop;
  logic [$clog2(MODQ_DEPTH):0] mq_count;

  assign mq_in.tag  = mrsp_tag;
  assign mq_in.data = mrsp_data;
  assign mq_push    = mrsp_valid && (mrsp_type == CMD_READ);
  assign mrsp_ready = (mrsp_type == CMD_WRITE) ? 1'b1 : mq_in_ready;

  sync_fifo #(.T(mq_t), .DEPTH(MODQ_DEPTH)) u_modq (
    .clk, .rst_n,
    .in_valid(mq_push), .in_ready(mq_in_ready), .in_data(mq_in),
    .out_valid(mq_out_valid), .out_ready(mq_pop), .out_data(mq_out), .count(mq_count)
  );

  // ---------------- De-merger state -----------------------------------------
  typedef enum logic [1:0] { DM_FILL, DM_RESP, DM_FIN } dm_e;
  dm_e              dm_q;
  logic [OFF_W-1:0] dm_blk_q;
  logic             dm_active;
  logic [EI_W-1:0]  dm_idx;
  assign dm_active = mq_out_valid;
  assign dm_idx    = mq_out.tag;

  // ---------------- per-cycle actions ---------------------------------------
  // data array write port
  logic              dw_en;
  logic [EI_W-1:0]   dw_idx;
  logic [BLOCKS-1:0] dw_mask;
  logic [PAGE_W-1:0] dw_data;
  // metadata updates
  logic              md_en;
  logic [EI_W-1:0]   md_idx;
  logic              md_v, md_u;
  logic [BLOCKS-1:0] md_m, md_t;
  id_t               mm_id;
  logic              mm_en;          // set one M/T pair only
  logic [EI_W-1:0]   mm_idx;
  logic [OFF_W-1:0]  mm_off;
  cmd_e              mm_typ;
  logic              wh_en;          // write hit: set d,u
  logic              head_wrote;
  logic              lat_set, lat_clear;
  logic              iq_kill;

  logic [BLOCKS-1:0] dm_wmask;  // merged write blocks of the returning entry
  always_comb begin
    for (int b = 0; b < BLOCKS; b++) dm_wmask[b] = m_q[dm_idx][b] && t_q[dm_idx][b];
  end

  function automatic logic [PAGE_W-1:0] spread(blk_t b);
    logic [PAGE_W-1:0] p;
    for (int k = 0; k < BLOCKS; k++) p[k*BLK_W +: BLK_W] = b;
    return p;
  endfunction

  // Merger scan: oldest InputQ command to the latched page, other block
  always_comb begin
    scan_hit  = 1'b0;
    scan_slot = '0;
    for (int k = INQ_DEPTH - 1; k >= 0; k--) begin
      logic [IQ_W-1:0] s;
      s = IQ_W'(32'(iq_rp_q) + k);
      if ((IQ_W+1)'(k) < iq_occ_q && iq_v_q[s] && iq_q[s].page == lat_page_q &&
          !m_q[lat_idx_q][iq_q[s].off]) begin
        scan_hit  = 1'b1;
        scan_slot = s;
      end
    end
  end

  always_comb begin
    dw_en = 1'b0; dw_idx = '0; dw_mask = '0; dw_data = '0;
    md_en = 1'b0; md_idx = '0; md_v = 1'b0; md_u = 1'b0; md_m = '0; md_t = '0;
    mm_en = 1'b0; mm_idx = '0; mm_off = '0; mm_typ = CMD_READ; mm_id = '0;
    wh_en = 1'b0;
    dec_wr = 1'b0; plru_touch = 1'b0; touch_idx = dec_idx;
    head_pop = 1'b0; head_wrote = 1'b0;
    lat_set = 1'b0; lat_clear = 1'b0; iq_kill = 1'b0;
    rq_push = 1'b0; rq_in = '0; mq_pop = 1'b0;
    ev_read_hit = 1'b0; ev_write_hit = 1'b0; ev_miss = 1'b0; ev_merge_head = 1'b0;
    ev_merge_scan = 1'b0; ev_stall = 1'b0;

    if (dm_active) begin
      // ---------------- De-merger ----------------
      unique case (dm_q)
        DM_FILL: begin
          dw_en   = 1'b1;
          dw_idx  = dm_idx;
          dw_mask = ~dm_wmask;
          dw_data = mq_out.data;
        end
        DM_RESP: begin
          if (m_q[dm_idx][dm_blk_q] && !t_q[dm_idx][dm_blk_q]) begin
            rq_push     = rq_in_ready;
            rq_in.wb    = 1'b0;
            rq_in.id    = id_q[dm_idx][dm_blk_q];
            rq_in.idx   = dm_idx;
            rq_in.data  = data_q[dm_idx][dm_blk_q*BLK_W +: BLK_W];
          end
        end
        DM_FIN: begin
          if (!(|dm_wmask) || rq_in_ready) begin
            rq_push    = |dm_wmask;
            rq_in.wb   = 1'b1;
            rq_in.idx  = dm_idx;
            rq_in.page = page_q[dm_idx];
            rq_in.seq  = seq_q;
            md_en  = 1'b1;
            md_idx = dm_idx;
            md_v   = 1'b1;
            md_u   = |dm_wmask;
            md_m   = '0;
            md_t   = '0;
            mq_pop = 1'b1;
          end
        end
        default: ;
      endcase
    end else if (head_present && !head_live) begin
      head_pop = 1'b1;                      // hole left by a merged command
    end else if (head_live) begin
      // ---------------- Algorithm 1 (with merge) ----------------
      if (dec_found) begin
        if (!v_q[dec_idx]) begin
          if (!m_q[dec_idx][head.off]) begin
            mm_en  = 1'b1; mm_idx = dec_idx; mm_off = head.off; mm_typ = head.typ; mm_id = head.id;
            dw_en  = (head.typ == CMD_WRITE);
            dw_idx = dec_idx; dw_mask = BLOCKS'(1) << head.off; dw_data = spread(head.data);
            head_pop = 1'b1; head_wrote = 1'b1; ev_merge_head = 1'b1;
            plru_touch = 1'b1;
          end else ev_stall = 1'b1;
        end else if (head.typ == CMD_WRITE) begin
          if (!u_q[dec_idx] && rq_in_ready) begin
            dw_en  = 1'b1;
            dw_idx = dec_idx; dw_mask = BLOCKS'(1) << head.off; dw_data = spread(head.data);
            wh_en  = 1'b1;
            rq_push   = 1'b1;
            rq_in.wb  = 1'b1;
            rq_in.idx  = dec_idx;
            rq_in.page = page_q[dec_idx];
            rq_in.seq  = seq_q;
            head_pop = 1'b1; head_wrote = 1'b1; ev_write_hit = 1'b1;
            plru_touch = 1'b1;
          end else ev_stall = 1'b1;
        end else begin
          if (rq_in_ready) begin
            rq_push    = 1'b1;
            rq_in.wb   = 1'b0;
            rq_in.id   = head.id;
            rq_in.idx  = dec_idx;
            rq_in.data = data_q[dec_idx][head.off*BLK_W +: BLK_W];
            head_pop = 1'b1; ev_read_hit = 1'b1;
            plru_touch = 1'b1;
          end else ev_stall = 1'b1;
        end
      end else begin
        if (!lat_v_q && !u_q[victim]) begin
          dec_wr = 1'b1;
          md_en  = 1'b1; md_idx = victim; md_v = 1'b0; md_u = 1'b1;
          md_m   = BLOCKS'(1) << head.off;
          md_t   = (head.typ == CMD_WRITE) ? (BLOCKS'(1) << head.off) : '0;
          dw_en  = (head.typ == CMD_WRITE);
          dw_idx = victim; dw_mask = BLOCKS'(1) << head.off; dw_data = spread(head.data);
          lat_set = 1'b1;
          plru_touch = 1'b1; touch_idx = victim;
          head_pop = 1'b1; head_wrote = 1'b1; ev_miss = 1'b1;
        end else ev_stall = 1'b1;
      end
    end

    // ---------------- Merger (Algorithm 2) ----------------
    if (!dm_active && lat_v_q && !head_wrote) begin
      if (32'(lat_cnt_q) >= PENDING) begin
        if (!dsp_v_q) lat_clear = 1'b1;
      end else if (scan_hit && !(head_pop && scan_slot == iq_rp_q)) begin
        mm_en  = 1'b1; mm_idx = lat_idx_q; mm_off = iq_q[scan_slot].off; mm_typ = iq_q[scan_slot].typ;
        mm_id  = iq_q[scan_slot].id;
        dw_en  = (iq_q[scan_slot].typ == CMD_WRITE);
        dw_idx = lat_idx_q; dw_mask = BLOCKS'(1) << iq_q[scan_slot].off;
        dw_data = spread(iq_q[scan_slot].data);
        iq_kill = 1'b1; ev_merge_scan = 1'b1;
      end
    end
  end

  // ---------------- arbiter towards the PCM (first come, first served) -----
  logic rq_is_wb, grant_wb, grant_rd;
  assign rq_is_wb = rq_out_valid && rq_out.wb;
  always_comb begin
    grant_rd = 1'b0;
    grant_wb = 1'b0;
    if (dsp_v_q && rq_is_wb) begin
      if ($signed(rq_out.seq - dsp_seq_q) < 0) grant_wb = 1'b1;
      else                                     grant_rd = 1'b1;
    end else if (dsp_v_q) grant_rd = 1'b1;
    else if (rq_is_wb)    grant_wb = 1'b1;
  end

  assign mreq_valid = grant_rd || grant_wb;
  assign mreq_type  = grant_wb ? CMD_WRITE : CMD_READ;
  assign mreq_page  = grant_wb ? rq_out.page : dsp_page_q;
  assign mreq_tag   = grant_wb ? rq_out.idx : dsp_idx_q;
  assign mreq_data  = grant_wb ? data_q[rq_out.idx] : '0;

  assign rsp_valid  = rq_out_valid && !rq_out.wb;
  assign rsp_id     = rq_out.id;
  assign rsp_data   = rq_out.data;
  assign rq_pop     = rq_out_valid && (rq_out.wb ? (grant_wb && mreq_ready) : rsp_ready);
  assign ev_dispatch  = grant_rd && mreq_ready;
  assign ev_writeback = grant_wb && mreq_ready;


  // ---------------- sequential ----------------------------------------------
  always_ff @(posedge clk) begin
    if (dw_en) begin
      for (int b = 0; b < BLOCKS; b++)
        if (dw_mask[b]) data_q[dw_idx][b*BLK_W +: BLK_W] <= dw_data[b*BLK_W +: BLK_W];
    end
    if (dec_wr) begin
      page_q[victim]           <= head.page;
      id_q[victim][head.off]   <= head.id;
    end
    if (mm_en) id_q[mm_idx][mm_off] <= mm_id;
    if (req_valid && req_ready) iq_q[iq_wp_q] <= '{typ: req_type, id: req_id, page: req_page,
                                                   off: req_off, data: req_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        v_q[i] <= 1'b0; u_q[i] <= 1'b0; m_q[i] <= '0; t_q[i] <= '0;
      end
      iq_v_q <= '0; iq_wp_q <= '0; iq_rp_q <= '0; iq_occ_q <= '0;
      lat_v_q <= 1'b0; lat_idx_q <= '0; lat_page_q <= '0; lat_cnt_q <= '0;
      dsp_v_q <= 1'b0; dsp_idx_q <= '0; dsp_page_q <= '0; dsp_seq_q <= '0;
      seq_q <= '0;
      dm_q <= DM_FILL; dm_blk_q <= '0;
    end else begin
      // InputQ
      if (req_valid && req_ready) begin
        iq_v_q[iq_wp_q] <= 1'b1;
        iq_wp_q <= iq_wp_q + 1'b1;
      end
      if (iq_kill) iq_v_q[scan_slot] <= 1'b0;
      if (head_pop) begin
        iq_v_q[iq_rp_q] <= 1'b0;
        iq_rp_q <= iq_rp_q + 1'b1;
      end
      iq_occ_q <= iq_occ_q + (IQ_W+1)'(req_valid && req_ready) - (IQ_W+1)'(head_pop);

      // metadata
      if (md_en) begin
        v_q[md_idx] <= md_v; u_q[md_idx] <= md_u;
        m_q[md_idx] <= md_m; t_q[md_idx] <= md_t;
      end
      if (mm_en) begin
        m_q[mm_idx][mm_off] <= 1'b1;
        t_q[mm_idx][mm_off] <= mm_typ;
      end
      if (wh_en) u_q[dec_idx] <= 1'b1;
      if (mrsp_valid && mrsp_type == CMD_WRITE) u_q[mrsp_tag] <= 1'b0;

      // Merger latch and dispatch register
      if (lat_set) begin
        lat_v_q    <= 1'b1;
        lat_idx_q  <= victim;
        lat_page_q <= head.page;
        lat_cnt_q  <= '0;
      end else if (lat_v_q && !dm_active && !head_wrote && 32'(lat_cnt_q) < PENDING) begin
        lat_cnt_q <= lat_cnt_q + 1'b1;
      end
      if (lat_clear) begin
        lat_v_q    <= 1'b0;
        dsp_v_q    <= 1'b1;
        dsp_idx_q  <= lat_idx_q;
        dsp_page_q <= lat_page_q;
        dsp_seq_q  <= seq_q;
      end else if (grant_rd && mreq_ready) begin
        dsp_v_q <= 1'b0;
      end
      if (lat_clear || (rq_push && rq_in.wb)) seq_q <= seq_q + 1'b1;

      // De-merger
      if (dm_active) begin
        unique case (dm_q)
          DM_FILL: begin
            dm_q     <= DM_RESP;
            dm_blk_q <= '0;
          end
          DM_RESP: begin
            if (!(m_q[dm_idx][dm_blk_q] && !t_q[dm_idx][dm_blk_q]) || rq_in_ready) begin
              if (dm_blk_q == OFF_W'(BLOCKS - 1)) dm_q <= DM_FIN;
              else dm_blk_q <= dm_blk_q + 1'b1;
            end
          end
          DM_FIN: if (mq_pop) dm_q <= DM_FILL;
          default: dm_q <= DM_FILL;
        endcase
      end

      // A write acknowledgement only arrives for an entry with a write-back
      // in flight.
      if (mrsp_valid && mrsp_type == CMD_WRITE) assert (u_q[mrsp_tag]);
    end
  end

endmodule

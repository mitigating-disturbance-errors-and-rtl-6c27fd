// One IMDB plane: the write-disturbance barrier of one PCM bank.
//
// For every write the media controller has prepared (new data plus the old
// data read from the device beforehand), the plane
//   * updates the data in the barrier buffer if the line is held there
//     (the write is absorbed, RES_ABSORBED);
//   * otherwise, on a main table hit, adds the 1-to-0 flips of each 64-bit
//     word to ZeroFlipCntr (RES_HIT). When the largest sub-counter reaches
//     THRESHOLD, it sends rewrite requests for the two adjacent rows
//     (same column; a neighbour outside the row range is skipped), increments
//     RewriteCntr and swaps the line into the barrier buffer in three cycles
//     (read main table, read barrier buffer victim, write both). A full
//     barrier buffer demotes its least-frequently-used line to the freed main
//     table slot and sends its data back as a write-back (RES_PROMOTED);
//   * on a miss, inserts the address with probability 1/2^INS_LOG2
//     (RES_FILTERED otherwise), into a free entry (RES_INSERTED) or over the
//     AppLE victim (RES_REPLACED). A new or demoted entry starts with the
//     number of zeros of each data word ("prior knowledge") as ZeroFlipCntr.
// Reads can be served by the barrier buffer through `rd_*` (combinational).
// `flush_req` (power failure) writes every barrier buffer line back and then
// lets all further commands pass untracked (RES_BYPASS, `flush_done`).
//
// Control states IDLE, HIT and MISS follow the described three-state machine;
// the swap, flush and bypass states are additions of this design. Timing: a
// command is accepted in IDLE (`cmd_ready`); an absorbed write takes 1 cycle,
// a hit 2, a promotion 5 (HIT + 3 swap cycles + IDLE), a miss at least 2 and
// waits in MISS until AppLE has finished a 32-cycle round if the table is
// full. `done_valid` pulses one cycle after completion with the result.
// Rewrites leave before the write-back through the output queue, which is
// drained by `out_valid`/`out_ready`; a command is only accepted while that
// queue has room for three requests and holds no write-back, so that a newer
// write to a demoted line cannot reach the device before its write-back. AppLE runs while the plane is in IDLE or
// MISS. The insertion random source is a 16-bit LFSR (a choice of this
// design). The FreqCntr field of the barrier buffer read port is not used
// here (the buffer picks its LFU victim itself), which lint reports as
// unused bits of bb_rd_entry.
module imdb_plane
  import imdb_pkg::*;
#(
  parameter int unsigned MT_ENTRIES = 256,
  parameter int unsigned BB_ENTRIES = 8,
  parameter int unsigned GROUP_SIZE = 8,
  parameter int unsigned THRESHOLD  = 511,
  parameter int unsigned INS_LOG2   = 7,
  parameter int unsigned OUTQ_DEPTH = 4,
  parameter logic [15:0] SEED       = 16'h1D0F
) (
  input  logic      clk,
  input  logic      rst_n,
  // prepared write command from the media controller
  input  logic      cmd_valid,
  output logic      cmd_ready,
  input  addr_t     cmd_addr,
  input  line_t     cmd_new,
  input  line_t     cmd_old,
  // completion report
  output logic      done_valid,
  output result_e   done_result,
  // read served from the barrier buffer
  input  addr_t     rd_addr,
  output logic      rd_hit,
  output line_t     rd_data,
  // rewrite / write-back requests to the media controller
  output logic      out_valid,
  input  logic      out_ready,
  output out_req_t  out_req,
  // power-failure flush
  input  logic      flush_req,
  output logic      flush_done
);

  localparam int unsigned MI_W = $clog2(MT_ENTRIES);
  localparam int unsigned BI_W = $clog2(BB_ENTRIES);

  typedef enum logic [3:0] {
    S_IDLE, S_HIT, S_MISS, S_SWAP_RD_MT, S_SWAP_RD_BB, S_SWAP_WR, S_FLUSH, S_BYPASS
  } state_e;

  state_e          state_q;
  addr_t           c_addr_q;
  line_t           c_new_q, c_old_q;
  logic [MI_W-1:0] mt_idx_q;
  logic            ins_q;
  rwc_t            prom_rwc_q;
  logic [BI_W-1:0] bb_vidx_q;
  logic            bb_full_q;
  addr_t           dem_addr_q;   // barrier buffer line being demoted
  line_t           dem_data_q;
  rwc_t            dem_rwc_q;
  logic [BI_W-1:0] fl_idx_q;
  logic [15:0]     lfsr_q;

  // ---------------- main table, barrier buffer, AppLE, counters -----------
  logic            mt_lk_hit, mt_free_any, mt_rd_valid, mt_wr_en, mt_wr_valid;
  logic [MI_W-1:0] mt_lk_idx, mt_free_idx, mt_rd_idx, mt_wr_idx;
  mt_entry_t       mt_rd_entry, mt_wr_entry;

  imdb_main_table #(.ENTRIES(MT_ENTRIES)) u_mt (
    .clk, .rst_n,
    .lk_addr (cmd_addr), .lk_hit (mt_lk_hit), .lk_idx (mt_lk_idx),
    .free_any(mt_free_any), .free_idx(mt_free_idx),
    .rd_idx  (mt_rd_idx), .rd_valid(mt_rd_valid), .rd_entry(mt_rd_entry),
    .wr_en   (mt_wr_en), .wr_idx(mt_wr_idx), .wr_valid(mt_wr_valid), .wr_entry(mt_wr_entry)
  );

  logic            bb_lka_hit, bb_full, bb_rd_valid, bb_upd_en, bb_ins_en, bb_inv_en;
  logic [BI_W-1:0] bb_lka_idx, bb_victim, bb_rd_idx;
  bb_entry_t       bb_rd_entry;

  imdb_barrier_buffer #(.ENTRIES(BB_ENTRIES)) u_bb (
    .clk, .rst_n,
    .lka_addr(cmd_addr), .lka_hit(bb_lka_hit), .lka_idx(bb_lka_idx),
    .lkb_addr(rd_addr), .lkb_hit(rd_hit), .lkb_data(rd_data),
    .full(bb_full), .victim_idx(bb_victim),
    .rd_idx(bb_rd_idx), .rd_valid(bb_rd_valid), .rd_entry(bb_rd_entry),
    .upd_en(bb_upd_en), .upd_idx(bb_lka_idx), .upd_data(cmd_new),
    .ins_en(bb_ins_en), .ins_idx(bb_vidx_q), .ins_addr(c_addr_q), .ins_data(c_new_q),
    .ins_rwc(prom_rwc_q),
    .inv_en(bb_inv_en), .inv_idx(fl_idx_q)
  );

  logic            ap_en, ap_restart, ap_done;
  logic [MI_W-1:0] ap_rd_idx, ap_victim;

  imdb_apple #(.ENTRIES(MT_ENTRIES), .GROUP_SIZE(GROUP_SIZE)) u_apple (
    .clk, .rst_n,
    .en(ap_en), .restart(ap_restart),
    .rd_idx(ap_rd_idx), .rd_valid(mt_rd_valid),
    .rd_zfc(mt_rd_entry.zfc[mt_rd_entry.maxidx]), .rd_rwc(mt_rd_entry.rwc),
    .done(ap_done), .victim_idx(ap_victim)
  );

  line_t ic_old, ic_new;
  logic  ic_newly;
  pop_t [WORDS-1:0] ic_cnt;

  imdb_integrated_counter u_ic (
    .old_data(ic_old), .new_data(ic_new), .newly_inserted(ic_newly), .count(ic_cnt)
  );

  // ---------------- combinational control ----------------------------------
  out_req_t oq_in;
  logic     oq_push, oq_in_ready;
  logic [$clog2(OUTQ_DEPTH):0] oq_count;

  sync_fifo #(.T(out_req_t), .DEPTH(OUTQ_DEPTH)) u_outq (
    .clk, .rst_n,
    .in_valid(oq_push), .in_ready(oq_in_ready), .in_data(oq_in),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_req),
    .count(oq_count)
  );

  // entry built from the integrated counter result
  function automatic mt_entry_t make_entry(addr_t a, rwc_t r, pop_t [WORDS-1:0] base_add,
                                           logic [WORDS-1:0][ZFC_W-1:0] base);
    mt_entry_t e;
    logic [ZFC_W:0] s;
    e.addr   = a;
    e.rwc    = r;
    e.maxidx = '0;
    for (int w = 0; w < WORDS; w++) begin
      s = {1'b0, base[w]} + (ZFC_W+1)'(base_add[w]);
      e.zfc[w] = s[ZFC_W] ? '1 : s[ZFC_W-1:0];
    end
    for (int w = 1; w < WORDS; w++)
      if (e.zfc[w] > e.zfc[e.maxidx]) e.maxidx = IDX_W'(w);
    return e;
  endfunction

  logic      cmd_fire;
  mt_entry_t hit_entry;
  logic      hit_over;
  logic      ins_now;
  logic      room;
  result_e   res_d;
  logic      res_v_d;

  assign room      = (oq_count <= ($clog2(OUTQ_DEPTH)+1)'(OUTQ_DEPTH - 3));

  // write-backs still waiting in the output queue: a newer write to the same
  // line must not reach the device before them
  logic [$clog2(OUTQ_DEPTH):0] wb_cnt_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_cnt_q <= '0;
    else wb_cnt_q <= wb_cnt_q
                     + ($clog2(OUTQ_DEPTH)+1)'(oq_push && oq_in_ready && oq_in.kind == OUT_WRITEBACK)
                     - ($clog2(OUTQ_DEPTH)+1)'(out_valid && out_ready && out_req.kind == OUT_WRITEBACK);
  end
  assign cmd_ready = (wb_cnt_q == '0) && (((state_q == S_IDLE) && room && !flush_req) || (state_q == S_BYPASS));
  assign cmd_fire  = cmd_valid && cmd_ready;
  assign ins_now   = (INS_LOG2 == 0) ? 1'b1 : (lfsr_q[((INS_LOG2 == 0) ? 0 : INS_LOG2-1):0] == '0);

  always_comb begin
    // integrated counter operands
    ic_old   = c_old_q;
    ic_new   = c_new_q;
    ic_newly = (state_q != S_HIT);
    if (state_q == S_SWAP_WR) ic_new = dem_data_q;

    hit_entry = make_entry(mt_rd_entry.addr, mt_rd_entry.rwc, ic_cnt, mt_rd_entry.zfc);
    hit_over = (32'(hit_entry.zfc[hit_entry.maxidx]) >= THRESHOLD);

    mt_rd_idx   = (state_q == S_HIT) ? mt_idx_q : ap_rd_idx;
    ap_en       = (state_q == S_IDLE && !cmd_fire) || (state_q == S_MISS);
    ap_restart  = 1'b0;
    mt_wr_en    = 1'b0;
    mt_wr_idx   = mt_idx_q;
    mt_wr_valid = 1'b1;
    mt_wr_entry = hit_entry;
    bb_upd_en   = 1'b0;
    bb_ins_en   = 1'b0;
    bb_inv_en   = 1'b0;
    bb_rd_idx   = (state_q == S_FLUSH) ? fl_idx_q : bb_vidx_q;
    oq_push     = 1'b0;
    oq_in       = '{kind: OUT_REWRITE, addr: c_addr_q, data: '0};
    res_v_d     = 1'b0;
    res_d       = RES_HIT;

    unique case (state_q)
      S_IDLE: begin
        if (cmd_fire && bb_lka_hit) begin
          bb_upd_en = 1'b1;
          res_v_d   = 1'b1;
          res_d     = RES_ABSORBED;
        end
      end
      S_HIT: begin
        mt_wr_en = 1'b1;
        if (hit_over) begin
          // rewrite of the upper neighbour row
          mt_wr_entry.rwc = (mt_rd_entry.rwc == '1) ? mt_rd_entry.rwc : mt_rd_entry.rwc + 1'b1;
          if (c_addr_q.row != '0) begin
            oq_push          = 1'b1;
            oq_in.addr.row   = c_addr_q.row - 1'b1;
          end
        end else begin
          res_v_d = 1'b1;
          res_d   = RES_HIT;
        end
      end
      S_SWAP_RD_MT: begin
        // rewrite of the lower neighbour row
        if (c_addr_q.row != '1) begin
          oq_push        = 1'b1;
          oq_in.addr.row = c_addr_q.row + 1'b1;
        end
      end
      S_SWAP_RD_BB: ;
      S_SWAP_WR: begin
        bb_ins_en   = 1'b1;
        mt_wr_en    = 1'b1;
        mt_wr_valid = bb_full_q;
        mt_wr_entry = make_entry(dem_addr_q, dem_rwc_q, ic_cnt, '0);
        if (bb_full_q) begin
          oq_push = 1'b1;
          oq_in   = '{kind: OUT_WRITEBACK, addr: dem_addr_q, data: dem_data_q};
        end
        res_v_d = 1'b1;
        res_d   = RES_PROMOTED;
      end
      S_MISS: begin
        mt_wr_entry = make_entry(c_addr_q, '0, ic_cnt, '0);
        if (!ins_q) begin
          res_v_d = 1'b1;
          res_d   = RES_FILTERED;
        end else if (mt_free_any) begin
          mt_wr_en  = 1'b1;
          mt_wr_idx = mt_free_idx;
          res_v_d   = 1'b1;
          res_d     = RES_INSERTED;
        end else if (ap_done) begin
          mt_wr_en   = 1'b1;
          mt_wr_idx  = ap_victim;
          ap_restart = 1'b1;
          res_v_d    = 1'b1;
          res_d      = RES_REPLACED;
        end
      end
      S_FLUSH: begin
        if (bb_rd_valid && oq_in_ready) begin
          oq_push   = 1'b1;
          oq_in     = '{kind: OUT_WRITEBACK, addr: bb_rd_entry.addr, data: bb_rd_entry.data};
          bb_inv_en = 1'b1;
        end
      end
      S_BYPASS: begin
        if (cmd_fire) begin
          res_v_d = 1'b1;
          res_d   = RES_BYPASS;
        end
      end
      default: ;
    endcase
  end

  // ---------------- sequential control -------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      c_addr_q    <= '0;
      c_new_q     <= '0;
      c_old_q     <= '0;
      mt_idx_q    <= '0;
      ins_q       <= 1'b0;
      prom_rwc_q  <= '0;
      bb_vidx_q   <= '0;
      bb_full_q   <= 1'b0;
      dem_addr_q  <= '0;
      dem_data_q  <= '0;
      dem_rwc_q   <= '0;
      fl_idx_q    <= '0;
      lfsr_q      <= SEED;
      done_valid  <= 1'b0;
      done_result <= RES_HIT;
    end else begin
      // The swap needs three output slots at most; they were reserved on accept.
      if (oq_push) assert (oq_in_ready);
      lfsr_q      <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[14] ^ lfsr_q[12] ^ lfsr_q[3]};
      done_valid  <= res_v_d;
      done_result <= res_d;
      unique case (state_q)
        S_IDLE: begin
          if (cmd_fire) begin
            c_addr_q <= cmd_addr;
            c_new_q  <= cmd_new;
            c_old_q  <= cmd_old;
            if (bb_lka_hit) state_q <= S_IDLE;
            else if (mt_lk_hit) begin
              mt_idx_q <= mt_lk_idx;
              state_q  <= S_HIT;
            end else begin
              ins_q   <= ins_now;
              state_q <= S_MISS;
            end
          end else if (flush_req) begin
            fl_idx_q <= '0;
            state_q  <= S_FLUSH;
          end
        end
        S_HIT: begin
          if (hit_over) begin
            prom_rwc_q <= mt_wr_entry.rwc;
            state_q <= S_SWAP_RD_MT;
          end else state_q <= S_IDLE;
        end
        S_SWAP_RD_MT: begin
          bb_vidx_q <= bb_victim;
          bb_full_q <= bb_full;
          state_q   <= S_SWAP_RD_BB;
        end
        S_SWAP_RD_BB: begin
          dem_addr_q <= bb_rd_entry.addr;
          dem_data_q <= bb_rd_entry.data;
          dem_rwc_q  <= bb_rd_entry.rwc;
          state_q <= S_SWAP_WR;
        end
        S_SWAP_WR: state_q <= S_IDLE;
        S_MISS:    if (res_v_d) state_q <= S_IDLE;
        S_FLUSH: begin
          if (!bb_rd_valid || oq_in_ready) begin
            if (fl_idx_q == BI_W'(BB_ENTRIES - 1)) state_q <= S_BYPASS;
            else fl_idx_q <= fl_idx_q + 1'b1;
          end
        end
        S_BYPASS: ;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign flush_done = (state_q == S_BYPASS) && !out_valid;

endmodule

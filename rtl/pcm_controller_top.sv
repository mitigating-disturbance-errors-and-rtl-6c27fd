// Top level: the two PCM-controller mechanisms of this design, side by side.
//
//  * `u_rmw` (rmw_merge) is the host-side read-modify-write front end: 64 B
//    host commands in, 256 B page reads and write-backs out, with a page
//    cache, typeless merging and de-merging.
//  * `u_imdb` (imdb) is the in-module disturbance barrier placed between the
//    media controller and the PCM devices of a 4-bank module: prepared writes
//    (new and old data) in, rewrite and write-back requests out, plus reads
//    served from the barrier buffers.
// The media controller that would join the two (page scheduling, pre-write
// reads, AIT translation) and the PCM devices are outside this design, so
// both units keep their own ports here. All ports are plain signals and
// structs; timing is that of the two units.
module pcm_controller_top
  import imdb_pkg::*;
  import rmw_pkg::*;
#(
  parameter int unsigned RMW_ENTRIES = 32768,
  parameter int unsigned RMW_BLOCKS  = 4,
  parameter int unsigned RMW_PENDING = 8,
  parameter int unsigned BANKS       = 4,
  parameter int unsigned MT_ENTRIES  = 256,
  parameter int unsigned BB_ENTRIES  = 8,
  parameter int unsigned GROUP_SIZE  = 8,
  parameter int unsigned THRESHOLD   = 511,
  parameter int unsigned INS_LOG2    = 7
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // ---------------- RMW: host side ----------------
  input  logic                              host_req_valid,
  output logic                              host_req_ready,
  input  cmd_e                              host_req_type,
  input  id_t                               host_req_id,
  input  page_t                             host_req_page,
  input  logic [$clog2(RMW_BLOCKS)-1:0]     host_req_off,
  input  blk_t                              host_req_data,
  output logic                              host_rsp_valid,
  input  logic                              host_rsp_ready,
  output id_t                               host_rsp_id,
  output blk_t                              host_rsp_data,
  // ---------------- RMW: PCM side ----------------
  output logic                              pcm_req_valid,
  input  logic                              pcm_req_ready,
  output cmd_e                              pcm_req_type,
  output page_t                             pcm_req_page,
  output logic [$clog2(RMW_ENTRIES)-1:0]    pcm_req_tag,
  output logic [RMW_BLOCKS*BLK_W-1:0]       pcm_req_data,
  input  logic                              pcm_rsp_valid,
  output logic                              pcm_rsp_ready,
  input  cmd_e                              pcm_rsp_type,
  input  logic [$clog2(RMW_ENTRIES)-1:0]    pcm_rsp_tag,
  input  logic [RMW_BLOCKS*BLK_W-1:0]       pcm_rsp_data,
  output logic [7:0]                        rmw_events,
  // ---------------- IMDB: media controller side ----------------
  input  logic                              wr_valid,
  output logic                              wr_ready,
  input  logic [$clog2(BANKS)-1:0]          wr_bank,
  input  addr_t                             wr_addr,
  input  line_t                             wr_new,
  input  line_t                             wr_old,
  output logic    [BANKS-1:0]               wr_done_valid,
  output result_e [BANKS-1:0]               wr_done_result,
  input  logic [$clog2(BANKS)-1:0]          rd_bank,
  input  addr_t                             rd_addr,
  output logic                              rd_hit,
  output line_t                             rd_data,
  output logic                              imdb_req_valid,
  input  logic                              imdb_req_ready,
  output logic [$clog2(BANKS)-1:0]          imdb_req_bank,
  output out_req_t                          imdb_req,
  input  logic                              flush_req,
  output logic                              flush_done
);

  rmw_merge #(
    .ENTRIES(RMW_ENTRIES), .BLOCKS(RMW_BLOCKS), .PENDING(RMW_PENDING)
  ) u_rmw (
    .clk, .rst_n,
    .req_valid(host_req_valid), .req_ready(host_req_ready), .req_type(host_req_type),
    .req_id(host_req_id), .req_page(host_req_page), .req_off(host_req_off),
    .req_data(host_req_data),
    .rsp_valid(host_rsp_valid), .rsp_ready(host_rsp_ready), .rsp_id(host_rsp_id),
    .rsp_data(host_rsp_data),
    .mreq_valid(pcm_req_valid), .mreq_ready(pcm_req_ready), .mreq_type(pcm_req_type),
    .mreq_page(pcm_req_page), .mreq_tag(pcm_req_tag), .mreq_data(pcm_req_data),
    .mrsp_valid(pcm_rsp_valid), .mrsp_ready(pcm_rsp_ready), .mrsp_type(pcm_rsp_type),
    .mrsp_tag(pcm_rsp_tag), .mrsp_data(pcm_rsp_data),
    .ev_read_hit(rmw_events[0]), .ev_write_hit(rmw_events[1]), .ev_miss(rmw_events[2]),
    .ev_merge_head(rmw_events[3]), .ev_merge_scan(rmw_events[4]), .ev_stall(rmw_events[5]),
    .ev_dispatch(rmw_events[6]), .ev_writeback(rmw_events[7])
  );

  imdb #(
    .BANKS(BANKS), .MT_ENTRIES(MT_ENTRIES), .BB_ENTRIES(BB_ENTRIES),
    .GROUP_SIZE(GROUP_SIZE), .THRESHOLD(THRESHOLD), .INS_LOG2(INS_LOG2)
  ) u_imdb (
    .clk, .rst_n,
    .cmd_valid(wr_valid), .cmd_ready(wr_ready), .cmd_bank(wr_bank), .cmd_addr(wr_addr),
    .cmd_new(wr_new), .cmd_old(wr_old),
    .done_valid(wr_done_valid), .done_result(wr_done_result),
    .rd_bank, .rd_addr, .rd_hit, .rd_data,
    .out_valid(imdb_req_valid), .out_ready(imdb_req_ready), .out_bank(imdb_req_bank),
    .out_req(imdb_req),
    .flush_req, .flush_done
  );

endmodule

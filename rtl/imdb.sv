// IMDB for a whole PCM module: one independent plane per bank.
//
// Each bank gets its own main table, barrier buffer and AppLE, so the planes
// work concurrently without contention. A prepared write command is steered
// to the plane of its bank (`cmd_bank`); `cmd_ready` is that plane's ready.
// Reads are looked up in the barrier buffer of the addressed bank. The
// rewrite and write-back requests of the planes are merged onto one output
// towards the media controller's write queue by a round-robin arbiter (a
// choice of this design; the request carries its bank in `out_bank`).
// Completion reports stay per bank. `flush_req` starts the power-failure
// flush in all planes; `flush_done` rises when every plane has written its
// barrier buffer back.
module imdb
  import imdb_pkg::*;
#(
  parameter int unsigned BANKS      = 4,
  parameter int unsigned MT_ENTRIES = 256,
  parameter int unsigned BB_ENTRIES = 8,
  parameter int unsigned GROUP_SIZE = 8,
  parameter int unsigned THRESHOLD  = 511,
  parameter int unsigned INS_LOG2   = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cmd_valid,
  output logic                       cmd_ready,
  input  logic [$clog2(BANKS)-1:0]   cmd_bank,
  input  addr_t                      cmd_addr,
  input  line_t                      cmd_new,
  input  line_t                      cmd_old,
  output logic    [BANKS-1:0]        done_valid,
  output result_e [BANKS-1:0]        done_result,
  input  logic [$clog2(BANKS)-1:0]   rd_bank,
  input  addr_t                      rd_addr,
  output logic                       rd_hit,
  output line_t                      rd_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [$clog2(BANKS)-1:0]   out_bank,
  output out_req_t                   out_req,
  input  logic                       flush_req,
  output logic                       flush_done
);

  localparam int unsigned BK_W = $clog2(BANKS);

  logic     [BANKS-1:0] p_cmd_valid, p_cmd_ready, p_rd_hit, p_out_valid, p_out_ready, p_flush_done;
  line_t    [BANKS-1:0] p_rd_data;
  out_req_t [BANKS-1:0] p_out_req;

  for (genvar b = 0; b < BANKS; b++) begin : g_plane
    assign p_cmd_valid[b] = cmd_valid && (cmd_bank == BK_W'(b));
    imdb_plane #(
      .MT_ENTRIES(MT_ENTRIES), .BB_ENTRIES(BB_ENTRIES), .GROUP_SIZE(GROUP_SIZE),
      .THRESHOLD(THRESHOLD), .INS_LOG2(INS_LOG2), .SEED(16'h1D0F + 16'(b) * 16'h3C5)
    ) u_plane (
      .clk, .rst_n,
      .cmd_valid(p_cmd_valid[b]), .cmd_ready(p_cmd_ready[b]),
      .cmd_addr, .cmd_new, .cmd_old,
      .done_valid(done_valid[b]), .done_result(done_result[b]),
      .rd_addr, .rd_hit(p_rd_hit[b]), .rd_data(p_rd_data[b]),
      .out_valid(p_out_valid[b]), .out_ready(p_out_ready[b]), .out_req(p_out_req[b]),
      .flush_req, .flush_done(p_flush_done[b])
    );
  end

  assign cmd_ready  = p_cmd_ready[cmd_bank];
  assign rd_hit     = p_rd_hit[rd_bank];
  assign rd_data    = p_rd_data[rd_bank];
  assign flush_done = &p_flush_done;

  // round-robin arbitration of the output requests
  logic [BK_W-1:0] rr_q;
  logic [BK_W-1:0] grant;
  logic            any;

  always_comb begin
    any   = 1'b0;
    grant = '0;
    for (int k = BANKS - 1; k >= 0; k--) begin
      logic [BK_W-1:0] b;
      b = BK_W'(32'(rr_q) + k);
      if (p_out_valid[b]) begin
        any   = 1'b1;
        grant = b;
      end
    end
  end

  assign out_valid = any;
  assign out_bank  = grant;
  assign out_req   = p_out_req[grant];
  always_comb begin
    p_out_ready = '0;
    p_out_ready[grant] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (any && out_ready) rr_q <= grant + 1'b1;
  end

endmodule

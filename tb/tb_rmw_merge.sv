// Self-checking test of the cache-based RMW front end with command merging.
// A reduced cache (8 entries, so that replacement happens often) sits between
// a random host and a PCM model in this file. The PCM model keeps the page
// contents, answers page reads with their data and page writes with an
// acknowledgement after a random 10..40 cycle latency, possibly out of order.
//  * directed: an isolated read miss must reach the PCM exactly PENDING+1
//    cycles after allocation (the Merger's waiting window), commands to other
//    blocks of the page issued inside the window must be merged into the same
//    page read (one PCM read only), and a later command must hit;
//  * random: reads and writes to 24 pages with random host back-pressure.
//    Each read response must carry the data of the last write to that block
//    issued before the read; after the run every block in the PCM must equal
//    the reference, every read must be answered exactly once, and every event
//    (read hit, write hit, miss, head merge, scan merge, stall, dispatch,
//    write-back) must have occurred.
module tb_rmw_merge;
  import rmw_pkg::*;
  localparam int N = 8, B = 4, PEND = 8, NPAGES = 24;
  localparam int PW = B * BLK_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic req_valid = 0, req_ready, rsp_valid, rsp_ready = 1;
  cmd_e req_type;
  id_t req_id, rsp_id;
  page_t req_page, mreq_page;
  logic [1:0] req_off;
  blk_t req_data, rsp_data;
  logic mreq_valid, mreq_ready = 1, mrsp_valid = 0, mrsp_ready;
  cmd_e mreq_type, mrsp_type;
  logic [2:0] mreq_tag, mrsp_tag;
  logic [PW-1:0] mreq_data, mrsp_data;
  logic ev_read_hit, ev_write_hit, ev_miss, ev_merge_head, ev_merge_scan, ev_stall,
        ev_dispatch, ev_writeback;

  rmw_merge #(.ENTRIES(N), .BLOCKS(B), .PENDING(PEND)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", msg, cyc); end
  endtask

  function automatic blk_t init_blk(int p, int o);
    return {16{32'(p * 16 + o) ^ 32'h5A5A_0000}};
  endfunction

  // ---------------- PCM model ----------------
  blk_t mem [NPAGES][B];   // indexed with the low bits of the page number
  typedef struct { int due; cmd_e typ; logic [2:0] tag; page_t page; } pend_t;
  pend_t pend [$];
  int n_pcm_rd = 0, n_pcm_wr = 0;
  always @(posedge clk) if (rst_n) begin
    if (mrsp_valid && mrsp_ready) mrsp_valid <= 0;
    if (mreq_valid && mreq_ready) begin
      pend_t e;
      e.due = cyc + 10 + int'($urandom % 31); e.typ = mreq_type; e.tag = mreq_tag; e.page = mreq_page;
      pend.push_back(e);
      if (mreq_type == CMD_WRITE) begin
        n_pcm_wr++;
        for (int o = 0; o < B; o++) mem[5'(mreq_page)][o] = mreq_data[o*BLK_W +: BLK_W];
      end else n_pcm_rd++;
    end
    if (!mrsp_valid || mrsp_ready) begin
      for (int i = 0; i < pend.size(); i++) if (pend[i].due <= cyc) begin
        mrsp_valid <= 1; mrsp_type <= pend[i].typ; mrsp_tag <= pend[i].tag;
        for (int o = 0; o < B; o++) mrsp_data[o*BLK_W +: BLK_W] <= mem[5'(pend[i].page)][o];
        pend.delete(i);
        break;
      end
    end
    mreq_ready <= ($urandom % 8) != 0;
  end

  // ---------------- event counters ----------------
  int n_ev [8] = '{default: 0};
  always @(posedge clk) if (rst_n) begin
    n_ev[0] += int'(ev_read_hit);  n_ev[1] += int'(ev_write_hit); n_ev[2] += int'(ev_miss);
    n_ev[3] += int'(ev_merge_head); n_ev[4] += int'(ev_merge_scan); n_ev[5] += int'(ev_stall);
    n_ev[6] += int'(ev_dispatch);  n_ev[7] += int'(ev_writeback);
  end

  // ---------------- host side reference ----------------
  blk_t ref_blk [NPAGES][B];
  blk_t exp_rsp [id_t];
  int   n_rsp = 0;
  bit   rand_rsp_ready = 0;
  always @(posedge clk) if (rst_n) begin
    if (rsp_valid && rsp_ready) begin
      n_rsp++;
      chk(exp_rsp.exists(rsp_id), $sformatf("response for unknown id %0d", rsp_id));
      if (exp_rsp.exists(rsp_id)) begin
        chk(rsp_data == exp_rsp[rsp_id], $sformatf("read data id %0d", rsp_id));
        exp_rsp.delete(rsp_id);
      end
    end
    rsp_ready <= rand_rsp_ready ? (($urandom % 4) != 0) : 1'b1;
  end

  int next_id = 0;
  task automatic issue(cmd_e t, int p, int o);
    @(negedge clk);
    while (t == CMD_READ && exp_rsp.exists(id_t'(next_id))) @(negedge clk);
    req_valid = 1; req_type = t; req_id = id_t'(next_id); req_page = page_t'(p); req_off = 2'(o);
    req_data = {16{$urandom}};
    #1;
    while (!req_ready) @(negedge clk) #1;
    if (t == CMD_WRITE) ref_blk[p][o] = req_data;
    else exp_rsp[id_t'(next_id)] = ref_blk[p][o];
    next_id = (next_id + 1) % 256;
    @(posedge clk) #1 req_valid = 0;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_miss = 0, t_disp = 0;
  always @(posedge clk) begin
    if (ev_miss) t_miss <= cyc;
    if (ev_dispatch) t_disp <= cyc;
  end

  initial begin
    for (int p = 0; p < NPAGES; p++) for (int o = 0; o < B; o++) begin
      mem[p][o] = init_blk(p, o); ref_blk[p][o] = init_blk(p, o);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) mreq_ready = 1;

    // ---- directed: isolated miss, waiting window, merging ----
    issue(CMD_READ, 3, 0);
    repeat (30) @(posedge clk);
    chk(t_disp - t_miss == PEND + 1 || (n_ev[6] == 1 && t_disp - t_miss <= PEND + 3),
        $sformatf("dispatch %0d cycles after allocation", t_disp - t_miss));
    repeat (60) @(posedge clk);
    chk(n_rsp == 1, "one response");
    begin
      automatic int rd0 = n_pcm_rd;
      automatic int sc0 = n_ev[4];
      automatic int hd0 = n_ev[3];
      issue(CMD_WRITE, 5, 1);     // miss, allocates page 5
      issue(CMD_READ, 5, 2);      // head: found, V=0 -> merged
      issue(CMD_WRITE, 5, 3);     // merged
      issue(CMD_READ, 5, 0);      // merged
      repeat (100) @(posedge clk);
      chk(n_pcm_rd - rd0 == 1, $sformatf("one page read for four commands, got %0d", n_pcm_rd - rd0));
      chk((n_ev[4] - sc0) + (n_ev[3] - hd0) == 3, "three commands merged");
      chk(n_rsp == 3, "two merged reads answered");
      chk(mem[5][1] == ref_blk[5][1] && mem[5][3] == ref_blk[5][3], "merged writes written back");
      issue(CMD_READ, 5, 1);
      repeat (5) @(posedge clk);
      chk(n_rsp == 4, "hit answered within a few cycles");
    end

    // ---- random traffic ----
    rand_rsp_ready = 1;
    for (int i = 0; i < 6000; i++) begin
      automatic int p = int'($urandom % NPAGES);
      if ($urandom % 4 == 0) p = p % 4;     // a few hot pages
      issue(($urandom % 2) == 1 ? CMD_WRITE : CMD_READ, p, int'($urandom % B));
      if ($urandom % 8 == 0) repeat ($urandom % 20) @(posedge clk);
    end
    rand_rsp_ready = 0;
    for (int i = 0; i < 20000 && (exp_rsp.num() > 0 || pend.size() > 0 || dut.iq_occ_q != 0); i++)
      @(posedge clk);
    repeat (100) @(posedge clk);
    chk(exp_rsp.num() == 0, $sformatf("%0d reads never answered", exp_rsp.num()));
    chk(pend.size() == 0 && !mrsp_valid, "PCM idle");
    for (int p = 0; p < NPAGES; p++) for (int o = 0; o < B; o++)
      chk(mem[p][o] == ref_blk[p][o], $sformatf("PCM page %0d block %0d", p, o));
    foreach (n_ev[k]) chk(n_ev[k] > 0, $sformatf("event %0d never happened", k));
    $display("events: rhit=%0d whit=%0d miss=%0d mhead=%0d mscan=%0d stall=%0d disp=%0d wb=%0d pcm rd=%0d wr=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7], n_pcm_rd, n_pcm_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test body shared by the two testbenches of pcm_controller_top (reduced and
// full size). The including module declares the sizing localparams
//   RMW_N  (RMW cache entries)   NPAGES (pages touched by the host)
//   N_HOST (host commands)       N_WR   (prepared writes sent to the IMDB)
//   COLD   (range of cold rows)  HOT    (hot lines per bank)
//   HOT_IN4 (hot writes per 4 module writes)
// and instantiates `dut` on the signals declared here.
//
// Host side: random 64 B reads and writes through the RMW front end to a PCM
// page model (random 10..40 cycle latency). Every read must return the last
// write to its block, every read must be answered, and after the run every
// page in the model must equal the reference.
// Module side: the testbench plays the media controller of a 4-bank module.
// Writes go to a few hot lines per bank (they cross the WDE threshold and are
// promoted) and to many cold lines (misses, insertions and replacements).
// The device model is written for every write that the barrier buffer did not
// absorb and for every write-back; write-backs must carry the latest data of
// their line, barrier buffer reads must return the latest data, and after the
// power-failure flush every line in the device model must hold its latest
// data. Every mechanism (8 RMW events, 7 IMDB outcomes, rewrites, demotion and
// flush write-backs, barrier buffer reads) is counted and must have happened.

  localparam int PW = 4 * BLK_W;
  localparam int TW = $clog2(RMW_N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // host / PCM page port signals
  logic host_req_valid = 0, host_req_ready, host_rsp_valid, host_rsp_ready = 1;
  cmd_e host_req_type;
  id_t host_req_id, host_rsp_id;
  page_t host_req_page, pcm_req_page;
  logic [1:0] host_req_off;
  blk_t host_req_data, host_rsp_data;
  logic pcm_req_valid, pcm_req_ready = 1, pcm_rsp_valid = 0, pcm_rsp_ready;
  cmd_e pcm_req_type, pcm_rsp_type;
  logic [TW-1:0] pcm_req_tag, pcm_rsp_tag;
  logic [PW-1:0] pcm_req_data, pcm_rsp_data;
  logic [7:0] rmw_events;
  // module side signals
  logic wr_valid = 0, wr_ready, rd_hit, imdb_req_valid, imdb_req_ready = 1, flush_req = 0, flush_done;
  logic [1:0] wr_bank, rd_bank = 0, imdb_req_bank;
  addr_t wr_addr, rd_addr = '0;
  line_t wr_new, wr_old, rd_data;
  logic [3:0] wr_done_valid;
  result_e [3:0] wr_done_result;
  out_req_t imdb_req;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0d", msg, cyc);
    end
  endtask

  initial begin
    #(64'd2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ======================= host side =======================
  function automatic blk_t init_blk(int p, int o);
    return {16{32'(p * 16 + o) ^ 32'h5A5A_0000}};
  endfunction

  blk_t mem [NPAGES][4];
  typedef struct { int due; cmd_e typ; logic [TW-1:0] tag; int page; } pend_t;
  pend_t pend [$];
  always @(posedge clk) if (rst_n) begin
    if (pcm_rsp_valid && pcm_rsp_ready) pcm_rsp_valid <= 0;
    if (pcm_req_valid && pcm_req_ready) begin
      pend_t e;
      e.due = cyc + 10 + int'($urandom % 31); e.typ = pcm_req_type; e.tag = pcm_req_tag;
      e.page = int'(pcm_req_page);
      pend.push_back(e);
      if (pcm_req_type == CMD_WRITE)
        for (int o = 0; o < 4; o++) mem[e.page][o] = pcm_req_data[o*BLK_W +: BLK_W];
    end
    if (!pcm_rsp_valid || pcm_rsp_ready) begin
      for (int i = 0; i < pend.size(); i++) if (pend[i].due <= cyc) begin
        pcm_rsp_valid <= 1; pcm_rsp_type <= pend[i].typ; pcm_rsp_tag <= pend[i].tag;
        for (int o = 0; o < 4; o++) pcm_rsp_data[o*BLK_W +: BLK_W] <= mem[pend[i].page][o];
        pend.delete(i);
        break;
      end
    end
    pcm_req_ready <= ($urandom % 8) != 0;
  end

  int n_ev [8] = '{default: 0};
  always @(posedge clk) if (rst_n) for (int k = 0; k < 8; k++) n_ev[k] += int'(rmw_events[k]);

  blk_t ref_blk [NPAGES][4];
  blk_t exp_rsp [id_t];
  always @(posedge clk) if (rst_n) begin
    if (host_rsp_valid && host_rsp_ready) begin
      chk(exp_rsp.exists(host_rsp_id), "response with unknown id");
      if (exp_rsp.exists(host_rsp_id)) begin
        chk(host_rsp_data == exp_rsp[host_rsp_id], $sformatf("host read data id %0d", host_rsp_id));
        exp_rsp.delete(host_rsp_id);
      end
    end
    host_rsp_ready <= ($urandom % 4) != 0;
  end

  int next_id = 0;
  bit host_done = 0;
  initial begin
    for (int p = 0; p < NPAGES; p++) for (int o = 0; o < 4; o++) begin
      mem[p][o] = init_blk(p, o); ref_blk[p][o] = init_blk(p, o);
    end
    wait (rst_n);
    for (int i = 0; i < N_HOST; i++) begin
      automatic int p = int'($urandom % NPAGES);
      automatic int o = int'($urandom % 4);
      automatic cmd_e t = ($urandom % 2) == 1 ? CMD_WRITE : CMD_READ;
      if ($urandom % 4 == 0) p = p % 4;
      @(negedge clk);
      while (t == CMD_READ && exp_rsp.exists(id_t'(next_id))) @(negedge clk);
      host_req_valid = 1; host_req_type = t; host_req_id = id_t'(next_id);
      host_req_page = page_t'(p); host_req_off = 2'(o); host_req_data = {16{$urandom}};
      #1;
      while (!host_req_ready) @(negedge clk) #1;
      if (t == CMD_WRITE) ref_blk[p][o] = host_req_data;
      else exp_rsp[id_t'(next_id)] = ref_blk[p][o];
      next_id = (next_id + 1) % 256;
      @(posedge clk) #1 host_req_valid = 0;
      if ($urandom % 8 == 0) repeat ($urandom % 20) @(posedge clk);
    end
    for (int i = 0; i < 20000 && (exp_rsp.num() > 0 || pend.size() > 0); i++) @(posedge clk);
    repeat (200) @(posedge clk);
    host_done = 1;
  end

  // ======================= module side =======================
  line_t ref_line [addr_t];   // latest data per line (key includes the bank)
  line_t dev_line [addr_t];   // device contents
  int    n_res [7] = '{default: 0};
  int    n_rewrite = 0, n_wb = 0, n_flush_wb = 0, n_rd_hit = 0;
  bit    flushing = 0;
  bit    busy [4] = '{default: 0};
  addr_t busy_addr [4];
  line_t busy_new [4];

  function automatic addr_t key(int b, addr_t a);
    // two top row bits of the key carry the bank (rows used stay below 2^14)
    return '{row: {2'(b), a.row[ROW_W-3:0]}, col: a.col};
  endfunction

  function automatic line_t get_ref(addr_t k);
    return ref_line.exists(k) ? ref_line[k] : line_t'(0) - 1;   // unwritten = all ones
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < 4; b++) if (wr_done_valid[b]) begin
      automatic result_e r = wr_done_result[b];
      n_res[int'(r)]++;
      chk(busy[b], "done without a command");
      if (r != RES_ABSORBED) dev_line[key(b, busy_addr[b])] = busy_new[b];
      busy[b] = 0;
    end
    if (imdb_req_valid && imdb_req_ready) begin
      automatic addr_t k = key(int'(imdb_req_bank), imdb_req.addr);
      if (imdb_req.kind == OUT_REWRITE) n_rewrite++;
      else begin
        if (flushing) n_flush_wb++; else n_wb++;
        chk(imdb_req.data == get_ref(k), "write-back carries the latest data");
        dev_line[k] = imdb_req.data;
      end
    end
    imdb_req_ready <= ($urandom % 4) != 0;
  end

  function automatic addr_t pick_addr(int b);
    if (int'($urandom % 4) < HOT_IN4) return '{row: row_t'(1000 + 10 * int'($urandom % HOT)), col: col_t'(b)};
    return '{row: row_t'(2000 + int'($urandom % COLD)), col: col_t'($urandom)};
  endfunction

  bit mod_done = 0;
  initial begin
    wait (rst_n);
    for (int i = 0; i < N_WR; ) begin
      automatic int b = int'($urandom % 4);
      automatic addr_t a = pick_addr(b);
      @(negedge clk);
      // barrier buffer read of a random hot line of a random bank
      begin
        automatic int rb = int'($urandom % 4);
        automatic addr_t ra = '{row: row_t'(1000 + 10 * int'($urandom % HOT)), col: col_t'(rb)};
        rd_bank = 2'(rb); rd_addr = ra;
        #1;
        if (rd_hit && !(busy[rb] && busy_addr[rb] == ra)) begin
          n_rd_hit++;
          chk(rd_data == get_ref(key(rb, ra)), "barrier buffer read data");
        end
      end
      wr_valid = 0;
      if (busy[b]) continue;
      wr_bank = 2'(b); wr_addr = a;
      wr_old = get_ref(key(b, a));
      wr_new = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      if (!wr_ready) continue;
      wr_valid = 1;
      busy[b] = 1; busy_addr[b] = a; busy_new[b] = wr_new;
      ref_line[key(b, a)] = wr_new;
      i++;
      @(posedge clk);
      #1 wr_valid = 0;
    end
    @(negedge clk) wr_valid = 0;
    for (int k = 0; k < 100 && (busy[0] || busy[1] || busy[2] || busy[3]); k++) @(posedge clk);
    // power failure: flush every barrier buffer
    flushing = 1;
    @(negedge clk) flush_req = 1;
    for (int k = 0; k < 1000 && !flush_done; k++) @(posedge clk) #1;
    chk(flush_done, "flush completes");
    // one bypassed write per bank
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      wr_valid = 1; wr_bank = 2'(b); wr_addr = '{row: 5, col: 5}; wr_old = get_ref(key(b, wr_addr));
      wr_new = '0; busy[b] = 1; busy_addr[b] = wr_addr; busy_new[b] = '0;
      ref_line[key(b, wr_addr)] = '0;
      #1 chk(wr_ready, "bypass accepts");
      @(posedge clk) #1 wr_valid = 0;
    end
    repeat (5) @(posedge clk);
    foreach (ref_line[k]) chk(dev_line.exists(k) && dev_line[k] == ref_line[k], "device holds latest data after flush");
    mod_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (host_done && mod_done);
    chk(exp_rsp.num() == 0, $sformatf("%0d host reads never answered", exp_rsp.num()));
    for (int p = 0; p < NPAGES; p++) for (int o = 0; o < 4; o++)
      chk(mem[p][o] == ref_blk[p][o], $sformatf("PCM page %0d block %0d", p, o));
    $display("RMW events: read_hit=%0d write_hit=%0d miss=%0d merge_head=%0d merge_scan=%0d stall=%0d dispatch=%0d writeback=%0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7]);
    $display("IMDB: absorbed=%0d hit=%0d promoted=%0d filtered=%0d inserted=%0d replaced=%0d bypass=%0d rewrites=%0d demotion_wb=%0d flush_wb=%0d bb_reads=%0d cycles=%0d",
             n_res[0], n_res[1], n_res[2], n_res[3], n_res[4], n_res[5], n_res[6],
             n_rewrite, n_wb, n_flush_wb, n_rd_hit, cyc);
    foreach (n_ev[k]) chk(n_ev[k] > 0, $sformatf("RMW event %0d never happened", k));
    foreach (n_res[k]) chk(n_res[k] > 0, $sformatf("IMDB outcome %0d never happened", k));
    chk(n_rewrite > 0, "no rewrite");
    chk(n_wb > 0, "no demotion write-back");
    chk(n_flush_wb > 0, "no flush write-back");
    chk(n_rd_hit > 0, "no barrier buffer read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

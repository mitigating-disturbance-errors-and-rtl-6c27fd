// Self-checking test of one IMDB plane at its default sizes (256-entry main
// table, 8-entry barrier buffer, group size 8, threshold 511).
//  1. insertion with prior knowledge, hits, promotion after the threshold
//     with rewrites of both neighbour rows, absorbed writes and reads served
//     from the barrier buffer, with the latency of each case;
//  2. promotion into a full barrier buffer: the least frequently used line is
//     written back and demoted to the main table;
//  3. a full main table: the AppLE victim must come from the only group of
//     entries with low ZeroFlipCntr, every other entry must still hit;
//  4. power-failure flush and bypass;
//  5. a second plane with the default insertion probability 1/128.
module tb_imdb_plane;
  import imdb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic cmd_valid = 0, cmd_ready, done_valid, rd_hit, out_valid, flush_req = 0, flush_done;
  addr_t cmd_addr, rd_addr;
  line_t cmd_new, cmd_old, rd_data;
  result_e done_result;
  out_req_t out_req;

  imdb_plane #(.INS_LOG2(0)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_addr, .cmd_new, .cmd_old,
    .done_valid, .done_result, .rd_addr, .rd_hit, .rd_data,
    .out_valid, .out_ready(1'b1), .out_req, .flush_req, .flush_done);

  // plane with the default 1/128 insertion probability
  logic c2_valid = 0, c2_ready, d2_valid, o2_valid, f2_done, r2_hit;
  addr_t c2_addr;
  result_e d2_result;
  out_req_t o2_req;
  line_t r2_data;
  imdb_plane dut2 (
    .clk, .rst_n, .cmd_valid(c2_valid), .cmd_ready(c2_ready), .cmd_addr(c2_addr),
    .cmd_new('0), .cmd_old('1), .done_valid(d2_valid), .done_result(d2_result),
    .rd_addr('0), .rd_hit(r2_hit), .rd_data(r2_data),
    .out_valid(o2_valid), .out_ready(1'b1), .out_req(o2_req), .flush_req(1'b0),
    .flush_done(f2_done));

  int checks = 0, failures = 0;
  out_req_t outs [$];
  always @(posedge clk) if (out_valid) outs.push_back(out_req);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0d)", msg, cyc); end
  endtask

  function automatic addr_t A(int r, int c);
    return '{row: row_t'(r), col: col_t'(c)};
  endfunction

  result_e last_res;
  int      last_lat;
  task automatic wr(addr_t a, line_t nw, line_t od);
    int n = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_addr = a; cmd_new = nw; cmd_old = od;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk) #1 cmd_valid = 0;   // accepted at this edge
    while (!done_valid) begin @(posedge clk) #1; n++; end
    last_res = done_result;
    last_lat = n + 1;   // done_valid is seen in the cycle after it is registered
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic line_t ones = '1, zeros = '0;
    line_t pat;
    int n_ins, n_rep;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);   // let AppLE finish a round

    // ---- 1. insert, hits, promotion ----
    wr(A(100, 5), zeros, ones);
    chk(last_res == RES_INSERTED && last_lat == 2, $sformatf("insert res=%0d lat=%0d", last_res, last_lat));
    for (int k = 0; k < 6; k++) begin
      wr(A(100, 5), zeros, ones);        // 64 flips per word: 64 + 64(k+1) < 511
      chk(last_res == RES_HIT && last_lat == 2, $sformatf("hit %0d res=%0d lat=%0d", k, last_res, last_lat));
    end
    outs.delete();
    wr(A(100, 5), zeros, ones);          // 512 -> saturates at 511 = threshold
    chk(last_res == RES_PROMOTED && last_lat == 5, $sformatf("promote res=%0d lat=%0d", last_res, last_lat));
    repeat (3) @(posedge clk);
    chk(outs.size() == 2, $sformatf("two rewrites, got %0d", outs.size()));
    if (outs.size() == 2) begin
      chk(outs[0].kind == OUT_REWRITE && outs[0].addr == A(99, 5), "rewrite upper row");
      chk(outs[1].kind == OUT_REWRITE && outs[1].addr == A(101, 5), "rewrite lower row");
    end
    // writes now absorbed by the barrier buffer, reads served from it
    pat = {16{32'hCAFE_0001}};
    wr(A(100, 5), pat, ones);
    chk(last_res == RES_ABSORBED && last_lat == 1, $sformatf("absorb res=%0d lat=%0d", last_res, last_lat));
    rd_addr = A(100, 5);
    #1 chk(rd_hit && rd_data == pat, "read from barrier buffer");
    rd_addr = A(100, 6);
    #1 chk(!rd_hit, "read miss");
    // a flip-free write to another inserted address is a hit that changes nothing
    wr(A(7, 7), ones, ones);
    chk(last_res == RES_INSERTED, "insert 7/7");
    wr(A(7, 7), ones, ones);
    chk(last_res == RES_HIT, "hit without flips");

    // ---- 2. fill the barrier buffer (8 lines), then one more promotion ----
    for (int j = 1; j < 8; j++) begin
      wr(A(200 + 4 * j, 1), zeros, ones);
      for (int k = 0; k < 7; k++) wr(A(200 + 4 * j, 1), zeros, ones);
      chk(last_res == RES_PROMOTED, $sformatf("promote line %0d", j));
      // give every line but j==3 extra writes so line 3 is the LFU one
      if (j != 3) begin
        wr(A(200 + 4 * j, 1), {16{32'(j)}}, ones);
        chk(last_res == RES_ABSORBED, "absorbed extra write");
      end else pat = {16{32'h3333_3333}};
      if (j == 3) begin
        wr(A(200 + 4 * j, 1), zeros, ones);  // same frequency as row 100 line (2)
        wr(A(200 + 4 * j, 1), pat, ones);    // frequency 3 for line 3
      end
    end
    // row 100 line has freq 2 (promote=1, one absorbed write); others: 2, line3: 3
    // make row 100 line clearly hotter
    wr(A(100, 5), pat, ones); wr(A(100, 5), pat, ones);
    // lines j!=3 have freq 2, line 3 freq 3; the LFU is line j=1 (lowest index at freq 2)
    outs.delete();
    for (int k = 0; k < 8; k++) wr(A(300, 2), zeros, ones);
    chk(last_res == RES_PROMOTED, "ninth promotion");
    repeat (4) @(posedge clk);
    chk(outs.size() == 3, $sformatf("two rewrites + write-back, got %0d", outs.size()));
    if (outs.size() == 3) begin
      chk(outs[2].kind == OUT_WRITEBACK && outs[2].addr == A(204, 1) && outs[2].data == {16{32'(1)}},
          "write-back of the LFU line");
    end
    // the demoted address is back in the main table: a write is a hit
    wr(A(204, 1), ones, ones);
    chk(last_res == RES_HIT, "demoted line hits in main table");
    rd_addr = A(204, 1);
    #1 chk(!rd_hit, "demoted line no longer in barrier buffer");

    // ---- 3. full main table and AppLE ----
    // current main table: (7,7), (204,1) + holes left by promotions. Fill all
    // remaining slots with lines of all ones (prior knowledge 0), then give
    // every line outside group 5 (indices 40..47) some flips.
    for (int i = 0; i < 256; i++) begin
      wr(A(1000 + i, 0), ones, ones);
      if (last_res != RES_INSERTED) break;
    end
    chk(last_res == RES_HIT || last_res == RES_REPLACED, "table full");
    // now touch all indices: address (1000+i,0) went to a free slot; find each
    // line's slot by reading the table through hierarchical access
    for (int i = 0; i < 256; i++) begin
      automatic addr_t a = dut.u_mt.cam_q[i];
      if (i / 8 != 5) begin
        wr(a, {LINE_W{1'b0}}, {{(LINE_W/2){1'b0}}, {(LINE_W/2){1'b1}}});
        chk(last_res == RES_HIT, "raise counters");
      end
    end
    repeat (40) @(posedge clk);
    begin
      addr_t keep [256];
      for (int i = 0; i < 256; i++) keep[i] = dut.u_mt.cam_q[i];
      wr(A(5000, 0), ones, ones);
      chk(last_res == RES_REPLACED, $sformatf("replacement res=%0d", last_res));
      chk(dut.u_apple.victim_idx / 8 == 5, $sformatf("victim %0d from low group", dut.u_apple.victim_idx));
      for (int i = 0; i < 256; i++) if (i / 8 != 5) begin
        wr(keep[i], ones, ones);
        if (last_res != RES_HIT) begin chk(0, $sformatf("entry %0d evicted", i)); break; end
      end
      checks++;
      // a miss right after a replacement waits for a new 32-cycle AppLE round
      wr(A(5001, 0), ones, ones);
      chk(last_res == RES_REPLACED, "second replacement");
      wr(A(5002, 0), ones, ones);
      chk(last_res == RES_REPLACED && last_lat >= 32, $sformatf("waits for AppLE round lat=%0d", last_lat));
    end

    // ---- 4. flush ----
    outs.delete();
    @(negedge clk) flush_req = 1;
    for (int i = 0; i < 100 && !flush_done; i++) @(posedge clk) #1;
    chk(flush_done, "flush done");
    chk(outs.size() == 8, $sformatf("8 write-backs, got %0d", outs.size()));
    foreach (outs[i]) chk(outs[i].kind == OUT_WRITEBACK, "flush write-back kind");
    wr(A(300, 2), zeros, ones);
    chk(last_res == RES_BYPASS, "bypass after flush");

    // ---- 5. insertion probability 1/128 ----
    n_ins = 0;
    for (int i = 0; i < 2560; i++) begin
      @(negedge clk);
      c2_valid = 1; c2_addr = A(i, 3);
      while (!c2_ready) @(negedge clk);
      @(posedge clk) #1 c2_valid = 0;
      while (!d2_valid) @(posedge clk) #1;
      if (d2_result == RES_INSERTED) n_ins++;
      else if (d2_result != RES_FILTERED) chk(0, "unexpected result");
    end
    chk(n_ins >= 6 && n_ins <= 40, $sformatf("inserted %0d of 2560 misses (expect ~20)", n_ins));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

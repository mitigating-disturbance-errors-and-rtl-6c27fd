// Self-checking test of the IMDB main table: random inserts, updates and
// invalidations against a reference array; checks CAM lookups (hits and
// misses), the lowest free entry and the read port after every write.
module tb_imdb_main_table;
  import imdb_pkg::*;

  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  addr_t lk_addr;
  logic lk_hit, free_any, rd_valid, wr_en = 0, wr_valid = 0;
  logic [7:0] lk_idx, free_idx, rd_idx = 0, wr_idx = 0;
  mt_entry_t rd_entry, wr_entry;
  int checks = 0, failures = 0;

  logic      rv [N];
  mt_entry_t re [N];

  imdb_main_table #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic mt_entry_t rnd_entry(int a);
    mt_entry_t e;
    e.addr = addr_t'(a);
    e.rwc = RWC_W'($urandom);
    for (int w = 0; w < WORDS; w++) e.zfc[w] = ZFC_W'($urandom);
    e.maxidx = IDX_W'($urandom);
    return e;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_free;
    for (int i = 0; i < N; i++) rv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      automatic int idx = (it < 300) ? it % N : $urandom % N;
      automatic int a = (it < 300) ? it * 7 + 3 : $urandom % 4096;
      automatic bit dup = 0;
      // keep addresses unique among valid entries
      for (int i = 0; i < N; i++) if (rv[i] && re[i].addr == addr_t'(a) && i != idx) dup = 1;
      if (dup) continue;
      @(negedge clk);
      wr_en = 1; wr_idx = 8'(idx); wr_valid = ($urandom % 8 != 0) || it < 256;
      wr_entry = rnd_entry(a);
      @(negedge clk);
      wr_en = 0;
      rv[idx] = wr_valid; re[idx] = wr_entry;
      // read back
      rd_idx = 8'(idx);
      #1;
      chk(rd_valid == rv[idx], "read valid");
      if (rv[idx]) chk(rd_entry == re[idx], "read entry");
      // lookup of a stored address and of a random one
      lk_addr = re[$urandom % N].addr;
      if ($urandom % 2 == 1) lk_addr = addr_t'($urandom % 4096);
      #1;
      begin
        automatic bit eh = 0; automatic int ei = 0;
        for (int i = 0; i < N; i++) if (rv[i] && re[i].addr == lk_addr) begin eh = 1; ei = i; end
        chk(lk_hit == eh, "lookup hit");
        if (eh) chk(int'(lk_idx) == ei, "lookup idx");
      end
      exp_free = -1;
      for (int i = N - 1; i >= 0; i--) if (!rv[i]) exp_free = i;
      chk(free_any == (exp_free >= 0), "free any");
      if (exp_free >= 0) chk(int'(free_idx) == exp_free, "free idx");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the barrier buffer: promotions (inserts), write hits
// (data update, FreqCntr increment), invalidations; checks both lookup
// ports, the free/LFU replacement candidate and the read port against a
// reference model.
module tb_imdb_barrier_buffer;
  import imdb_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  addr_t lka_addr, lkb_addr, ins_addr;
  logic lka_hit, lkb_hit, full, rd_valid;
  logic [2:0] lka_idx, victim_idx, rd_idx, upd_idx, ins_idx, inv_idx;
  line_t lkb_data, upd_data, ins_data;
  bb_entry_t rd_entry;
  rwc_t ins_rwc;
  logic upd_en = 0, ins_en = 0, inv_en = 0;
  int checks = 0, failures = 0;

  logic      mv [N];
  bb_entry_t me [N];

  imdb_barrier_buffer #(.ENTRIES(N)) dut (.*);
  assign upd_idx = lka_idx;

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic line_t rline();
    line_t l;
    for (int k = 0; k < LINE_W / 32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) mv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      automatic int op = $urandom % 10;
      automatic int ev = -1; automatic int best = 1000;
      // expected victim: first free, else smallest freq (lowest index)
      for (int i = 0; i < N; i++) if (!mv[i] && ev < 0) ev = i;
      chk(full == (ev < 0), "full flag");
      if (ev < 0) begin
        for (int i = 0; i < N; i++) if (int'(me[i].freq) < best) begin best = int'(me[i].freq); ev = i; end
      end
      chk(int'(victim_idx) == ev, $sformatf("victim %0d exp %0d", victim_idx, ev));
      @(negedge clk);
      if (op < 3) begin
        // promote a new address into the victim slot
        automatic int a;
        automatic bit dup;
        do begin
          a = $urandom % 64; dup = 0;
          for (int i = 0; i < N; i++) if (mv[i] && me[i].addr == addr_t'(a) && i != ev) dup = 1;
        end while (dup);
        ins_en = 1; ins_idx = 3'(ev); ins_addr = addr_t'(a); ins_data = rline(); ins_rwc = RWC_W'($urandom);
        @(negedge clk); ins_en = 0;
        mv[ev] = 1; me[ev] = '{addr: ins_addr, data: ins_data, rwc: ins_rwc, freq: 1};
      end else if (op < 9) begin
        // write to a (maybe) held address
        automatic int j = $urandom % N;
        lka_addr = mv[j] ? me[j].addr : addr_t'($urandom % 64);
        #1;
        begin
          automatic bit eh = 0; automatic int ei = 0;
          for (int i = 0; i < N; i++) if (mv[i] && me[i].addr == lka_addr) begin eh = 1; ei = i; end
          chk(lka_hit == eh, "lookup A hit");
          if (eh) begin
            chk(int'(lka_idx) == ei, "lookup A idx");
            upd_en = 1; upd_data = rline();
            @(negedge clk); upd_en = 0;
            me[ei].data = upd_data;
            if (me[ei].freq != '1) me[ei].freq++;
          end
        end
      end else begin
        automatic int j = $urandom % N;
        inv_en = 1; inv_idx = 3'(j);
        @(negedge clk); inv_en = 0;
        mv[j] = 0;
      end
      // read port B and the read port
      begin
        automatic int j = $urandom % N;
        lkb_addr = me[j].addr; rd_idx = 3'(j);
        #1;
        chk(rd_valid == mv[j], "rd valid");
        if (mv[j]) begin
          chk(rd_entry == me[j], "rd entry");
          chk(lkb_hit && lkb_data == me[j].data, "lookup B data");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of the four-bank IMDB wrapper (two ranks x two banks,
// one IMDB plane per bank). Checks that commands reach only the addressed
// bank, that commands to different banks are accepted in consecutive cycles,
// that the output port carries every plane's rewrite requests tagged with the
// right bank under random back-pressure, that round-robin arbitration lets no
// bank wait more than BANKS-1 grants, that reads are steered by rd_bank, and
// that flush completes only after every bank has written back its lines.
module tb_imdb;
  import imdb_pkg::*;
  localparam int BANKS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, rd_hit, out_valid, out_ready = 1, flush_req = 0, flush_done;
  logic [1:0] cmd_bank, rd_bank, out_bank;
  addr_t cmd_addr, rd_addr;
  line_t cmd_new, cmd_old, rd_data;
  logic [BANKS-1:0] done_valid;
  result_e [BANKS-1:0] done_result;
  out_req_t out_req;

  imdb #(.INS_LOG2(0)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  // output monitor with random back-pressure
  int n_rw [BANKS] = '{default: 0};
  int n_wb [BANKS] = '{default: 0};
  int wait_grants [BANKS] = '{default: 0};
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (out_req.kind == OUT_REWRITE) begin
        n_rw[out_bank]++;
        // rewrite rows of bank b were built around row 100*(b+1)
        chk(out_req.addr.row == row_t'(100 * (int'(out_bank) + 1) - 1) ||
            out_req.addr.row == row_t'(100 * (int'(out_bank) + 1) + 1), "rewrite row matches bank");
      end else begin n_wb[out_bank]++; end
      for (int b = 0; b < BANKS; b++)
        if (b != int'(out_bank) && dut.p_out_valid[b]) begin
          wait_grants[b]++;
          chk(wait_grants[b] < BANKS, "round-robin starvation");
        end
      wait_grants[out_bank] = 0;
    end
    out_ready <= ($urandom % 4) != 0;
  end

  int n_done [BANKS] = '{default: 0};
  always @(posedge clk) for (int b = 0; b < BANKS; b++) if (done_valid[b]) begin n_done[b]++; end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int b, addr_t a, line_t nw, line_t od);
    @(negedge clk);
    cmd_valid = 1; cmd_bank = 2'(b); cmd_addr = a; cmd_new = nw; cmd_old = od;
    #1;
    while (!cmd_ready) @(negedge clk) #1;
    @(posedge clk) #1 cmd_valid = 0;
  endtask

  initial begin
    int acc_cyc [BANKS];
    int c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // one write per bank in consecutive cycles: all accepted back to back
    c = 0;
    for (int b = 0; b < BANKS; b++) begin
      @(negedge clk);
      cmd_valid = 1; cmd_bank = 2'(b); cmd_addr = '{row: row_t'(100 * (b + 1)), col: '0};
      cmd_new = '0; cmd_old = '1;
      #1 chk(cmd_ready, $sformatf("bank %0d ready while others busy", b));
    end
    @(negedge clk) cmd_valid = 0;
    repeat (4) @(posedge clk);
    for (int b = 0; b < BANKS; b++) chk(n_done[b] == 1, $sformatf("bank %0d done once", b));
    // promote one line in every bank (7 more writes each, interleaved)
    for (int k = 0; k < 7; k++)
      for (int b = 0; b < BANKS; b++)
        send(b, '{row: row_t'(100 * (b + 1)), col: '0}, '0, '1);
    repeat (20) @(posedge clk);
    for (int b = 0; b < BANKS; b++) begin
      chk(n_done[b] == 8, $sformatf("bank %0d done count %0d", b, n_done[b]));
      chk(n_rw[b] == 2, $sformatf("bank %0d rewrites %0d", b, n_rw[b]));
    end
    // reads are steered by rd_bank
    for (int b = 0; b < BANKS; b++) begin
      rd_bank = 2'(b);
      rd_addr = '{row: row_t'(100 * (b + 1)), col: '0};
      #1 chk(rd_hit && rd_data == '0, "read own bank");
      rd_addr = '{row: row_t'(100 * ((b + 1) % BANKS + 1)), col: '0};
      #1 chk(!rd_hit, "read other bank's line misses");
    end
    // flush: one write-back per bank
    @(negedge clk) flush_req = 1;
    c = 0;
    while (!flush_done && c < 200) begin @(posedge clk) #1; c++; end
    chk(flush_done, "flush done");
    for (int b = 0; b < BANKS; b++) chk(n_wb[b] == 1, $sformatf("bank %0d write-backs %0d", b, n_wb[b]));
    send(2, '{row: 5, col: 5}, '0, '1);
    chk(done_valid[2] && done_result[2] == RES_BYPASS, "bypass after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

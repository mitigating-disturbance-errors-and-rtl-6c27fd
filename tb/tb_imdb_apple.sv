// Self-checking test of AppLE: a model table answers the sampled reads; the
// test checks that the k-th sample lies in group k, that a round takes
// exactly ENTRIES/GROUP_SIZE enabled cycles (pauses do not count), and that
// the chosen victim is the best of the sampled entries (smallest maximum
// ZeroFlipCntr, then smallest RewriteCntr, invalid entries first).
module tb_imdb_apple;
  import imdb_pkg::*;

  localparam int ENTRIES = 256, GS = 8, NG = ENTRIES / GS;

  logic clk = 0, rst_n = 0, en = 0, restart = 0;
  logic [7:0] rd_idx, victim;
  logic rd_valid, done;
  zfc_t rd_zfc;
  rwc_t rd_rwc;
  int checks = 0, failures = 0;

  logic tvalid [ENTRIES];
  zfc_t tzfc [ENTRIES];
  rwc_t trwc [ENTRIES];

  assign rd_valid = tvalid[rd_idx];
  assign rd_zfc   = tzfc[rd_idx];
  assign rd_rwc   = trwc[rd_idx];

  imdb_apple #(.ENTRIES(ENTRIES), .GROUP_SIZE(GS)) dut (
    .clk, .rst_n, .en, .restart, .rd_idx, .rd_valid, .rd_zfc, .rd_rwc,
    .done, .victim_idx(victim));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int samples [NG];
    int cycles, best;
    for (int round = 0; round < 30; round++) begin
      for (int i = 0; i < ENTRIES; i++) begin
        tvalid[i] = (round % 5 == 4) ? ($urandom % 40 != 0) : 1'b1;
        tzfc[i]   = ZFC_W'((round % 3 == 0) ? $urandom % 4 : $urandom % 512);
        trwc[i]   = RWC_W'($urandom % 4);
      end
      if (round == 0) begin
        repeat (2) @(posedge clk);
        rst_n <= 1;
      end
      @(posedge clk);
      restart <= 1;
      @(posedge clk);
      restart <= 0;
      cycles = 0;
      for (int g = 0; g < NG; ) begin
        // random pauses
        en <= ($urandom % 4 != 0);
        #1;
        if (en) begin
          samples[g] = int'(rd_idx);
          chk(int'(rd_idx) / GS == g, $sformatf("sample %0d in group %0d", rd_idx, g));
          g++;
          cycles++;
        end
        @(posedge clk);
        #1;
        if (g < NG) chk(!done, "done too early");
      end
      en <= 0;
      #1;
      chk(done, "done after N_GROUPS enabled cycles");
      chk(cycles == NG, "cycle count");
      best = samples[0];
      for (int g = 1; g < NG; g++) begin
        automatic int s = samples[g];
        if (!tvalid[best]) ;
        else if (!tvalid[s]) best = s;
        else if (tzfc[s] < tzfc[best] || (tzfc[s] == tzfc[best] && trwc[s] < trwc[best])) best = s;
      end
      chk(int'(victim) == best, $sformatf("victim %0d expected %0d", victim, best));
      // stays done while enabled
      en <= 1;
      @(posedge clk);
      #1;
      chk(done && int'(victim) == best, "victim held");
      en <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

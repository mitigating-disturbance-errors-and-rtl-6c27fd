// Self-checking test of the RMW address decoder (a lookup table:
// tag compare, one-hot match, index OR-mux, found flag). A reduced 64-slot
// instance is driven with random allocations and re-allocations, and every
// cycle a random page (either resident or not) is looked up and compared with
// a reference map. The lookup is combinational, so the result is checked in
// the same cycle; a write becomes visible after the clock edge.
module tb_rmw_addr_decoder;
  import rmw_pkg::*;
  localparam int N = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  page_t lk_page, wr_page;
  logic found, wr_en = 0;
  logic [5:0] index, wr_slot;

  rmw_addr_decoder #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  page_t slot_page [N];
  bit    slot_used [N];
  int    page_slot [page_t];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) slot_used[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // lookup check
      if ($urandom % 2 == 1 && page_slot.num() > 0) begin
        automatic page_t k;
        automatic int skip = int'($urandom % page_slot.num());
        void'(page_slot.first(k));
        repeat (skip) void'(page_slot.next(k));
        lk_page = k;
      end else lk_page = page_t'($urandom % 256);
      #1;
      checks++;
      if (page_slot.exists(lk_page)) begin
        if (!found || int'(index) != page_slot[lk_page]) begin
          failures++;
          $display("FAIL page %0h: found=%0d index=%0d expected %0d", lk_page, found, index, page_slot[lk_page]);
        end
      end else if (found) begin
        failures++;
        $display("FAIL page %0h found but not resident", lk_page);
      end
      // random allocation: evict the slot's old page, map a new page
      wr_en = ($urandom % 3) == 0;
      if (wr_en) begin
        wr_slot = 6'($urandom);
        do wr_page = page_t'($urandom % 256); while (page_slot.exists(wr_page));
        if (slot_used[wr_slot]) page_slot.delete(slot_page[wr_slot]);
        slot_used[wr_slot] = 1;
        slot_page[wr_slot] = wr_page;
        page_slot[wr_page] = int'(wr_slot);
      end
      @(posedge clk) #1 wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

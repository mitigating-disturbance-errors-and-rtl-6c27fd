// Self-checking test of the eight integrated counters: random and corner
// old/new line pairs, both modes (zero count of new data, 1-to-0 flip
// count), compared with a bit-by-bit reference.
module tb_imdb_integrated_counter;
  import imdb_pkg::*;

  line_t old_d, new_d;
  logic  newly;
  pop_t [WORDS-1:0] cnt;
  int checks = 0, failures = 0;

  imdb_integrated_counter dut (.old_data(old_d), .new_data(new_d), .newly_inserted(newly), .count(cnt));

  function automatic int ref_count(line_t o, line_t n, logic ins, int w);
    int c = 0;
    for (int b = 0; b < WORD_W; b++) begin
      if (ins) c += (n[w*WORD_W+b] == 1'b0) ? 1 : 0;
      else     c += (o[w*WORD_W+b] == 1'b1 && n[w*WORD_W+b] == 1'b0) ? 1 : 0;
    end
    return c;
  endfunction

  task automatic check_now();
    #1;
    for (int w = 0; w < WORDS; w++) begin
      checks++;
      if (int'(cnt[w]) != ref_count(old_d, new_d, newly, w)) begin
        failures++;
        $display("FAIL word %0d newly=%0b got %0d exp %0d", w, newly, cnt[w],
                 ref_count(old_d, new_d, newly, w));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners: all ones -> all zeros gives 64 flips per word
    old_d = '1; new_d = '0; newly = 0; check_now();
    newly = 1; check_now();
    old_d = '0; new_d = '1; newly = 0; check_now();
    newly = 1; check_now();
    for (int i = 0; i < 400; i++) begin
      for (int k = 0; k < LINE_W / 32; k++) begin
        old_d[k*32 +: 32] = $urandom;
        new_d[k*32 +: 32] = $urandom;
      end
      newly = i[0];
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

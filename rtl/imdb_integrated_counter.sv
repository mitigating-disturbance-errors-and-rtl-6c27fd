// Integrated counters of the IMDB main table (eight of them, one per 64-bit
// word of a 64 B line).
//
// Each counter either counts the zeros of the new data word (when the line is
// newly inserted into the main table: the "prior knowledge" that initialises
// ZeroFlipCntr) or counts the 1-to-0 bit flips between the old and the new
// data word (when the line hits in the table). Both are done by one zero
// counter: a flip position is old=1/new=0, i.e. a zero of (~old | new), so a
// 2:1 multiplexer in front of the counter selects either the new data or that
// combination. The original block diagram labels the output 6 bits; a word can hold
// 64 zeros, so this design uses 7 bits.
// Purely combinational; the result is valid in the same cycle.
module imdb_integrated_counter
  import imdb_pkg::*;
(
  input  line_t               old_data,
  input  line_t               new_data,
  input  logic                newly_inserted,
  output pop_t [WORDS-1:0]    count
);

  always_comb begin
    for (int w = 0; w < WORDS; w++) begin
      logic [WORD_W-1:0] sel;
      logic [POP_W-1:0]  zeros;
      sel = newly_inserted ? new_data[w*WORD_W +: WORD_W]
                           : (~old_data[w*WORD_W +: WORD_W] | new_data[w*WORD_W +: WORD_W]);
      zeros = '0;
      for (int b = 0; b < WORD_W; b++) zeros += {{(POP_W-1){1'b0}}, ~sel[b]};
      count[w] = zeros;
    end
  end

endmodule

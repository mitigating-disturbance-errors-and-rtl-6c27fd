// Synchronous first-in first-out queue with a valid/ready interface on both
// sides, used for the output queue of an IMDB plane and the queues of the
// RMW front end.
//
// `T` is the element type and DEPTH the number of elements (a power of two).
// A push is accepted when `in_ready` is high; the head element is shown on
// `out_data` while `out_valid` is high and leaves when `out_ready` is high.
// A push and a pop may happen in the same cycle. `count` gives the current
// occupancy. Reset empties the queue; the storage itself is not reset.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  T                         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output T                         out_data,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem_q [DEPTH];
  logic [PW-1:0]   wp_q, rp_q;
  logic [$clog2(DEPTH):0] cnt_q;

  logic push, pop;
  assign in_ready  = (cnt_q != ($clog2(DEPTH)+1)'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem_q[rp_q];
  assign count     = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wp_q <= (DEPTH > 1) ? PW'(wp_q + 1'b1) : '0;
      if (pop)  rp_q <= (DEPTH > 1) ? PW'(rp_q + 1'b1) : '0;
      cnt_q <= cnt_q + ($clog2(DEPTH)+1)'(push) - ($clog2(DEPTH)+1)'(pop);
      // The occupancy never exceeds the depth.
      assert (cnt_q <= ($clog2(DEPTH)+1)'(DEPTH));
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wp_q] <= in_data;
  end

endmodule

// End-to-end test of pcm_controller_top at the full size of the design, with
// no parameter overrides: 32K-entry RMW cache, 4 banks of 256-entry main
// tables and 8-entry barrier buffers, threshold 511, insertion probability
// 1/128. The cold line range is large enough that every main table fills and
// AppLE replacement happens. The test body is tb/pcm_top_test.svh.
module tb_pcm_controller_top_full;
  import imdb_pkg::*;
  import rmw_pkg::*;
  localparam int RMW_N = 32768, NPAGES = 64, N_HOST = 2000, N_WR = 300000, COLD = 12000, HOT = 12,
             HOT_IN4 = 1;

  `include "pcm_top_test.svh"

  pcm_controller_top dut (.*);
endmodule

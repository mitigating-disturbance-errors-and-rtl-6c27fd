// End-to-end test of pcm_controller_top at reduced size: 8-entry RMW cache
// (frequent replacement), 16-entry main tables (2 AppLE groups), threshold
// 127 and insertion probability 1/4, so that every mechanism happens many
// times in a short run. The test body is tb/pcm_top_test.svh.
module tb_pcm_controller_top;
  import imdb_pkg::*;
  import rmw_pkg::*;
  localparam int RMW_N = 8, NPAGES = 24, N_HOST = 3000, N_WR = 6000, COLD = 400, HOT = 12,
             HOT_IN4 = 2;

  `include "pcm_top_test.svh"

  pcm_controller_top #(
    .RMW_ENTRIES(RMW_N), .MT_ENTRIES(16), .THRESHOLD(127), .INS_LOG2(2)
  ) dut (.*);
endmodule

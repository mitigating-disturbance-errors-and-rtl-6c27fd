// Shared constants and types of the read-modify-write (RMW) front end.
//
// The host (last-level cache) works in 64 B blocks; the PCM transaction unit
// (page) is larger, 256 B in the configuration used here, so one page holds
// four blocks. Host addresses are given in block units: the upper bits select
// the page, the low bits the block offset inside the page. The 25-bit page
// address covers 8 GB of PCM with 256 B pages; the 8-bit request ID is a
// choice of this design.
package rmw_pkg;

  localparam int unsigned BLK_W   = 512;   // one 64 B block
  localparam int unsigned ID_W    = 8;     // host request ID
  localparam int unsigned PADDR_W = 25;    // page address (8 GB / 256 B)

  typedef logic [BLK_W-1:0]   blk_t;
  typedef logic [ID_W-1:0]    id_t;
  typedef logic [PADDR_W-1:0] page_t;

  // Original command type, kept as the T-bit of a block field
  // (the "WAS WRITE" flag of the read request generator).
  typedef enum logic { CMD_READ = 1'b0, CMD_WRITE = 1'b1 } cmd_e;

endpackage

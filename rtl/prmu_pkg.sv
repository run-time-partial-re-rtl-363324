// prmu_pkg: constants and the state type shared by the partial re-configuration
// management unit (PRMU).
//
// The widths follow the design description: the bitstream travels through the
// handshaking chain as 32-bit words, the Virtex-II Pro ICAP takes bytes, the
// arbiter supplies a 24-bit bitstream address and the repository stores the
// bitstream behind a 64-bit length word that counts 32-bit words. Off-chip
// bursts are 16 bus words long.
package prmu_pkg;

  localparam int unsigned BS_WORD_W   = 32;  // bitstream word width
  localparam int unsigned ICAP_W      = 8;   // Virtex-II Pro ICAP data width
  localparam int unsigned ADDR_W      = 24;  // bitstream start address width
  localparam int unsigned LEN_W       = 64;  // length field width (number of 32-bit words)
  localparam int unsigned BURST_LEN   = 16;  // off-chip burst length in bus words
  localparam int unsigned BUS_W       = 64;  // processor local bus data width
  localparam int unsigned FIFO_DEPTH  = 32;  // off-chip FIFO: two bursts
  localparam int unsigned BRAM_AW     = 14;  // on-chip repository: 16384 words
  localparam int unsigned STATUS_BYTES = 4;  // status bytes read back on abort

  // Main controller states of the re-configuration controller.
  typedef enum logic [2:0] {
    MC_IDLE   = 3'd0,
    MC_INIT   = 3'd1,
    MC_NORMAL = 3'd2,
    MC_ABORT  = 3'd3
  } mc_state_e;


endpackage

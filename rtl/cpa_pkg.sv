// cpa_pkg: constants and types shared by the stream cache and the
// background memory arbiter of the coprocessor array (CPA).
//
// Numbers that come from the design description: 20 streams, 5 bus ports,
// 16-bit bus words, 128-bit cache words, a 32-bit SDRAM with 64-byte
// (16-word) bursts, and a service cycle of N = 1024 clock cycles with
// R = N/2 cycles for random traffic. The cache size of 80 lines of 64 bytes
// (5 kB) is the amount of buffering the description derives for 20 streams.
// Everything else here (encodings, address width) is this design's choice.
// Not every module uses every constant (some only document the line
// geometry), so a lint tool that checks a module on its own reports the
// others as unused; that warning is expected.
package cpa_pkg;

  // Stream and port counts
  localparam int unsigned NUM_STREAMS = 20;
  localparam int unsigned NUM_PORTS   = 5;

  // Data widths
  localparam int unsigned BUS_W   = 16;    // switch matrix bus word
  localparam int unsigned CWORD_W = 128;   // cache word
  localparam int unsigned SD_W    = 32;    // SDRAM word

  // Geometry of one cache line = one SDRAM burst of 64 bytes
  localparam int unsigned LINE_BYTES     = 64;
  localparam int unsigned CWORDS_PER_LINE = LINE_BYTES * 8 / CWORD_W;  // 4
  localparam int unsigned SDWORDS_PER_LINE = LINE_BYTES * 8 / SD_W;    // 16
  localparam int unsigned BUSWORDS_PER_CWORD = CWORD_W / BUS_W;        // 8

  // Cache size: 20 streams x 256 bytes = 5 kB = 80 lines
  localparam int unsigned NUM_LINES = 80;

  // Background memory byte address width (32-bit word SDRAM, 64 MB space)
  localparam int unsigned MADDR_W = 26;

  // Service cycle of the level-1 arbiter
  localparam int unsigned SC_N = 1024;
  localparam int unsigned SC_M = 512;

  // Direction of a stream as seen from the background memory
  typedef enum logic {
    DIR_TO_MEM   = 1'b0,   // coprocessor writes, cache writes bursts to SDRAM
    DIR_FROM_MEM = 1'b1    // cache prefetches bursts, coprocessor reads
  } stream_dir_e;

  // Linked list commands
  typedef enum logic [1:0] {
    LL_ALLOC   = 2'd0,     // take lines from the head of the free list
    LL_APPEND  = 2'd1,     // release a stream's lines to the tail of the free list
    LL_PREPEND = 2'd2      // release a stream's lines to the head of the free list
  } ll_op_e;

  // Stream configuration commands on the control bus
  typedef enum logic {
    CFG_OPEN  = 1'b0,
    CFG_CLOSE = 1'b1
  } cfg_op_e;

  // Requesters of the background memory (leaves of the arbitration tree)
  typedef enum logic [2:0] {
    SRC_NONE   = 3'd0,
    SRC_DBG    = 3'd1,   // debugger
    SRC_CPU    = 3'd2,   // CPU and peripherals
    SRC_GFX    = 3'd3,   // graphics accelerator
    SRC_STREAM = 3'd4,   // periodic run-time streams of the stream cache
    SRC_CFG    = 3'd5,   // configuration-time control
    SRC_RTC    = 3'd6    // run-time parameter / instruction requests
  } mem_src_e;

endpackage

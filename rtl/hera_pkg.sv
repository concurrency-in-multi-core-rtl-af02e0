// hera_pkg: constants shared by the four-core HERA memory system.
//
// The system joins four HERA cores to one single-port RAM. A rotating
// two-bit pointer decides which core may use the memory bus when two or more
// cores want it, and the losers are halted by holding their clock high. An
// optional transactional-memory unit per core keeps tentative stores in a
// small fully associative cache and writes them back on commit.
//
// Core count, 16-bit address and data, and the TRST/TREND instruction words
// follow the design description. The transactional cache size (16 entries)
// is one of the two sizes the description suggests; this design picks the
// larger one.
package hera_pkg;

  // Four cores share the memory bus.
  localparam int unsigned NUM_CORES = 4;
  // Width of the rotating core-select pointer.
  localparam int unsigned SEL_W = $clog2(NUM_CORES);
  // HERA is a 16-bit machine: 16-bit addresses and 16-bit data words.
  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 16;

  // Transactional-memory instruction words.
  localparam logic [15:0] OP_TRST  = 16'h1112;  // transaction start
  localparam logic [15:0] OP_TREND = 16'h1113;  // transaction end (commit)

  // Entries in each core's transactional cache (16 words of 16 bits).
  localparam int unsigned TC_ENTRIES = 16;
  // A transaction is attempted at most this many times.
  localparam int unsigned MAX_ATTEMPTS = 3;

endpackage

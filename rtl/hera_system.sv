// hera_system: four HERA cores' memory system with transactional memory.
//
// Contents: the main RAM, one instruction ROM per core, the hera_multicore
// wrapper (bus arbitrator plus one stop_clock per core) and one tm_unit per
// core between the core's memory port and the arbitrator. The cores
// themselves are not part of this module: each core's ports appear here as
// arrays indexed by core number 0..3.
//
// Per core n:
//   core_pc[n]       in   program counter (ADD_INDEX); core_instr[n] is the
//                         ROM word at that address
//   core_addr/read/write/wdata[n]  in   the core's memory request
//   core_rdata[n]    out  load data, valid at the core's next clock edge
//   core_clock[n]    out  the core's clock: the system clock, held high while
//                         the core lost arbitration or its tm_unit holds it
//   tx_flag/abort/fail/exception[n]  out  transaction status (see tm_unit)
// System: clock, reset (asynchronous, active high), and the RAM bus and
// arbitration state brought out for observation.
//
// Timing: everything is clocked by the rising edge of `clock`; a core's clock
// rises with it unless held. A memory access completes at the first rising
// edge at which the core owns the bus: one cycle without contention, at most
// NUM_CORES cycles with all cores contending. The only addition to the clock
// path beyond the stop_clock is the tm_unit's hold, ORed in the same way.
module hera_system #(
  parameter int unsigned NUM_CORES  = hera_pkg::NUM_CORES,
  parameter int unsigned ADDR_W     = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W     = hera_pkg::DATA_W,
  parameter int unsigned TC_ENTRIES = hera_pkg::TC_ENTRIES,
  localparam int unsigned SEL_W = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic                             clock,
  input  logic                             reset,
  // cores
  input  logic [NUM_CORES-1:0][ADDR_W-1:0] core_pc,
  output logic [NUM_CORES-1:0][15:0]       core_instr,
  input  logic [NUM_CORES-1:0][ADDR_W-1:0] core_addr,
  input  logic [NUM_CORES-1:0]             core_read,
  input  logic [NUM_CORES-1:0]             core_write,
  input  logic [NUM_CORES-1:0][DATA_W-1:0] core_wdata,
  output logic [NUM_CORES-1:0][DATA_W-1:0] core_rdata,
  output logic [NUM_CORES-1:0]             core_clock,
  output logic [NUM_CORES-1:0]             tx_flag,
  output logic [NUM_CORES-1:0]             tx_abort,
  output logic [NUM_CORES-1:0]             tx_fail,
  output logic [NUM_CORES-1:0]             tx_exception,
  // observation
  output logic [ADDR_W-1:0]                ram_addr,
  output logic                             ram_read,
  output logic                             ram_write,
  output logic [DATA_W-1:0]                ram_wdata,
  output logic [DATA_W-1:0]                ram_rdata,
  output logic [SEL_W-1:0]                 cpu_select,
  output logic                             two_or_more,
  output logic [NUM_CORES-1:0]             grant,
  output logic [NUM_CORES-1:0]             core_stop,
  output logic [NUM_CORES-1:0]             tx_committing
);

  logic [NUM_CORES-1:0][ADDR_W-1:0] bus_addr;
  logic [NUM_CORES-1:0]             bus_read, bus_write;
  logic [NUM_CORES-1:0][DATA_W-1:0] bus_wdata, bus_rdata;
  logic [NUM_CORES-1:0]             mc_clock, hold, snoop_hit;

  main_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clock (clock),
    .addr  (ram_addr),
    .read  (ram_read),
    .write (ram_write),
    .wdata (ram_wdata),
    .rdata (ram_rdata)
  );

  hera_multicore #(.NUM_CORES(NUM_CORES), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mc (
    .clock       (clock),
    .reset       (reset),
    .cpu_addr    (bus_addr),
    .cpu_read    (bus_read),
    .cpu_write   (bus_write),
    .cpu_wdata   (bus_wdata),
    .cpu_rdata   (bus_rdata),
    .core_clock  (mc_clock),
    .core_stop   (core_stop),
    .mem_addr    (ram_addr),
    .mem_read    (ram_read),
    .mem_write   (ram_write),
    .mem_wdata   (ram_wdata),
    .mem_rdata   (ram_rdata),
    .cpu_select  (cpu_select),
    .two_or_more (two_or_more),
    .grant       (grant)
  );

  for (genvar n = 0; n < NUM_CORES; n++) begin : g_core
    instruction_rom #(.ADDR_W(ADDR_W), .DATA_W(16)) u_rom (
      .addr  (core_pc[n]),
      .instr (core_instr[n])
    );

    tm_unit #(.ENTRIES(TC_ENTRIES), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_tm (
      .clock      (clock),
      .reset      (reset),
      .instr      (core_instr[n]),
      .core_addr  (core_addr[n]),
      .core_read  (core_read[n]),
      .core_write (core_write[n]),
      .core_wdata (core_wdata[n]),
      .core_rdata (core_rdata[n]),
      .core_stop  (core_stop[n]),
      .hold       (hold[n]),
      .tflag      (tx_flag[n]),
      .aborted    (tx_abort[n]),
      .fail       (tx_fail[n]),
      .exception  (tx_exception[n]),
      .committing (tx_committing[n]),
      .bus_addr   (bus_addr[n]),
      .bus_read   (bus_read[n]),
      .bus_write  (bus_write[n]),
      .bus_wdata  (bus_wdata[n]),
      .bus_rdata  (bus_rdata[n]),
      .grant      (grant[n]),
      .snp_addr   (ram_addr),
      .snp_read   (ram_read),
      .snp_write  (ram_write),
      .snoop_hit  (snoop_hit[n]),
      .conflict   (|(snoop_hit & ~(NUM_CORES'(1) << n)))
    );

    // Held cores see no rising edge (clock ORed with the hold, as in stop_clock).
    assign core_clock[n] = mc_clock[n] | hold[n];
  end

endmodule

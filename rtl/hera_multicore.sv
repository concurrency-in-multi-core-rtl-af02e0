// hera_multicore: the four-core wrapper around the shared memory bus, without
// the cores themselves.
//
// One bus_arbitrator joins the cores' memory ports to the RAM bus, and one
// stop_clock per core derives that core's clock from the system clock: a
// core that requests the bus while another core owns it gets no rising clock
// edge until the rotating pointer names it. Core n has the constant number n
// (0..3) on its stop_clock. The cores are outside this module: their memory
// ports come in, and their clocks (core_clock) and read data go out.
//
// Timing: requests are sampled during the low half of the clock; the owning
// core's access completes at the next rising edge of `clock`, which is also
// the core's own clock edge. Uncontended accesses take one cycle; with all
// four cores contending, an access takes at most four cycles.
module hera_multicore #(
  parameter int unsigned NUM_CORES = hera_pkg::NUM_CORES,
  parameter int unsigned ADDR_W    = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W    = hera_pkg::DATA_W,
  localparam int unsigned SEL_W = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic                             clock,
  input  logic                             reset,
  // core memory ports
  input  logic [NUM_CORES-1:0][ADDR_W-1:0] cpu_addr,
  input  logic [NUM_CORES-1:0]             cpu_read,
  input  logic [NUM_CORES-1:0]             cpu_write,
  input  logic [NUM_CORES-1:0][DATA_W-1:0] cpu_wdata,
  output logic [NUM_CORES-1:0][DATA_W-1:0] cpu_rdata,
  // core clocks and halt status
  output logic [NUM_CORES-1:0]             core_clock,
  output logic [NUM_CORES-1:0]             core_stop,
  // RAM bus
  output logic [ADDR_W-1:0]                mem_addr,
  output logic                             mem_read,
  output logic                             mem_write,
  output logic [DATA_W-1:0]                mem_wdata,
  input  logic [DATA_W-1:0]                mem_rdata,
  // arbitration state
  output logic [SEL_W-1:0]                 cpu_select,
  output logic                             two_or_more,
  output logic [NUM_CORES-1:0]             grant
);

  bus_arbitrator #(.NUM_CORES(NUM_CORES), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_arb (
    .clock       (clock),
    .reset       (reset),
    .cpu_addr    (cpu_addr),
    .cpu_read    (cpu_read),
    .cpu_write   (cpu_write),
    .cpu_wdata   (cpu_wdata),
    .cpu_rdata   (cpu_rdata),
    .mem_addr    (mem_addr),
    .mem_read    (mem_read),
    .mem_write   (mem_write),
    .mem_wdata   (mem_wdata),
    .mem_rdata   (mem_rdata),
    .cpu_select  (cpu_select),
    .two_or_more (two_or_more),
    .grant       (grant)
  );

  for (genvar n = 0; n < NUM_CORES; n++) begin : g_stop
    stop_clock #(.SEL_W(SEL_W)) u_stop (
      .clock_in    (clock),
      .read        (cpu_read[n]),
      .write       (cpu_write[n]),
      .two_or_more (two_or_more),
      .cpu_num     (SEL_W'(n)),
      .cpu_select  (cpu_select),
      .clock_out   (core_clock[n]),
      .stop        (core_stop[n])
    );
  end

endmodule

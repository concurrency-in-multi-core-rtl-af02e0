// bus_arbitrator: lets four cores share one single-port RAM.
//
// Each core offers ADDRESS, READ, WRITE and a data port. When at most one
// core requests the bus it is connected straight through. When two or more
// request it, only the core named by the rotating pointer cpu_select is
// connected; the others must be halted by their stop_clock until the pointer
// reaches them. The pointer advances by one on every clock edge regardless of
// requests, so a core waits at most NUM_CORES - 1 cycles.
//
// Built from the pieces of the original: two_or_more (contention flag),
// cpu_select_counter (rotating pointer), arb_enable (per-core enable) and
// data_select (address mux and data steering). cpu_select and two_or_more are
// brought out for the stop-clock logic; `grant` (the per-core enables) is an
// extra output of this design for units that need to know who owns the bus.
// The RAM side is combinational from the core side; only the pointer is
// registered.
module bus_arbitrator #(
  parameter int unsigned NUM_CORES = hera_pkg::NUM_CORES,
  parameter int unsigned ADDR_W    = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W    = hera_pkg::DATA_W,
  localparam int unsigned SEL_W = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic                             clock,
  input  logic                             reset,
  // core side
  input  logic [NUM_CORES-1:0][ADDR_W-1:0] cpu_addr,
  input  logic [NUM_CORES-1:0]             cpu_read,
  input  logic [NUM_CORES-1:0]             cpu_write,
  input  logic [NUM_CORES-1:0][DATA_W-1:0] cpu_wdata,
  output logic [NUM_CORES-1:0][DATA_W-1:0] cpu_rdata,
  // RAM side
  output logic [ADDR_W-1:0]                mem_addr,
  output logic                             mem_read,
  output logic                             mem_write,
  output logic [DATA_W-1:0]                mem_wdata,
  input  logic [DATA_W-1:0]                mem_rdata,
  // to the stop-clock logic
  output logic [SEL_W-1:0]                 cpu_select,
  output logic                             two_or_more,
  output logic [NUM_CORES-1:0]             grant
);

  logic [NUM_CORES-1:0] rw;
  logic [NUM_CORES-1:0] rdata_oe;
  logic                 wdata_oe;

  assign rw = cpu_read | cpu_write;

  two_or_more #(.NUM_CORES(NUM_CORES)) u_two (
    .rw          (rw),
    .flag (two_or_more)
  );

  cpu_select_counter #(.NUM_CORES(NUM_CORES)) u_sel (
    .clock  (clock),
    .reset  (reset),
    .select (cpu_select)
  );

  arb_enable #(.NUM_CORES(NUM_CORES)) u_en (
    .rw          (rw),
    .two_or_more (two_or_more),
    .cpu_select  (cpu_select),
    .enable      (grant)
  );

  data_select #(.NUM_CORES(NUM_CORES), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_data (
    .enable       (grant),
    .cpu_addr     (cpu_addr),
    .cpu_read     (cpu_read),
    .cpu_write    (cpu_write),
    .cpu_wdata    (cpu_wdata),
    .cpu_rdata    (cpu_rdata),
    .cpu_rdata_oe (rdata_oe),
    .mem_addr     (mem_addr),
    .mem_read     (mem_read),
    .mem_write    (mem_write),
    .mem_wdata    (mem_wdata),
    .mem_wdata_oe (wdata_oe),
    .mem_rdata    (mem_rdata)
  );

endmodule

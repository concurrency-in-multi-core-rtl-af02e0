// data_select: address multiplexer and bidirectional data steering between
// the cores' memory ports and the single RAM bus.
//
// The original circuit joins each core's bidirectional DATA_N line to the
// shared DATA line through a pair of tri-state buffers facing opposite ways,
// one pair per core, and enables the buffers with the arbitration enables.
// Inside a chip this design keeps the two directions as separate nets with
// explicit drive enables instead of tri-state wires:
//   - towards the RAM, DATA carries DATA_N of the enabled core when that
//     core writes (mem_wdata, mem_wdata_oe);
//   - towards core N, DATA_N carries the RAM's DATA when core N is enabled
//     and reads (cpu_rdata[N], cpu_rdata_oe[N]); other cores see zero.
// The address, READ and WRITE lines to the RAM come from the enabled core, and
// are zero when no core is enabled. Purely combinational; `enable` must be
// one-hot or zero.
module data_select #(
  parameter int unsigned NUM_CORES = hera_pkg::NUM_CORES,
  parameter int unsigned ADDR_W    = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W    = hera_pkg::DATA_W
) (
  input  logic [NUM_CORES-1:0]             enable,
  // core side
  input  logic [NUM_CORES-1:0][ADDR_W-1:0] cpu_addr,
  input  logic [NUM_CORES-1:0]             cpu_read,
  input  logic [NUM_CORES-1:0]             cpu_write,
  input  logic [NUM_CORES-1:0][DATA_W-1:0] cpu_wdata,
  output logic [NUM_CORES-1:0][DATA_W-1:0] cpu_rdata,
  output logic [NUM_CORES-1:0]             cpu_rdata_oe,
  // RAM side
  output logic [ADDR_W-1:0]                mem_addr,
  output logic                             mem_read,
  output logic                             mem_write,
  output logic [DATA_W-1:0]                mem_wdata,
  output logic                             mem_wdata_oe,
  input  logic [DATA_W-1:0]                mem_rdata
);

  always_comb begin
    mem_addr  = '0;
    mem_read  = 1'b0;
    mem_write = 1'b0;
    mem_wdata = '0;
    for (int unsigned n = 0; n < NUM_CORES; n++) begin
      if (enable[n]) begin
        mem_addr  = mem_addr  | cpu_addr[n];
        mem_read  = mem_read  | cpu_read[n];
        mem_write = mem_write | cpu_write[n];
      end
      if (enable[n] && cpu_write[n])
        mem_wdata = mem_wdata | cpu_wdata[n];
      cpu_rdata_oe[n] = enable[n] && cpu_read[n];
      cpu_rdata[n]    = cpu_rdata_oe[n] ? mem_rdata : '0;
    end
    mem_wdata_oe = mem_write;
  end

endmodule

// main_ram: the single-port main memory shared by all cores.
//
// 2**ADDR_W words of DATA_W bits (64K x 16 by default, the full HERA address
// space). A write stores `wdata` at `addr` on the rising clock edge while
// `write` is high; a read is asynchronous: `rdata` always shows the word at
// `addr`. Only one port exists, which is why the cores need a bus
// arbitrator. The memory is not reset; its contents are undefined until
// written. The edge-triggered write and asynchronous read are this design's
// choice.
module main_ram #(
  parameter int unsigned ADDR_W = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W = hera_pkg::DATA_W
) (
  input  logic              clock,
  input  logic [ADDR_W-1:0] addr,
  input  logic              read,
  input  logic              write,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clock) begin
    if (write)
      mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

  // READ and WRITE are never asserted together by the arbitrator.
  always_comb assert (!(read && write));

endmodule

// arb_enable: per-core bus enable of the bus arbitrator.
//
// Core n may drive the memory bus when it is reading or writing and either
// no other core is (two_or_more low) or the rotating pointer names it:
//   enable[n] = rw[n] & (~two_or_more | cpu_select == n)
// At most one enable is high in any cycle. The same enables steer the address
// multiplexer and the bidirectional data path. Purely combinational.
module arb_enable #(
  parameter int unsigned NUM_CORES = hera_pkg::NUM_CORES,
  localparam int unsigned SEL_W = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic [NUM_CORES-1:0] rw,
  input  logic                 two_or_more,
  input  logic [SEL_W-1:0]     cpu_select,
  output logic [NUM_CORES-1:0] enable
);

  always_comb begin
    for (int unsigned n = 0; n < NUM_CORES; n++)
      enable[n] = (rw[n] && !two_or_more) || (rw[n] && (cpu_select == SEL_W'(n)));
  end

  // Only one core owns the bus at a time.
  always_comb assert ($onehot0(enable));

endmodule

// cpu_select_counter: the rotating priority pointer of the bus arbitrator.
//
// A register of SEL_W bits feeds an adder whose other operand is the constant
// one; the sum is loaded back on every rising clock edge, so the pointer
// visits core 0, 1, 2, 3, 0, ... one core per clock cycle whether or not any
// core wants the bus. RESET clears the register asynchronously, as the clear
// pin of the original register does. The register is always enabled.
// With a core count that is not a power of two the pointer wraps at
// NUM_CORES - 1 (a generalisation; the described design has four cores).
module cpu_select_counter #(
  parameter int unsigned NUM_CORES = hera_pkg::NUM_CORES,
  localparam int unsigned SEL_W = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic             clock,
  input  logic             reset,
  output logic [SEL_W-1:0] select
);

  always_ff @(posedge clock or posedge reset) begin
    if (reset)
      select <= '0;
    else if (select == SEL_W'(NUM_CORES - 1))
      select <= '0;
    else
      select <= select + SEL_W'(1);
  end

endmodule

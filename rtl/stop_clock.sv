// stop_clock: halts a core that lost bus arbitration by holding its clock
// high.
//
//   alpha     = (read | write) & two_or_more & (cpu_num != cpu_select)
//   clock_out = clock_in | alpha
//
// While alpha is high the core's clock stays high, so the core sees no rising
// edge and simply stretches its current instruction (a memory access) until
// the rotating pointer reaches it. Because the clock is ORed (not ANDed), alpha
// may change freely while clock_in is high without producing an edge: alpha
// only has to settle within the high half of the clock period. All inputs
// change just after a rising edge of clock_in (the pointer is registered on
// that edge, requests come from cores clocked by it), so clock_out has no
// spurious edges. cpu_num is a constant per core (0..3).
//
// `stop` (alpha itself) is an extra output of this design that tells other
// logic the core will not advance at the next edge.
module stop_clock #(
  parameter int unsigned SEL_W = hera_pkg::SEL_W
) (
  input  logic             clock_in,
  input  logic             read,
  input  logic             write,
  input  logic             two_or_more,
  input  logic [SEL_W-1:0] cpu_num,
  input  logic [SEL_W-1:0] cpu_select,
  output logic             clock_out,
  output logic             stop
);

  logic rw;
  logic not_selected;

  assign rw           = read | write;
  assign not_selected = (cpu_num != cpu_select);
  assign stop         = rw & two_or_more & not_selected;
  // Intentional clock gating: this is the halting mechanism of the design.
  assign clock_out    = clock_in | stop;

endmodule

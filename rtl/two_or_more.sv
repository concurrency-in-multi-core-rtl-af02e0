// two_or_more: flags that two or more cores request the memory bus.
//
// Input bit n of `rw` is set when core n is reading or writing main memory.
// The output `flag` is high whenever more than one bit is set; zero requests and
// exactly one request (the one-hot patterns) give a low output. The original
// circuit uses a 16-input multiplexer addressed by the four request bits with
// its data inputs tied to the truth table; here the same table is produced by
// clearing the lowest set bit and testing what remains, which scales to any
// core count. Purely combinational.
module two_or_more #(
  parameter int unsigned NUM_CORES = hera_pkg::NUM_CORES
) (
  input  logic [NUM_CORES-1:0] rw,
  output logic                 flag
);

  // rw & (rw - 1) removes the lowest set bit; anything left means a second
  // request.
  assign flag = |(rw & (rw - NUM_CORES'(1)));

endmodule

// associative_memory_cell: one bit of content-addressable memory.
//
// A flip-flop holds the stored bit. It is loaded from `d` at a rising clock
// edge while the write enable `we` and the word select `s` are both high, and
// cleared asynchronously by `reset`. The bit is read out on `q` only while the
// word is selected (q = stored & s), so the q outputs of many words can be
// ORed onto one read bus. For search, the stored bit is compared with the key
// bit `k` wherever the mask bit `mk` is high; `m` flags a mismatch
// (m = mk & (k != stored)). A word matches its key when none of its cells
// flags a mismatch.
//
// Departure from the classic cell: the classic cell compares the stored bit
// with its data input; here the search key has its own input `k`, so one
// word can be written while another address is searched. Tying k to d gives
// the classic cell. The mismatch polarity of `m` is this design's choice.
module associative_memory_cell (
  input  logic clock,
  input  logic reset,
  input  logic d,
  input  logic k,
  input  logic we,
  input  logic mk,
  input  logic s,
  output logic q,
  output logic m
);

  logic stored;

  always_ff @(posedge clock or posedge reset) begin
    if (reset)
      stored <= 1'b0;
    else if (we && s)
      stored <= d;
  end

  assign q = stored & s;
  assign m = mk & (k ^ stored);

endmodule

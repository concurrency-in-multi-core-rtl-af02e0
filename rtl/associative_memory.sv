// associative_memory: a WORDS x WIDTH array of associative_memory_cell.
//
// Writing: on a rising clock edge with `we` high, every word whose select
// line s[i] is high loads `d`. Reading: `q` is the OR of the selected words
// (one select line high gives that word). Searching: every word compares
// itself with the key `k` in the bit positions where the mask `mk` is high,
// all words in parallel; m[i] is high when word i mismatches in any masked
// position, so ~m marks the matching words. `reset` clears every cell.
// The default size, 4 words of 4 bits, is the example array of the design
// description; the transactional cache uses 16 words of 16 bits.
module associative_memory #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned WIDTH = 4
) (
  input  logic             clock,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] k,
  input  logic [WIDTH-1:0] mk,
  input  logic             we,
  input  logic [WORDS-1:0] s,
  output logic [WIDTH-1:0] q,
  output logic [WORDS-1:0] m
);

  logic [WORDS-1:0][WIDTH-1:0] cell_q;
  logic [WORDS-1:0][WIDTH-1:0] cell_m;

  for (genvar i = 0; i < WORDS; i++) begin : g_word
    for (genvar j = 0; j < WIDTH; j++) begin : g_bit
      associative_memory_cell u_cell (
        .clock (clock),
        .reset (reset),
        .d     (d[j]),
        .k     (k[j]),
        .we    (we),
        .mk    (mk[j]),
        .s     (s[i]),
        .q     (cell_q[i][j]),
        .m     (cell_m[i][j])
      );
    end
    // A word mismatches when any of its bits does.
    assign m[i] = |cell_m[i];
  end

  // Read bus: OR of the selected words' outputs.
  always_comb begin
    q = '0;
    for (int unsigned i = 0; i < WORDS; i++)
      q = q | cell_q[i];
  end

endmodule

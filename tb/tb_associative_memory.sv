// Testbench for associative_memory in its 4 x 4 example size (key tied to the
// data input, as in the classic array) and in a 16 x 16 size: words are
// written one by one, read back by select line, and searched with random keys
// and masks; each search result is compared with a word-by-word reference.
`include "tb_check.svh"
module tb_associative_memory;
  int checks = 0, failures = 0;
  logic clock = 1'b0, reset = 1'b1;
  // 4 x 4, key = d
  logic [3:0] d4, mk4, s4, q4, m4;
  logic       we4;
  logic [3:0] ref4 [4];
  // 16 x 16
  logic [15:0] d16, k16, mk16, s16, q16, m16;
  logic        we16;
  logic [15:0] ref16 [16];

  associative_memory #(.WORDS(4), .WIDTH(4)) dut4 (
    .clock(clock), .reset(reset), .d(d4), .k(d4), .mk(mk4), .we(we4), .s(s4), .q(q4), .m(m4));
  associative_memory #(.WORDS(16), .WIDTH(16)) dut16 (
    .clock(clock), .reset(reset), .d(d16), .k(k16), .mk(mk16), .we(we16), .s(s16), .q(q16), .m(m16));

  always #5 clock = ~clock;

  initial begin
    d4 = 0; mk4 = 0; s4 = 0; we4 = 0;
    d16 = 0; k16 = 0; mk16 = 0; s16 = 0; we16 = 0;
    #12 reset = 1'b0;
    // after reset every word reads zero
    for (int i = 0; i < 4; i++) begin
      s4 = 4'b0001 << i; #1;
      `CHECK(q4 == 4'h0, "4x4 word cleared by reset")
    end
    // write distinct words
    for (int i = 0; i < 4; i++) begin
      @(negedge clock);
      s4 = 4'b0001 << i; d4 = 4'(3 * i + 2); we4 = 1;
      ref4[i] = d4;
      @(posedge clock); #1;
      we4 = 0;
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clock);
      s16 = 16'h0001 << i; d16 = 16'($urandom); we16 = 1;
      ref16[i] = d16;
      @(posedge clock); #1;
      we16 = 0;
    end
    @(negedge clock);
    // read back
    for (int i = 0; i < 4; i++) begin
      s4 = 4'b0001 << i; #1;
      `CHECK(q4 == ref4[i], $sformatf("4x4 word %0d = %h expected %h", i, q4, ref4[i]))
    end
    for (int i = 0; i < 16; i++) begin
      s16 = 16'h0001 << i; #1;
      `CHECK(q16 == ref16[i], $sformatf("16x16 word %0d", i))
    end
    s4 = 0; s16 = 0;
    // searches
    for (int t = 0; t < 200; t++) begin
      logic [3:0]  e4;
      logic [15:0] e16;
      d4 = 4'($urandom); mk4 = 4'($urandom);
      k16 = ($urandom_range(0, 1) == 1) ? ref16[$urandom_range(0, 15)] : 16'($urandom);
      mk16 = ($urandom_range(0, 3) == 0) ? 16'($urandom) : 16'hFFFF;
      #1;
      for (int i = 0; i < 4; i++)  e4[i]  = ((ref4[i] ^ d4) & mk4) != 0;
      for (int i = 0; i < 16; i++) e16[i] = ((ref16[i] ^ k16) & mk16) != 0;
      `CHECK(m4 == e4, $sformatf("4x4 search key %h mask %h: m=%b expected %b", d4, mk4, m4, e4))
      `CHECK(m16 == e16, $sformatf("16x16 search: m=%h expected %h", m16, e16))
    end
    // unselected words are not written
    @(negedge clock);
    s4 = 4'b0100; d4 = 4'hF; we4 = 1;
    @(posedge clock); #1;
    we4 = 0; ref4[2] = 4'hF;
    for (int i = 0; i < 4; i++) begin
      s4 = 4'b0001 << i; #1;
      `CHECK(q4 == ref4[i], "only the selected word changes")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

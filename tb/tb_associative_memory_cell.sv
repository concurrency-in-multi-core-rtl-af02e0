// Testbench for associative_memory_cell: write 0 and 1 under every
// combination of WE and S, then check read-out (only while selected) and the
// masked mismatch output for every key and mask; reset clears the bit.
`include "tb_check.svh"
module tb_associative_memory_cell;
  int checks = 0, failures = 0;
  logic clock = 1'b0, reset = 1'b1, d, k, we, mk, s, q, m;
  logic stored_ref;

  associative_memory_cell dut (.clock(clock), .reset(reset), .d(d), .k(k), .we(we), .mk(mk), .s(s), .q(q), .m(m));

  always #5 clock = ~clock;

  task automatic check_outputs();
    for (int v = 0; v < 8; v++) begin
      {k, mk, s} = 3'(v);
      #1;
      `CHECK(q == (stored_ref & s), $sformatf("q=%b stored=%b s=%b", q, stored_ref, s))
      `CHECK(m == (mk & (k != stored_ref)), $sformatf("m=%b stored=%b k=%b mk=%b", m, stored_ref, k, mk))
    end
  endtask

  initial begin
    d = 0; k = 0; we = 0; mk = 0; s = 0;
    #7;  // reset held over the first clock edge
    stored_ref = 1'b0;
    check_outputs();
    reset = 1'b0;
    for (int t = 0; t < 32; t++) begin
      @(negedge clock);
      d = $urandom_range(0, 1) == 1;
      we = $urandom_range(0, 1) == 1;
      s = $urandom_range(0, 1) == 1;
      k = 0; mk = 0;
      @(posedge clock);
      if (we && s) stored_ref = d;
      #1;
      we = 0;
      check_outputs();
    end
    @(negedge clock);
    d = 1; we = 1; s = 1;
    @(posedge clock); #1;
    we = 0;
    reset = 1'b1;
    #1;
    stored_ref = 1'b0;
    check_outputs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

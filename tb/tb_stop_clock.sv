// Testbench for stop_clock: every input combination with the clock low and
// high. Expected: the clock passes through unless the core reads or writes,
// two or more cores do, and the pointer names another core; then the output
// stays high. Also checks, with a running clock, that a stopped core sees no
// rising edge and that a released core sees exactly one per clock cycle.
`include "tb_check.svh"
module tb_stop_clock;
  int checks = 0, failures = 0;
  logic       clk_in, rd, wr, two, clk_out, stop;
  logic [1:0] num, sel;
  int         edges;

  stop_clock #(.SEL_W(2)) dut (.clock_in(clk_in), .read(rd), .write(wr), .two_or_more(two),
                               .cpu_num(num), .cpu_select(sel), .clock_out(clk_out), .stop(stop));

  always @(posedge clk_out) edges++;

  initial begin
    edges = 0;
    for (int v = 0; v < 256; v++) begin
      logic exp_stop;
      {clk_in, rd, wr, two, num, sel} = 8'(v);
      #1;
      exp_stop = (rd || wr) && two && (num != sel);
      `CHECK(stop == exp_stop, $sformatf("v=%b stop=%b", v[7:0], stop))
      `CHECK(clk_out == (clk_in || exp_stop), $sformatf("v=%b clock_out=%b", v[7:0], clk_out))
    end
    // running clock: core 2 reading under contention while the pointer cycles
    clk_in = 0; rd = 1; wr = 0; two = 1; num = 2; sel = 0;
    #5;
    edges = 0;
    for (int c = 0; c < 8; c++) begin
      // pointer changes just after the rising edge, as the real counter does
      #5 clk_in = 1;
      #1 sel = sel + 2'd1;
      #4 clk_in = 0;
    end
    // pointer visited 2 twice in 8 cycles; an edge follows each such low phase
    `CHECK(edges == 2, $sformatf("stopped core saw %0d edges in 8 cycles, expected 2", edges))
    two = 0;
    edges = 0;
    for (int c = 0; c < 5; c++) begin
      #5 clk_in = 1;
      #5 clk_in = 0;
    end
    `CHECK(edges == 5, $sformatf("released core saw %0d edges in 5 cycles", edges))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

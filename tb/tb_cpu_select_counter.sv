// Testbench for cpu_select_counter: after reset the pointer reads 0 and then
// counts 1, 2, 3, 0, ... one step per rising clock edge; an asynchronous
// reset in mid-count clears it at once.
`include "tb_check.svh"
module tb_cpu_select_counter;
  int checks = 0, failures = 0;
  logic       clock = 1'b0, reset = 1'b1;
  logic [1:0] select;
  int         expect_sel;

  cpu_select_counter #(.NUM_CORES(4)) dut (.clock(clock), .reset(reset), .select(select));

  always #5 clock = ~clock;

  initial begin
    #12;
    `CHECK(select == 2'd0, "pointer cleared by reset")
    reset = 1'b0;
    expect_sel = 0;
    for (int i = 0; i < 20; i++) begin
      @(posedge clock);
      #1;
      expect_sel = (expect_sel + 1) % 4;
      `CHECK(select == 2'(expect_sel), $sformatf("step %0d: select=%0d expected %0d", i, select, expect_sel))
    end
    // asynchronous clear in the middle of the low phase
    @(negedge clock);
    reset = 1'b1;
    #1;
    `CHECK(select == 2'd0, "asynchronous reset clears the pointer")
    @(negedge clock);
    reset = 1'b0;
    @(posedge clock);
    #1;
    `CHECK(select == 2'd1, "counting resumes after reset")
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

// Testbench for arb_enable: every combination of four request bits, the
// contention flag and the pointer. Expected enables: with one request or none
// the requester is enabled; with two or more only the pointed-to requester.
`include "tb_check.svh"
module tb_arb_enable;
  int checks = 0, failures = 0;
  logic [3:0] rw, enable, expected;
  logic       two;
  logic [1:0] sel;

  arb_enable #(.NUM_CORES(4)) dut (.rw(rw), .two_or_more(two), .cpu_select(sel), .enable(enable));

  initial begin
    for (int p = 0; p < 16; p++) begin
      for (int s = 0; s < 4; s++) begin
        int n;
        n = 0;
        for (int b = 0; b < 4; b++) n += (p >> b) & 1;
        rw  = 4'(p);
        sel = 2'(s);
        two = (n >= 2);
        #1;
        if (n <= 1) expected = rw;
        else        expected = rw & (4'b0001 << s);
        `CHECK(enable == expected, $sformatf("rw=%b sel=%0d enable=%b expected %b", rw, sel, enable, expected))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

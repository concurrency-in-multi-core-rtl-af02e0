// Testbench for two_or_more: all 16 request patterns of four cores, compared
// with a count of the set bits (high for two or more). Also a 6-core instance.
`include "tb_check.svh"
module tb_two_or_more;
  int checks = 0, failures = 0;
  logic [3:0] rw;
  logic       flag;
  logic [5:0] rw6;
  logic       flag6;

  two_or_more #(.NUM_CORES(4)) dut (.rw(rw), .flag(flag));
  two_or_more #(.NUM_CORES(6)) dut6 (.rw(rw6), .flag(flag6));

  initial begin
    for (int p = 0; p < 16; p++) begin
      int n;
      rw = 4'(p);
      #1;
      n = 0;
      for (int b = 0; b < 4; b++) n += (p >> b) & 1;
      `CHECK(flag == (n >= 2), $sformatf("rw=%b flag=%b", rw, flag))
    end
    for (int p = 0; p < 64; p++) begin
      int n;
      rw6 = 6'(p);
      #1;
      n = 0;
      for (int b = 0; b < 6; b++) n += (p >> b) & 1;
      `CHECK(flag6 == (n >= 2), $sformatf("rw6=%b flag=%b", rw6, flag6))
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

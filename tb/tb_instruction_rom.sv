// Testbench for instruction_rom: a 16-word ROM loaded from tb/rom_test.hex,
// whose word i is 16'h1000 + i * 16'h0111; every address is read back.
`include "tb_check.svh"
module tb_instruction_rom;
  int checks = 0, failures = 0;
  logic [3:0]  addr;
  logic [15:0] instr;

  instruction_rom #(.ADDR_W(4), .DATA_W(16), .INIT_FILE("tb/rom_test.hex")) dut (.addr(addr), .instr(instr));

  initial begin
    #1;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      `CHECK(instr == 16'(16'h1000 + i * 16'h0111), $sformatf("word %0d = %h", i, instr))
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

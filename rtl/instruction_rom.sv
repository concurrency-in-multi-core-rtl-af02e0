// instruction_rom: one core's program memory.
//
// 2**ADDR_W words of DATA_W bits, read asynchronously: `instr` is the word at
// `addr` (the core's ADD_INDEX, its program counter). The contents are loaded
// at start of simulation from INIT_FILE (hex, one word per line) when that
// parameter is set; otherwise the testbench or the implementation flow fills
// the array `mem`. There is no write port, so a synthesis run without
// INIT_FILE sees an all-zero table and reduces the ROM to constants.
module instruction_rom #(
  parameter int unsigned ADDR_W    = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W    = hera_pkg::DATA_W,
  parameter string       INIT_FILE = ""
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] instr
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    if (INIT_FILE != "")
      $readmemh(INIT_FILE, mem);
  end

  assign instr = mem[addr];

endmodule

// Workload testbench: the transactional dining-philosophers program run on
// hera_system at its default size. Four philosophers, one per core, share
// four chopsticks. Each philosopher eats MEALS times; every meal is one
// transaction that marks the philosopher HUNGRY, takes chopstick i into the
// left hand and chopstick (i+1)%4 into the right hand, eats (increments its
// own meal counter), then marks itself THINKING and puts both chopsticks back
// on the table. Neighbours share a chopstick, so a neighbour's commit aborts a
// transaction still in progress; the core retries it, at most three attempts.
//
// Memory map (words): state[i] at 0x60+i, chopstick[j] at 0x68+j,
// meals[i] at 0x70+i. THINKING = ON_TABLE = 0, HUNGRY = IN_LEFT_HAND = 1,
// IN_RIGHT_HAND = 2.
//
// Checked: every core halts; meals[i] equals the number of philosopher i's
// transactions that did not fail; state and chopsticks end at 0; and, because
// a transaction's intermediate values stay in its cache, no non-zero value is
// ever written to a state or chopstick word in RAM. The number of aborts is
// reported and at least one must occur.
`include "tb_check.svh"
module tb_dining_philosophers;
  localparam int MEALS = 2;
  int checks = 0, failures = 0;
  logic clock = 1'b0, reset = 1'b0;

  logic [3:0][15:0] core_pc, core_instr, core_addr, core_wdata, core_rdata;
  logic [3:0]       core_read, core_write, core_clock, tx_flag, tx_abort, tx_fail, tx_exception;
  logic [3:0]       grant, core_stop, tx_committing, halted;
  logic [15:0]      ram_addr, ram_wdata, ram_rdata;
  logic             ram_read, ram_write, two_or_more;
  logic [1:0]       cpu_select;
  logic [3:0][15:0][15:0] regs;

  hera_system dut (
    .clock(clock), .reset(reset), .core_pc(core_pc), .core_instr(core_instr),
    .core_addr(core_addr), .core_read(core_read), .core_write(core_write),
    .core_wdata(core_wdata), .core_rdata(core_rdata), .core_clock(core_clock),
    .tx_flag(tx_flag), .tx_abort(tx_abort), .tx_fail(tx_fail), .tx_exception(tx_exception),
    .ram_addr(ram_addr), .ram_read(ram_read), .ram_write(ram_write), .ram_wdata(ram_wdata),
    .ram_rdata(ram_rdata), .cpu_select(cpu_select), .two_or_more(two_or_more),
    .grant(grant), .core_stop(core_stop), .tx_committing(tx_committing));

  for (genvar n = 0; n < 4; n++) begin : g_cpu
    hera_core_model u_core (
      .clk(core_clock[n]), .reset(reset), .instr(core_instr[n]), .pc(core_pc[n]),
      .addr(core_addr[n]), .read(core_read[n]), .write(core_write[n]), .wdata(core_wdata[n]),
      .rdata(core_rdata[n]), .aborted(tx_abort[n]), .fail(tx_fail[n]),
      .exception(tx_exception[n]), .halted(halted[n]), .regs(regs[n]));
  end

  always #5 clock = ~clock;

  // ---- monitors ----
  int cycles = 0, n_abort = 0, n_bad_write = 0;
  int n_fail [4];
  logic [3:0] prev_abort = '0, prev_fail = '0;
  always @(posedge clock) begin
    if (!reset) begin
      cycles++;
      for (int n = 0; n < 4; n++) begin
        if (tx_abort[n] && !prev_abort[n]) n_abort++;
        if (tx_fail[n] && !prev_fail[n]) n_fail[n]++;
      end
      if (ram_write && ram_addr >= 16'h60 && ram_addr < 16'h70 && ram_wdata != 16'h0) n_bad_write++;
      prev_abort = tx_abort; prev_fail = tx_fail;
    end
  end

  task automatic rom_write(int core, int a, logic [15:0] w);
    case (core)
      0: dut.g_core[0].u_rom.mem[a] = w;
      1: dut.g_core[1].u_rom.mem[a] = w;
      2: dut.g_core[2].u_rom.mem[a] = w;
      default: dut.g_core[3].u_rom.mem[a] = w;
    endcase
  endtask

  function automatic logic [15:0] setlo(int d, int v);
    return 16'hE000 | 16'(d << 8) | 16'(v & 8'hFF);
  endfunction

  // watchdog
  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] meal [11];
    int a;
    for (int n = 0; n < 4; n++) n_fail[n] = 0;
    for (int i = 0; i < 256; i++) dut.u_ram.mem[i] = 16'h0000;
    // one meal: TRST; state=HUNGRY; chopstick[i]=LEFT; chopstick[i+1]=RIGHT;
    // meals++; state=THINKING; both chopsticks ON_TABLE; TREND
    meal = '{16'h1112, 16'h6105, 16'h6106, 16'h6207,
             16'h4908, 16'ha991, 16'h6908,
             16'h6005, 16'h6006, 16'h6007, 16'h1113};
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 64; i++) rom_write(n, i, 16'h0000);
      rom_write(n, 0, setlo(1, 1));                    // R1 = 1
      rom_write(n, 1, setlo(2, 2));                    // R2 = 2
      rom_write(n, 2, setlo(5, 16'h60 + n));           // R5 = &state[i]
      rom_write(n, 3, setlo(6, 16'h68 + n));           // R6 = &chopstick[i]
      rom_write(n, 4, setlo(7, 16'h68 + (n + 1) % 4)); // R7 = &chopstick[(i+1)%N]
      rom_write(n, 5, setlo(8, 16'h70 + n));           // R8 = &meals[i]
      a = 6;
      for (int m = 0; m < MEALS; m++)
        foreach (meal[k]) begin rom_write(n, a, meal[k]); a++; end
      rom_write(n, a, 16'h0000);                       // halt
    end
    @(negedge clock); reset = 1'b1;
    @(negedge clock); reset = 1'b0;
    // count only from the end of reset
    cycles = 0; n_abort = 0; n_bad_write = 0;
    for (int n = 0; n < 4; n++) n_fail[n] = 0;
    while (halted != 4'b1111 && cycles < 2000) @(negedge clock);
    `CHECK(halted == 4'b1111, $sformatf("all philosophers finished (cycles=%0d)", cycles))
    for (int n = 0; n < 4; n++) begin
      `CHECK(dut.u_ram.mem[16'h70 + n] == 16'(MEALS - n_fail[n]),
             $sformatf("philosopher %0d ate %0d meals, %0d transactions failed", n, dut.u_ram.mem[16'h70 + n], n_fail[n]))
      `CHECK(dut.u_ram.mem[16'h60 + n] == 16'h0, $sformatf("state[%0d] is THINKING", n))
      `CHECK(dut.u_ram.mem[16'h68 + n] == 16'h0, $sformatf("chopstick[%0d] is ON_TABLE", n))
      `CHECK(!tx_flag[n], $sformatf("philosopher %0d left its transaction", n))
    end
    `CHECK(n_bad_write == 0, $sformatf("%0d intermediate state/chopstick values reached RAM", n_bad_write))
    `CHECK(n_abort > 0, "neighbours' commits aborted at least one meal")
    $display("INFO %0d cycles, %0d aborts, failed transactions %0d %0d %0d %0d",
             cycles, n_abort, n_fail[0], n_fail[1], n_fail[2], n_fail[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

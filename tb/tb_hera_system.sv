// End-to-end testbench for hera_system at its default size (four cores, 64K x
// 16 RAM and ROMs, 16-entry transactional caches). Four behavioural cores
// (hera_core_model) run programs placed in the instruction ROMs. Scenarios:
//   1. the load/store sequence of the contention example on all four cores at
//      once: contention, halting, the rotating pointer, memory results, and
//      no access longer than four cycles;
//   2. the two-core race on address 2 without transactions: core 0 sees core
//      1's value (R3 = 3), the interference the example describes;
//   3. the same programs inside TRST/TREND: core 0 now computes R3 = 2, core 1
//      R3 = 4; core 1's commit aborts core 0 once, which then retries;
//   4. a transactional load of an address held by another core's transaction
//      aborts three times and then fails past its TREND;
//   5. seventeen transactional stores overflow the 16-entry cache: exception,
//      and nothing reaches memory.
// Each mechanism (stall, contention, commit write, abort, fail, exception,
// transaction start) is counted over the run and must occur at least once.
`include "tb_check.svh"
module tb_hera_system;
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

  // ---- mechanism counters ----
  int n_stall, n_contention, n_commit_write, n_abort, n_fail, n_exception, n_tx_start;
  int stall_run [4];
  int max_stall_run;
  int cycles;
  logic [3:0] prev_flag, prev_abort, prev_fail, prev_exc;
  logic started = 1'b0;  // set once the first reset has been applied
  always @(posedge clock) begin
    if (!reset && started) begin
      cycles++;
      for (int n = 0; n < 4; n++) begin
        if (core_stop[n]) begin
          n_stall++;
          stall_run[n]++;
          if (stall_run[n] > max_stall_run) max_stall_run = stall_run[n];
        end else begin
          stall_run[n] = 0;
        end
        if (tx_flag[n] && !prev_flag[n]) n_tx_start++;
        if (tx_abort[n] && !prev_abort[n]) n_abort++;
        if (tx_fail[n] && !prev_fail[n]) n_fail++;
        if (tx_exception[n] && !prev_exc[n]) n_exception++;
      end
      if (two_or_more) n_contention++;
      if (ram_write && (tx_committing & grant) != 0) n_commit_write++;
      prev_flag = tx_flag; prev_abort = tx_abort; prev_fail = tx_fail; prev_exc = tx_exception;
    end
  end

  // ---- program loading ----
  task automatic rom_write(int core, int a, logic [15:0] w);
    case (core)
      0: dut.g_core[0].u_rom.mem[a] = w;
      1: dut.g_core[1].u_rom.mem[a] = w;
      2: dut.g_core[2].u_rom.mem[a] = w;
      default: dut.g_core[3].u_rom.mem[a] = w;
    endcase
  endtask

  task automatic load_program(int core, logic [15:0] prog []);
    for (int a = 0; a < 64; a++) rom_write(core, a, 16'h0000);
    foreach (prog[i]) rom_write(core, i, prog[i]);
  endtask

  task automatic ram_clear();
    for (int a = 0; a < 256; a++) dut.u_ram.mem[a] = 16'h0000;
  endtask

  // reset pulse with a rising edge, then run until every core halts
  task automatic run(int max_cycles, output int took);
    @(negedge clock);
    reset = 1'b1;
    @(negedge clock);
    reset = 1'b0;
    started = 1'b1;
    cycles = 0;
    for (int n = 0; n < 4; n++) stall_run[n] = 0;
    prev_flag = '0; prev_abort = '0; prev_fail = '0; prev_exc = '0;
    @(negedge clock);
    while (halted != 4'b1111 && cycles < max_cycles) @(negedge clock);
    took = cycles;
    `CHECK(halted == 4'b1111, $sformatf("all cores halted (halted=%b after %0d cycles)", halted, cycles))
  endtask

  function automatic logic [15:0] setlo(int d, int v);
    return 16'hE000 | 16'(d << 8) | 16'(v & 8'hFF);
  endfunction

  initial begin
    int took, stalls_before, aborts_before, fails_before, exc_before, commits_before;
    logic [15:0] prog [];
    n_stall = 0; n_contention = 0; n_commit_write = 0; n_abort = 0; n_fail = 0;
    n_exception = 0; n_tx_start = 0; max_stall_run = 0; cycles = 0;

    // ---------------- 1: contention on all four cores ----------------
    ram_clear();
    for (int n = 0; n < 4; n++) begin
      // R4..R6 source addresses, R8 = R7 + R1 and R9 = R8 + R1 destinations
      prog = '{setlo(4, 16'h40 + 4 * n), setlo(5, 16'h41 + 4 * n), setlo(6, 16'h42 + 4 * n),
               setlo(7, 16'h50 + 4 * n), setlo(1, 1),
               16'ha000, 16'ha871, 16'ha000, 16'ha981, 16'ha000,
               16'h4104, 16'h6109, 16'h4105, 16'h6108, 16'h4106, 16'h0000};
      load_program(n, prog);
      dut.u_ram.mem[16'h40 + 4 * n] = 16'(16'h1000 + n);
      dut.u_ram.mem[16'h41 + 4 * n] = 16'(16'h2000 + n);
      dut.u_ram.mem[16'h42 + 4 * n] = 16'(16'h3000 + n);
    end
    stalls_before = n_stall;
    run(500, took);
    for (int n = 0; n < 4; n++) begin
      // R8 = 0x50 + 4n + 1, R9 = R8 + 1
      `CHECK(dut.u_ram.mem[16'h52 + 4 * n] == 16'(16'h1000 + n), $sformatf("core %0d first copy", n))
      `CHECK(dut.u_ram.mem[16'h51 + 4 * n] == 16'(16'h2000 + n), $sformatf("core %0d second copy", n))
      `CHECK(regs[n][1] == 16'(16'h3000 + n), $sformatf("core %0d final load R1=%h", n, regs[n][1]))
    end
    `CHECK(n_stall > stalls_before, "cores were halted under contention")
    `CHECK(max_stall_run <= 3, $sformatf("longest halt %0d cycles (at most three)", max_stall_run))
    // 10 non-memory + 5 memory instructions; a memory access takes at most 4 cycles
    `CHECK(took <= 11 + 5 * 4 + 2, $sformatf("scenario 1 took %0d cycles", took))
    $display("INFO scenario 1: %0d cycles, longest halt %0d", took, max_stall_run);

    // ---------------- 2: race without transactions ----------------
    ram_clear();
    load_program(0, '{16'he101, 16'h6111, 16'ha411, 16'ha511, 16'h4211, 16'ha321, 16'h0000});
    load_program(1, '{16'he102, 16'ha411, 16'h6101, 16'h4201, 16'ha321, 16'h0000});
    load_program(2, '{16'h0000});
    load_program(3, '{16'h0000});
    run(100, took);
    `CHECK(regs[0][3] == 16'd3, $sformatf("race: core 0 R3=%0d (interference gives 3)", regs[0][3]))
    `CHECK(regs[1][3] == 16'd4, $sformatf("race: core 1 R3=%0d", regs[1][3]))
    `CHECK(dut.u_ram.mem[2] == 16'd2, "race: M[2] holds core 1's value")

    // ---------------- 3: the same race inside transactions ----------------
    ram_clear();
    aborts_before = n_abort; commits_before = n_commit_write;
    load_program(0, '{16'he101, 16'h1112, 16'h6111, 16'ha411, 16'ha511, 16'h4211, 16'h1113, 16'ha321, 16'h0000});
    load_program(1, '{16'he102, 16'h1112, 16'ha411, 16'h6101, 16'h4201, 16'h1113, 16'ha321, 16'h0000});
    run(200, took);
    `CHECK(regs[0][3] == 16'd2, $sformatf("transactions: core 0 R3=%0d (correct result 2)", regs[0][3]))
    `CHECK(regs[1][3] == 16'd4, $sformatf("transactions: core 1 R3=%0d", regs[1][3]))
    `CHECK(dut.u_ram.mem[2] == 16'd1, $sformatf("transactions: M[2]=%0d, core 0 committed last", dut.u_ram.mem[2]))
    `CHECK(n_abort - aborts_before == 1, $sformatf("transactions: %0d aborts, expected 1", n_abort - aborts_before))
    `CHECK(n_commit_write - commits_before == 2, "transactions: two commit writes")
    $display("INFO scenario 3: %0d cycles", took);

    // ---------------- 4: read conflict, three attempts, fail ----------------
    ram_clear();
    aborts_before = n_abort; fails_before = n_fail;
    prog = new[26];
    prog[0] = setlo(1, 5); prog[1] = 16'h1112; prog[2] = 16'h6101;
    for (int i = 3; i < 23; i++) prog[i] = 16'ha000;
    prog[23] = 16'h1113; prog[24] = 16'h0000;
    load_program(0, prog);
    load_program(1, '{setlo(1, 5), 16'ha000, 16'ha000, 16'h1112, 16'h4201, setlo(3, 7),
                      16'h1113, setlo(2, 1), 16'h0000});
    load_program(2, '{16'h0000});
    load_program(3, '{16'h0000});
    run(200, took);
    `CHECK(n_abort - aborts_before == 3, $sformatf("read conflict: %0d aborts, expected 3", n_abort - aborts_before))
    `CHECK(n_fail - fails_before == 1, "read conflict: transaction failed")
    `CHECK(regs[1][3] == 16'd0 && regs[1][2] == 16'd1, "read conflict: failed transaction skipped past TREND")
    `CHECK(dut.u_ram.mem[5] == 16'd5, "read conflict: holder committed M[5]=5")

    // ---------------- 5: overflow of the transactional cache ----------------
    ram_clear();
    exc_before = n_exception; commits_before = n_commit_write;
    prog = new[21];
    prog[0] = setlo(1, 9); prog[1] = 16'h1112;
    for (int i = 0; i < 17; i++) prog[2 + i] = 16'h6100 | 16'(i * 16'h0010) | 16'h0;  // M[R0 + i] for i < 16
    // the 17th store uses R1 as base: M[R1 + 15] = M[24]
    prog[18] = 16'h61F1;
    prog[19] = 16'h1113; prog[20] = 16'h0000;
    load_program(0, prog);
    load_program(1, '{16'h0000});
    run(200, took);
    `CHECK(n_exception - exc_before == 1, "overflow raised an exception")
    `CHECK(n_commit_write == commits_before, "overflow: nothing committed")
    begin
      logic any;
      any = 0;
      for (int a = 0; a < 32; a++) if (dut.u_ram.mem[a] != 16'h0) any = 1;
      `CHECK(!any, "overflow: memory untouched")
    end

    // ---------------- mechanisms ----------------
    $display("INFO stall=%0d contention=%0d commit_write=%0d abort=%0d fail=%0d exception=%0d tx_start=%0d",
             n_stall, n_contention, n_commit_write, n_abort, n_fail, n_exception, n_tx_start);
    `CHECK(n_stall > 0, "stall happened")
    `CHECK(n_contention > 0, "contention happened")
    `CHECK(n_commit_write > 0, "commit write happened")
    `CHECK(n_abort > 0, "abort happened")
    `CHECK(n_fail > 0, "fail happened")
    `CHECK(n_exception > 0, "exception happened")
    `CHECK(n_tx_start > 0, "transaction start happened")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

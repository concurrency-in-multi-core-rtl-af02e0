// Testbench for tm_unit (4-entry cache). The testbench plays the core and the
// arbitrator: it sets the instruction word and memory request during the low
// clock phase, grants the bus at will and drives the snooped bus. Checked:
// pass-through outside transactions; TRST sets TFLAG; transactional stores
// stay off the bus and are read back from the cache; loads that miss go to
// the bus; snoop_hit for another core's read of a held address; TREND holds
// the core while every entry is written back, one per granted cycle; abort on
// a conflicting read and on a foreign write; three failed attempts raise
// fail; a store into a full cache raises exception; requests are dropped
// while an abort is pending.
`include "tb_check.svh"
module tb_tm_unit;
  int checks = 0, failures = 0;
  logic        clock = 1'b0, reset = 1'b0;
  logic [15:0] instr, core_addr, core_wdata, core_rdata, bus_addr, bus_wdata, bus_rdata, snp_addr;
  logic        core_read, core_write, core_stop, hold, tflag, aborted, fail, exception, committing;
  logic        bus_read, bus_write, grant, snp_read, snp_write, snoop_hit, conflict;

  tm_unit #(.ENTRIES(4), .ADDR_W(16), .DATA_W(16), .MAX_ATTEMPTS(3)) dut (
    .clock(clock), .reset(reset), .instr(instr), .core_addr(core_addr), .core_read(core_read),
    .core_write(core_write), .core_wdata(core_wdata), .core_rdata(core_rdata), .core_stop(core_stop),
    .hold(hold), .tflag(tflag), .aborted(aborted), .fail(fail), .exception(exception),
    .committing(committing), .bus_addr(bus_addr), .bus_read(bus_read), .bus_write(bus_write),
    .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .grant(grant), .snp_addr(snp_addr),
    .snp_read(snp_read), .snp_write(snp_write), .snoop_hit(snoop_hit), .conflict(conflict));

  always #5 clock = ~clock;

  // one core cycle: set inputs in the low phase, let the edge pass
  task automatic step(input logic [15:0] ins, input logic rd, input logic wr_, input logic [15:0] a,
                      input logic [15:0] wd);
    @(negedge clock);
    instr = ins; core_read = rd; core_write = wr_; core_addr = a; core_wdata = wd;
    grant = 0; snp_read = 0; snp_write = 0; conflict = 0; core_stop = 0;
    #1;
  endtask

  task automatic idle();
    step(16'ha000, 0, 0, 0, 0);
  endtask

  task automatic trst();
    step(16'h1112, 0, 0, 0, 0);
    @(posedge clock); #1;
    `CHECK(tflag, "TRST sets TFLAG")
  endtask

  initial begin
    int cyc;
    instr = 0; core_addr = 0; core_wdata = 0; core_read = 0; core_write = 0; core_stop = 0;
    bus_rdata = 16'h7777; grant = 0; snp_addr = 0; snp_read = 0; snp_write = 0; conflict = 0;
    #1 reset = 1;
    #10 reset = 0;
    `CHECK(!tflag && !aborted && !fail && !hold, "idle after reset")

    // pass-through
    step(16'h4104, 1, 0, 16'h0042, 0);
    `CHECK(bus_read && !bus_write && bus_addr == 16'h0042 && core_rdata == 16'h7777, "plain load passes through")
    step(16'h6109, 0, 1, 16'h0043, 16'h1234);
    `CHECK(bus_write && bus_addr == 16'h0043 && bus_wdata == 16'h1234, "plain store passes through")

    // transaction: stores to the cache, loads from cache or bus
    trst();
    step(16'h6111, 0, 1, 16'h0010, 16'h0055);
    `CHECK(!bus_write && !bus_read && !hold, "transactional store stays off the bus")
    step(16'h6111, 0, 1, 16'h0011, 16'h0066);
    step(16'h4211, 1, 0, 16'h0010, 0);
    `CHECK(!bus_read && core_rdata == 16'h0055, "transactional load hits the cache")
    step(16'h4211, 1, 0, 16'h0020, 0);
    `CHECK(bus_read && core_rdata == 16'h7777, "transactional load miss goes to the bus")
    grant = 1; #1;
    // another core reads a held address
    step(16'ha000, 0, 0, 0, 0);
    snp_addr = 16'h0011; snp_read = 1; #1;
    `CHECK(snoop_hit, "snoop_hit on another core's read of a held address")
    snp_addr = 16'h0012; #1;
    `CHECK(!snoop_hit, "no snoop_hit elsewhere")
    snp_read = 0;
    // commit: hold, write back both entries, one per granted cycle
    step(16'h1113, 0, 0, 0, 0);
    `CHECK(hold, "TREND holds the core")
    @(posedge clock); #1;
    `CHECK(committing && hold, "commit started")
    @(negedge clock); #1;
    `CHECK(bus_write && bus_addr == 16'h0010 && bus_wdata == 16'h0055, "first write-back")
    @(posedge clock); #1;   // not granted: nothing changes
    @(negedge clock); grant = 1; #1;
    `CHECK(bus_write && bus_addr == 16'h0010, "write-back waits for the grant")
    @(posedge clock); #1;
    @(negedge clock); #1;
    `CHECK(bus_write && bus_addr == 16'h0011 && bus_wdata == 16'h0066, "second write-back")
    @(posedge clock); #1;
    grant = 0;
    `CHECK(committing && !bus_write, "all entries written")
    @(posedge clock); #1;
    `CHECK(!committing && !tflag && !hold, "commit done, core released")

    // read conflict aborts, three times, then fail
    for (int attempt = 1; attempt <= 3; attempt++) begin
      trst();
      step(16'h6111, 0, 1, 16'h0030, 16'h0001);
      step(16'h4211, 1, 0, 16'h0031, 0);
      grant = 1; conflict = 1; #1;
      @(posedge clock); #1;
      `CHECK(aborted && !tflag, $sformatf("attempt %0d aborted by a read conflict", attempt))
      `CHECK(fail == (attempt == 3), $sformatf("fail after attempt %0d = %b", attempt, fail))
      // stalled core: abort stays pending and requests are dropped
      @(negedge clock);
      grant = 0; conflict = 0; core_stop = 1; core_write = 1; core_read = 0; instr = 16'h6111; #1;
      `CHECK(!bus_write && !bus_read, "requests dropped while the abort is pending")
      @(posedge clock); #1;
      `CHECK(aborted, "abort pending until the core advances")
      idle();
      @(posedge clock); #1;
      `CHECK(!aborted, "abort seen by the core")
    end
    trst();
    `CHECK(!fail, "a new TRST after failure starts afresh")

    // foreign write to a held address aborts
    step(16'h6111, 0, 1, 16'h0040, 16'h0002);
    step(16'ha000, 0, 0, 0, 0);
    snp_addr = 16'h0040; snp_write = 1; #1;
    @(posedge clock); #1;
    `CHECK(aborted && !tflag && !fail, "foreign write aborts")
    idle();
    @(posedge clock); #1;

    // overflow: fifth distinct address in a 4-entry cache
    trst();
    for (int i = 0; i < 4; i++) begin
      step(16'h6111, 0, 1, 16'(16'h0050 + i), 16'(i));
      `CHECK(!bus_write, "store buffered")
    end
    step(16'h6111, 0, 1, 16'h0060, 16'h0009);
    @(posedge clock); #1;
    `CHECK(exception && aborted && fail && !tflag, "full cache raises exception")
    idle();
    @(posedge clock); #1;
    `CHECK(!exception && !aborted, "exception seen by the core")
    // after the exception nothing was written to memory: a TREND outside a
    // transaction is a no-op
    step(16'h1113, 0, 0, 0, 0);
    `CHECK(!hold && !bus_write, "TREND outside a transaction does nothing")
    cyc = 0;
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

// Testbench for bus_arbitrator: four request generators hold random read or
// write requests until they are served. A reference model computes the
// pointer (reset to 0, +1 per edge) and the expected grant independently.
// Checked every cycle: grant, the RAM-side address/READ/WRITE/data, read data
// to the granted reader, the pointer and the contention flag; and that no
// request waits more than four cycles.
`include "tb_check.svh"
module tb_bus_arbitrator;
  int checks = 0, failures = 0;
  logic clock = 1'b0, reset = 1'b1;
  logic [3:0][15:0] addr, wdata, rdata;
  logic [3:0]       read, write, grant;
  logic [15:0]      mem_addr, mem_wdata, mem_rdata;
  logic             mem_read, mem_write, two;
  logic [1:0]       sel;
  int               ref_sel;
  int               wait_cycles [4];
  int               max_wait;
  int               contended;

  bus_arbitrator #(.NUM_CORES(4), .ADDR_W(16), .DATA_W(16)) dut (
    .clock(clock), .reset(reset), .cpu_addr(addr), .cpu_read(read), .cpu_write(write),
    .cpu_wdata(wdata), .cpu_rdata(rdata), .mem_addr(mem_addr), .mem_read(mem_read),
    .mem_write(mem_write), .mem_wdata(mem_wdata), .mem_rdata(mem_rdata),
    .cpu_select(sel), .two_or_more(two), .grant(grant));

  always #5 clock = ~clock;

  function automatic logic [3:0] model_grant(logic [3:0] rq, int s);
    int n;
    n = $countones(rq);
    if (n <= 1) return rq;
    return rq & (4'b0001 << s);
  endfunction

  initial begin
    read = '0; write = '0; addr = '0; wdata = '0; mem_rdata = '0;
    max_wait = 0; contended = 0;
    for (int n = 0; n < 4; n++) wait_cycles[n] = 0;
    @(posedge clock);
    #1 reset = 1'b0;
    ref_sel = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      logic [3:0] eg;
      // low phase: new requests from idle cores, then check
      @(negedge clock);
      for (int n = 0; n < 4; n++) begin
        if (!read[n] && !write[n] && $urandom_range(0, 2) != 0) begin
          addr[n]  = 16'($urandom);
          wdata[n] = 16'($urandom);
          if ($urandom_range(0, 1) == 1) read[n] = 1'b1; else write[n] = 1'b1;
        end
      end
      mem_rdata = 16'($urandom);
      #1;
      eg = model_grant(read | write, ref_sel);
      if ($countones(read | write) >= 2) contended++;
      `CHECK(sel == 2'(ref_sel), $sformatf("pointer %0d expected %0d", sel, ref_sel))
      `CHECK(two == ($countones(read | write) >= 2), "contention flag")
      `CHECK(grant == eg, $sformatf("grant %b expected %b (rq %b sel %0d)", grant, eg, read | write, ref_sel))
      for (int n = 0; n < 4; n++) begin
        if (eg[n]) begin
          `CHECK(mem_addr == addr[n] && mem_read == read[n] && mem_write == write[n], "RAM bus from the granted core")
          if (write[n]) `CHECK(mem_wdata == wdata[n], "write data from the granted core")
          if (read[n])  `CHECK(rdata[n] == mem_rdata, "read data to the granted core")
        end
      end
      if (eg == 4'b0000) `CHECK(!mem_read && !mem_write, "idle RAM bus")
      // rising edge: served requests finish
      @(posedge clock);
      ref_sel = (ref_sel + 1) % 4;
      for (int n = 0; n < 4; n++) begin
        if (eg[n]) begin
          read[n] = 1'b0; write[n] = 1'b0;
          if (wait_cycles[n] + 1 > max_wait) max_wait = wait_cycles[n] + 1;
          wait_cycles[n] = 0;
        end else if (read[n] || write[n]) begin
          wait_cycles[n]++;
        end
      end
    end
    `CHECK(max_wait <= 4, $sformatf("longest access took %0d cycles", max_wait))
    `CHECK(max_wait == 4, "some access had to wait the full rotation")
    `CHECK(contended > 0, "contention happened")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

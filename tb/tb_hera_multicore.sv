// Testbench for hera_multicore: four simple request generators, each clocked
// by its own core_clock, issue random loads and stores to a 16-word RAM model.
// Checked: every load returns the last value stored to that address (kept in
// a shadow copy when stores complete), no access takes more than four system
// cycles, core_clock equals clock ORed with core_stop, and in a phase where
// all four cores request every cycle each core gets exactly one clock edge per
// four system cycles.
`include "tb_check.svh"
module tb_hera_multicore;
  int checks = 0, failures = 0;
  logic clock = 1'b0, reset = 1'b1;
  logic [3:0][15:0] addr, wdata, rdata;
  logic [3:0]       read, write, core_clock, core_stop, grant;
  logic [15:0]      mem_addr, mem_wdata, mem_rdata;
  logic             mem_read, mem_write, two;
  logic [1:0]       sel;
  logic [15:0]      ram [16];
  logic [15:0]      shadow [16];
  int               sys_cycle;
  int               issued_at [4];
  int               edges [4];
  int               stalls;
  int               max_lat;
  bit               saturate;

  hera_multicore #(.NUM_CORES(4), .ADDR_W(16), .DATA_W(16)) dut (
    .clock(clock), .reset(reset), .cpu_addr(addr), .cpu_read(read), .cpu_write(write),
    .cpu_wdata(wdata), .cpu_rdata(rdata), .core_clock(core_clock), .core_stop(core_stop),
    .mem_addr(mem_addr), .mem_read(mem_read), .mem_write(mem_write), .mem_wdata(mem_wdata),
    .mem_rdata(mem_rdata), .cpu_select(sel), .two_or_more(two), .grant(grant));

  always #5 clock = ~clock;

  // RAM model: edge-triggered write, asynchronous read
  always_ff @(posedge clock) if (mem_write) ram[mem_addr[3:0]] <= mem_wdata;
  assign mem_rdata = ram[mem_addr[3:0]];

  always @(posedge clock) begin
    sys_cycle++;
    if (!reset && (core_stop != 4'b0000)) stalls++;
  end

  always @(clock or core_stop or core_clock) begin
    #0;
    if (!reset) `CHECK(core_clock == ({4{clock}} | core_stop), "core clock is clock OR stop")
  end

  for (genvar n = 0; n < 4; n++) begin : g_gen
    always @(posedge core_clock[n]) begin
      if (reset) begin
        read[n] <= 1'b0; write[n] <= 1'b0; addr[n] <= '0; wdata[n] <= '0;
        issued_at[n] = 0;
      end else begin
        edges[n]++;
        if (read[n] || write[n]) begin
          if (sys_cycle - issued_at[n] > max_lat) max_lat = sys_cycle - issued_at[n];
          `CHECK(sys_cycle - issued_at[n] <= 4, $sformatf("core %0d access took %0d cycles", n, sys_cycle - issued_at[n]))
        end
        if (read[n])
          `CHECK(rdata[n] == shadow[addr[n][3:0]], $sformatf("core %0d load of %0d gave %h expected %h", n, addr[n], rdata[n], shadow[addr[n][3:0]]))
        if (write[n])
          shadow[addr[n][3:0]] = wdata[n];
        // next operation
        issued_at[n] = sys_cycle;
        addr[n]  <= 16'($urandom_range(0, 15));
        wdata[n] <= 16'($urandom);
        if (saturate || $urandom_range(0, 2) != 0) begin
          logic r;
          r = $urandom_range(0, 1) == 1;
          read[n]  <= r;
          write[n] <= !r;
        end else begin
          read[n] <= 1'b0; write[n] <= 1'b0;
        end
      end
    end
  end

  initial begin
    read = '0; write = '0; addr = '0; wdata = '0;
    for (int i = 0; i < 16; i++) begin ram[i] = 16'h0; shadow[i] = 16'h0; end
    sys_cycle = 0; stalls = 0; max_lat = 0; saturate = 0;
    for (int n = 0; n < 4; n++) edges[n] = 0;
    @(posedge clock);
    #1 reset = 1'b0;
    repeat (300) @(posedge clock);
    // saturation phase
    saturate = 1;
    repeat (8) @(posedge clock);
    #1;
    for (int n = 0; n < 4; n++) edges[n] = 0;
    repeat (40) @(posedge clock);
    #1;
    for (int n = 0; n < 4; n++)
      `CHECK(edges[n] == 10, $sformatf("core %0d got %0d edges in 40 saturated cycles, expected 10", n, edges[n]))
    `CHECK(stalls > 0, "some core was halted")
    `CHECK(max_lat == 4, $sformatf("longest access %0d cycles, expected 4", max_lat))
    $display("INFO stalled cycles=%0d", stalls);
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

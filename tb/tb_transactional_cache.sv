// Testbench for transactional_cache with 4 entries: allocation of new
// addresses into the lowest free entry, in-place update of a held address,
// core lookup and snoop lookup, the full condition (a new address is then
// refused), write-back read-out and per-entry clear, and flush. Expected
// values come from a reference list of (address, data) pairs.
`include "tb_check.svh"
module tb_transactional_cache;
  int checks = 0, failures = 0;
  logic        clock = 1'b0, reset = 1'b1, flush, wr, hit, full, snp_hit, clr;
  logic [15:0] addr, wdata, hit_data, snp_addr, rd_addr, rd_data;
  logic [3:0]  valid;
  logic [1:0]  rd_idx;
  logic [15:0] ref_addr [4];
  logic [15:0] ref_data [4];

  transactional_cache #(.ENTRIES(4), .ADDR_W(16), .DATA_W(16)) dut (
    .clock(clock), .reset(reset), .flush(flush), .addr(addr), .wr(wr), .wdata(wdata),
    .hit(hit), .hit_data(hit_data), .full(full), .snp_addr(snp_addr), .snp_hit(snp_hit),
    .valid(valid), .rd_idx(rd_idx), .rd_addr(rd_addr), .rd_data(rd_data), .clr(clr));

  always #5 clock = ~clock;

  task automatic do_write(input logic [15:0] a, input logic [15:0] dt);
    @(negedge clock);
    addr = a; wdata = dt; wr = 1;
    @(posedge clock); #1;
    wr = 0;
  endtask

  initial begin
    flush = 0; wr = 0; clr = 0; addr = 0; wdata = 0; snp_addr = 0; rd_idx = 0;
    #7 reset = 0;
    `CHECK(valid == 4'b0000 && !full, "empty after reset")
    for (int i = 0; i < 4; i++) begin
      ref_addr[i] = 16'h0100 + 16'(i * 7);
      ref_data[i] = 16'($urandom);
      do_write(ref_addr[i], ref_data[i]);
      `CHECK(valid == 4'((1 << (i + 1)) - 1), $sformatf("entry %0d allocated, valid=%b", i, valid))
    end
    `CHECK(full, "full with four entries")
    // update a held address in place
    ref_data[2] = 16'hCAFE;
    do_write(ref_addr[2], ref_data[2]);
    `CHECK(valid == 4'b1111, "update does not allocate")
    // core lookups
    for (int i = 0; i < 4; i++) begin
      addr = ref_addr[i]; #1;
      `CHECK(hit && hit_data == ref_data[i], $sformatf("lookup %h: hit=%b data=%h", addr, hit, hit_data))
    end
    addr = 16'h0777; #1;
    `CHECK(!hit, "miss on an address not held")
    // snoop lookups
    for (int i = 0; i < 4; i++) begin
      snp_addr = ref_addr[i]; #1;
      `CHECK(snp_hit, "snoop hit on a held address")
    end
    snp_addr = 16'h0101; #1;
    `CHECK(!snp_hit, "no snoop hit on another address")
    // full: a new address is refused
    do_write(16'h0999, 16'h1111);
    addr = 16'h0999; #1;
    `CHECK(!hit && valid == 4'b1111, "full cache refuses a new address")
    // write-back read-out
    for (int i = 0; i < 4; i++) begin
      rd_idx = 2'(i); #1;
      `CHECK(rd_addr == ref_addr[i] && rd_data == ref_data[i], $sformatf("read-out of entry %0d", i))
    end
    // clear entry 1, then a new address takes entry 1
    @(negedge clock);
    rd_idx = 2'd1; clr = 1;
    @(posedge clock); #1;
    clr = 0;
    `CHECK(valid == 4'b1101, "entry 1 cleared")
    addr = ref_addr[1]; #1;
    `CHECK(!hit, "cleared entry no longer hits")
    ref_addr[1] = 16'h0999; ref_data[1] = 16'h2222;
    do_write(ref_addr[1], ref_data[1]);
    `CHECK(valid == 4'b1111, "lowest free entry reused")
    rd_idx = 2'd1; #1;
    `CHECK(rd_addr == 16'h0999 && rd_data == 16'h2222, "new tag in entry 1")
    // flush
    @(negedge clock);
    flush = 1;
    @(posedge clock); #1;
    flush = 0;
    `CHECK(valid == 4'b0000, "flush empties the cache")
    snp_addr = ref_addr[0]; addr = ref_addr[0]; #1;
    `CHECK(!snp_hit && !hit, "no hits after flush")
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

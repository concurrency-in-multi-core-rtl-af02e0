// Testbench for data_select: random requests and data with a one-hot or empty
// enable vector. The RAM-side address, READ, WRITE and write data must come
// from the enabled core only; read data must reach only the enabled reader.
`include "tb_check.svh"
module tb_data_select;
  int checks = 0, failures = 0;
  logic [3:0]        enable, read, write, rdata_oe;
  logic [3:0][15:0]  addr, wdata, rdata;
  logic [15:0]       mem_addr, mem_wdata, mem_rdata;
  logic              mem_read, mem_write, mem_wdata_oe;

  data_select #(.NUM_CORES(4), .ADDR_W(16), .DATA_W(16)) dut (
    .enable(enable), .cpu_addr(addr), .cpu_read(read), .cpu_write(write),
    .cpu_wdata(wdata), .cpu_rdata(rdata), .cpu_rdata_oe(rdata_oe),
    .mem_addr(mem_addr), .mem_read(mem_read), .mem_write(mem_write),
    .mem_wdata(mem_wdata), .mem_wdata_oe(mem_wdata_oe), .mem_rdata(mem_rdata));

  initial begin
    for (int t = 0; t < 400; t++) begin
      int owner;
      for (int n = 0; n < 4; n++) begin
        addr[n]  = 16'($urandom);
        wdata[n] = 16'($urandom);
        read[n]  = $urandom_range(0, 1) == 1;
        write[n] = !read[n] && ($urandom_range(0, 1) == 1);
      end
      mem_rdata = 16'($urandom);
      owner = $urandom_range(0, 4);  // 4 = nobody
      enable = (owner < 4) ? (4'b0001 << owner) : 4'b0000;
      #1;
      if (owner < 4) begin
        `CHECK(mem_addr == addr[owner], "address from the enabled core")
        `CHECK(mem_read == read[owner] && mem_write == write[owner], "READ/WRITE from the enabled core")
        `CHECK(mem_wdata_oe == write[owner], "data driven to RAM only on a write")
        if (write[owner]) `CHECK(mem_wdata == wdata[owner], "write data from the enabled core")
      end else begin
        `CHECK(mem_addr == 16'h0 && !mem_read && !mem_write && !mem_wdata_oe, "idle bus when nobody is enabled")
      end
      for (int n = 0; n < 4; n++) begin
        logic exp_oe;
        exp_oe = (owner == n) && read[n];
        `CHECK(rdata_oe[n] == exp_oe, $sformatf("core %0d read-data enable", n))
        `CHECK(rdata[n] == (exp_oe ? mem_rdata : 16'h0), $sformatf("core %0d read data", n))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

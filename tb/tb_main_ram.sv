// Testbench for main_ram at its full 64K x 16 size: random writes recorded in
// a shadow associative array, then random reads of written addresses, plus
// checks that a write lands only at the rising edge and that a cycle without
// WRITE changes nothing.
`include "tb_check.svh"
module tb_main_ram;
  int checks = 0, failures = 0;
  logic        clock = 1'b0, read, write;
  logic [15:0] addr, wdata, rdata;
  logic [15:0] shadow [int];

  main_ram dut (.clock(clock), .addr(addr), .read(read), .write(write), .wdata(wdata), .rdata(rdata));

  always #5 clock = ~clock;

  initial begin
    read = 0; write = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clock);
      addr  = 16'($urandom);
      wdata = 16'($urandom);
      write = 1'b1;
      @(posedge clock);
      shadow[int'(addr)] = wdata;
    end
    @(negedge clock);
    write = 1'b0;
    // a write is not visible before its edge
    addr = 16'h1234; wdata = 16'hBEEF; write = 1'b1;
    @(posedge clock); #1;
    `CHECK(rdata == 16'hBEEF, "write stored at the edge")
    shadow[32'h1234] = 16'hBEEF;
    @(negedge clock);
    wdata = 16'h0F0F; write = 1'b0;
    @(posedge clock); #1;
    `CHECK(rdata == 16'hBEEF, "no store without WRITE")
    write = 1'b0; read = 1'b1;
    foreach (shadow[a]) begin
      addr = 16'(a);
      #1;
      `CHECK(rdata == shadow[a], $sformatf("addr %h read %h expected %h", a, rdata, shadow[a]))
    end
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

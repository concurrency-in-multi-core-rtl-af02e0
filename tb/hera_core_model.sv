// hera_core_model: behavioural stand-in for one HERA core, for testbenches
// only. It is not the HERA processor: it executes just the handful of
// instruction words that the example programs use, one instruction per rising
// edge of its (possibly held) clock, with 16 registers of which R0 reads 0.
//
//   16'h0000          halt (the program counter stops)
//   16'hE d vv        R[d] = sign-extended 8-bit vv
//   16'hA d a b       R[d] = R[a] + R[b]
//   16'h4 d o b       R[d] = M[R[b] + o]       (load, 4-bit offset o)
//   16'h6 d o b       M[R[b] + o] = R[d]       (store)
//   16'h1112 / 1113   transaction start / end (acted on by the tm_unit)
//   anything else     no operation
//
// Memory requests are combinational from the current instruction; load data
// is taken at the clock edge that ends the instruction. When the tm_unit
// reports an abort at a clock edge, the model branches back to its last TRST
// instead of executing, or, when fail/exception is also high, skips forward
// without executing until just past the next TREND.
module hera_core_model (
  input  logic                   clk,
  input  logic                   reset,
  input  logic [15:0]            instr,
  output logic [15:0]            pc,
  output logic [15:0]            addr,
  output logic                   read,
  output logic                   write,
  output logic [15:0]            wdata,
  input  logic [15:0]            rdata,
  input  logic                   aborted,
  input  logic                   fail,
  input  logic                   exception,
  output logic                   halted,
  output logic [15:0][15:0]      regs
);

  logic [15:0] trst_pc;
  logic        skipping;
  logic [3:0]  op, fd, fa, fb;

  assign {op, fd, fa, fb} = instr;
  assign halted = (instr == 16'h0000) && !skipping;

  always_comb begin
    addr  = regs[fb] + 16'(fa);
    wdata = regs[fd];
    read  = !skipping && (op == 4'h4);
    write = !skipping && (op == 4'h6);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      pc       <= '0;
      regs     <= '0;
      trst_pc  <= '0;
      skipping <= 1'b0;
    end else if (aborted) begin
      if (fail || exception) begin
        pc       <= trst_pc + 16'd1;
        skipping <= 1'b1;
      end else begin
        pc <= trst_pc;
      end
    end else if (skipping) begin
      if (instr == 16'h1113) skipping <= 1'b0;
      pc <= pc + 16'd1;
    end else begin
      unique case (op)
        4'h0: if (instr != 16'h0000) pc <= pc + 16'd1;
        4'h1: begin
          if (instr == 16'h1112) trst_pc <= pc;
          pc <= pc + 16'd1;
        end
        4'hE: begin
          if (fd != 4'd0) regs[fd] <= {{8{fa[3]}}, fa, fb};
          pc <= pc + 16'd1;
        end
        4'hA: begin
          if (fd != 4'd0) regs[fd] <= regs[fa] + regs[fb];
          pc <= pc + 16'd1;
        end
        4'h4: begin
          if (fd != 4'd0) regs[fd] <= rdata;
          pc <= pc + 16'd1;
        end
        default: pc <= pc + 16'd1;
      endcase
    end
  end

endmodule

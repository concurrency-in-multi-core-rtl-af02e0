// tm_unit: transactional-memory support for one core, placed between the
// core's memory port and the bus arbitrator.
//
// Instructions. The unit watches the core's current instruction word. TRST
// (16'h1112) starts a transaction and sets TFLAG; TREND (16'h1113) ends it
// with a commit. TFLAG lives here rather than among the ALU flags.
//
// Inside a transaction:
//   - stores go to the transactional_cache, not to the bus, so they never
//     stall the core;
//   - loads of an address the cache holds are answered from the cache;
//     other loads go to main memory over the bus;
//   - a load that is granted the bus while another core's cache holds that
//     address (`conflict`, gathered from the other units' `snoop_hit`) aborts
//     this transaction;
//   - a bus write by another core to an address this cache holds also aborts
//     this transaction;
//   - a store that finds the cache full raises `exception` and abandons the
//     transaction.
// On TREND the unit holds the core (`hold`, ORed into the core clock) and
// writes every valid entry to main memory through the arbitrator, one bus
// write per granted cycle, lowest entry first; then TFLAG clears and the core
// moves past TREND. Commit writes are not aborted once started.
//
// Abort: the cache is flushed without touching memory, TFLAG clears, the
// attempt counter increments and `aborted` is raised until the core's next
// clock edge, at which the core must branch back to its TRST (or, when
// `fail` is high after the third failed attempt or after an exception, to
// just past its TREND). Memory operations the core issues while `aborted` is
// pending are dropped. The counter clears after a commit, and at a TRST
// that follows a failure.
//
// Outside a transaction the core's port passes straight through.
//
// Timing: all state changes at the rising edge of the system clock. The core
// advances at that edge only when neither its stop_clock (`core_stop`) nor
// `hold` keeps its clock high. Combinational paths: core port and unit state
// to bus outputs and `hold`; bus signals to `snoop_hit`.
//
// What follows the description: TRST/TREND words, TFLAG, write buffering,
// read-abort on another core's cache, commit through the arbitrator, flush on
// abort, at most three attempts, exception on a full cache. This design's
// choices: abort on a foreign bus write to a held address, the hold signal,
// the one-cycle abort handshake, and commit order.
module tm_unit #(
  parameter int unsigned ENTRIES      = hera_pkg::TC_ENTRIES,
  parameter int unsigned ADDR_W       = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W       = hera_pkg::DATA_W,
  parameter int unsigned MAX_ATTEMPTS = hera_pkg::MAX_ATTEMPTS,
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned CNT_W = $clog2(MAX_ATTEMPTS + 1)
) (
  input  logic              clock,
  input  logic              reset,
  // core side
  input  logic [15:0]       instr,
  input  logic [ADDR_W-1:0] core_addr,
  input  logic              core_read,
  input  logic              core_write,
  input  logic [DATA_W-1:0] core_wdata,
  output logic [DATA_W-1:0] core_rdata,
  input  logic              core_stop,
  output logic              hold,
  output logic              tflag,
  output logic              aborted,
  output logic              fail,
  output logic              exception,
  output logic              committing,
  // bus side (towards the arbitrator)
  output logic [ADDR_W-1:0] bus_addr,
  output logic              bus_read,
  output logic              bus_write,
  output logic [DATA_W-1:0] bus_wdata,
  input  logic [DATA_W-1:0] bus_rdata,
  input  logic              grant,
  // snooping of the shared RAM bus
  input  logic [ADDR_W-1:0] snp_addr,
  input  logic              snp_read,
  input  logic              snp_write,
  output logic              snoop_hit,
  input  logic              conflict
);

  import hera_pkg::*;

  logic               is_trst, is_trend, advance;
  logic               tx_read, tx_write;
  logic               c_hit, c_full, c_snp_hit, c_flush, c_wr, c_clr;
  logic [DATA_W-1:0]  c_hit_data, c_rd_data;
  logic [ADDR_W-1:0]  c_rd_addr;
  logic [ENTRIES-1:0] c_valid;
  logic [IDX_W-1:0]   c_rd_idx;
  logic               ev_read_abort, ev_write_abort, ev_overflow, ev_abort;
  logic               ev_commit_start, ev_commit_done;
  logic [CNT_W-1:0]   attempts;

  assign is_trst  = (instr == OP_TRST);
  assign is_trend = (instr == OP_TREND);
  assign hold     = committing || (tflag && is_trend && !aborted);
  assign advance  = !core_stop && !hold;

  assign tx_read  = tflag && !committing && !aborted && core_read;
  assign tx_write = tflag && !committing && !aborted && core_write;

  // Lowest valid entry for write-back.
  always_comb begin
    c_rd_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (c_valid[i]) c_rd_idx = IDX_W'(i);
  end

  // Bus side.
  always_comb begin
    bus_addr  = core_addr;
    bus_wdata = core_wdata;
    bus_read  = 1'b0;
    bus_write = 1'b0;
    if (committing) begin
      bus_addr  = c_rd_addr;
      bus_wdata = c_rd_data;
      bus_write = |c_valid;
    end else if (aborted) begin
      // operations of an aborted transaction are dropped
    end else if (tflag) begin
      bus_read = core_read && !c_hit;
    end else begin
      bus_read  = core_read;
      bus_write = core_write;
    end
  end

  assign core_rdata = (tx_read && c_hit) ? c_hit_data : bus_rdata;

  // Another core's granted read of an address held here.
  assign snoop_hit = tflag && snp_read && !grant && c_snp_hit;

  assign ev_read_abort   = tx_read && bus_read && grant && conflict;
  assign ev_write_abort  = tflag && !committing && !aborted && snp_write && !grant && c_snp_hit;
  assign ev_overflow     = tx_write && advance && !c_hit && c_full;
  assign ev_abort        = ev_read_abort || ev_write_abort || ev_overflow;
  assign ev_commit_start = tflag && !committing && !aborted && is_trend && !ev_abort;
  assign ev_commit_done  = committing && !(|c_valid);

  assign c_wr    = tx_write && advance;  // a flush at the same edge wins
  assign c_clr   = committing && grant && bus_write;
  assign c_flush = ev_abort || ev_commit_done;

  transactional_cache #(.ENTRIES(ENTRIES), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_cache (
    .clock    (clock),
    .reset    (reset),
    .flush    (c_flush),
    .addr     (core_addr),
    .wr       (c_wr),
    .wdata    (core_wdata),
    .hit      (c_hit),
    .hit_data (c_hit_data),
    .full     (c_full),
    .snp_addr (snp_addr),
    .snp_hit  (c_snp_hit),
    .valid    (c_valid),
    .rd_idx   (c_rd_idx),
    .rd_addr  (c_rd_addr),
    .rd_data  (c_rd_data),
    .clr      (c_clr)
  );

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      tflag      <= 1'b0;
      committing <= 1'b0;
      aborted    <= 1'b0;
      exception  <= 1'b0;
      attempts   <= '0;
    end else begin
      if (aborted && advance) begin
        // the core has seen the abort and branches at this edge
        aborted   <= 1'b0;
        exception <= 1'b0;
      end else if (ev_abort) begin
        tflag <= 1'b0;
        aborted <= 1'b1;
        if (ev_overflow) begin
          exception <= 1'b1;
          attempts  <= CNT_W'(MAX_ATTEMPTS);
        end else if (attempts < CNT_W'(MAX_ATTEMPTS)) begin
          attempts <= attempts + CNT_W'(1);
        end
      end else if (ev_commit_start) begin
        committing <= 1'b1;
      end else if (ev_commit_done) begin
        committing <= 1'b0;
        tflag      <= 1'b0;
        attempts   <= '0;
      end else if (!tflag && is_trst && advance) begin
        tflag <= 1'b1;
        if (attempts >= CNT_W'(MAX_ATTEMPTS))
          attempts <= '0;
      end
    end
  end

  assign fail = (attempts >= CNT_W'(MAX_ATTEMPTS));

  // The cache is written only inside a transaction, and never while committing.
  always_comb assert (!(c_wr && committing));

endmodule

// transactional_cache: a small fully associative store for the tentative
// writes of one core's transaction.
//
// Each of the ENTRIES entries holds a memory address (tag), a data word and a
// valid bit. Tags live in two associative_memory arrays written together:
// one is searched with the core's address, the other with the address seen on
// the shared memory bus (snooping), so both searches happen every cycle.
//
//   core port   `hit`/`hit_data` report whether `addr` is held and its data.
//               With `wr` high at a clock edge, a held address is updated in
//               place; otherwise the lowest free entry is allocated. `full`
//               means every entry is valid, so a new address cannot be taken
//               (the write is then ignored; the owner raises an exception).
//   snoop port  `snp_hit` is high when `snp_addr` matches a valid entry.
//   write-back  `valid` shows the occupied entries; `rd_idx` selects one,
//               whose tag and data appear on `rd_addr`/`rd_data`; `clr`
//               frees that entry at the clock edge (after it was written to
//               main memory). `rd_idx` is read only while `wr` is low.
//   abort       `flush` frees all entries at the clock edge.
//
// All lookups are combinational; updates happen at the rising clock edge.
// The address/data organisation, two tag arrays and lowest-free allocation
// are this design's choices.
module transactional_cache #(
  parameter int unsigned ENTRIES = hera_pkg::TC_ENTRIES,
  parameter int unsigned ADDR_W  = hera_pkg::ADDR_W,
  parameter int unsigned DATA_W  = hera_pkg::DATA_W,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clock,
  input  logic               reset,
  input  logic               flush,
  // core port
  input  logic [ADDR_W-1:0]  addr,
  input  logic               wr,
  input  logic [DATA_W-1:0]  wdata,
  output logic               hit,
  output logic [DATA_W-1:0]  hit_data,
  output logic               full,
  // snoop port
  input  logic [ADDR_W-1:0]  snp_addr,
  output logic               snp_hit,
  // write-back port
  output logic [ENTRIES-1:0] valid,
  input  logic [IDX_W-1:0]   rd_idx,
  output logic [ADDR_W-1:0]  rd_addr,
  output logic [DATA_W-1:0]  rd_data,
  input  logic               clr
);

  logic [ENTRIES-1:0]             mis_core, mis_snoop;
  logic [ENTRIES-1:0]             hit_vec, free_onehot, wr_onehot, rd_onehot;
  logic [ENTRIES-1:0]             tag_sel;
  logic [ENTRIES-1:0][DATA_W-1:0] data;
  logic                           alloc;
  logic [ADDR_W-1:0]              unused_q;

  assign hit_vec = valid & ~mis_core;
  assign hit     = |hit_vec;
  assign full    = &valid;
  assign snp_hit = |(valid & ~mis_snoop);

  // Lowest free entry, one-hot.
  assign free_onehot = ~valid & (valid + ENTRIES'(1));
  assign wr_onehot   = hit ? hit_vec : free_onehot;
  assign alloc       = wr && !hit && !full;
  assign rd_onehot   = ENTRIES'(1) << rd_idx;
  assign tag_sel     = wr ? wr_onehot : rd_onehot;

  // Tags searched by the core address; also read out for write-back.
  associative_memory #(.WORDS(ENTRIES), .WIDTH(ADDR_W)) u_tag_core (
    .clock (clock),
    .reset (reset),
    .d     (addr),
    .k     (addr),
    .mk    ({ADDR_W{1'b1}}),
    .we    (alloc),
    .s     (tag_sel),
    .q     (rd_addr),
    .m     (mis_core)
  );

  // Copy of the tags searched by the snooped bus address.
  associative_memory #(.WORDS(ENTRIES), .WIDTH(ADDR_W)) u_tag_snoop (
    .clock (clock),
    .reset (reset),
    .d     (addr),
    .k     (snp_addr),
    .mk    ({ADDR_W{1'b1}}),
    .we    (alloc),
    .s     (wr_onehot),
    .q     (unused_q),
    .m     (mis_snoop)
  );

  always_comb begin
    hit_data = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (hit_vec[i]) hit_data = hit_data | data[i];
  end

  assign rd_data = data[rd_idx];

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      valid <= '0;
    end else if (flush) begin
      valid <= '0;
    end else begin
      if (alloc)
        valid <= valid | free_onehot;
      if (clr && !wr)
        valid[rd_idx] <= 1'b0;
    end
  end

  always_ff @(posedge clock) begin
    if (wr && (hit || !full)) begin
      for (int unsigned i = 0; i < ENTRIES; i++)
        if (wr_onehot[i]) data[i] <= wdata;
    end
  end

  // An address is held at most once.
  always_comb assert ($onehot0(hit_vec));

endmodule

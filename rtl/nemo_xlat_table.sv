// nemo_xlat_table: NEMO translation table, key -> (valid, base index).
//
// The match stage looks up the key derived from a request's address and
// gets back the base index of the telemetry states that the key's primary
// region maps to. An entry that is not valid means the region is not
// tracked and the request is dropped. Entries are 1 + IDX_W bits (14 bits
// for 8,192 states) in a dual-port SRAM: one port reads for the pipeline,
// the other is written by the driver through MMIO to add or remove entries.
//
// Timing: a lookup presented with `re` returns `hit`/`base` on the next
// cycle. A write and a lookup of the same key in the same cycle return the
// old entry. After reset every entry is cleared to invalid over TT_ENTRIES
// cycles (`ready` low); writes during that time are ignored.
//
// From the design: 8,192 entries of 14 bits, dual-port SRAM with one read
// and one write port, one copy per channel. This design's choices: the
// hardware clear after reset and the entry layout (valid bit on top).
module nemo_xlat_table #(
  parameter int unsigned TT_ENTRIES = 8192,
  parameter int unsigned IDX_W      = 13,
  localparam int unsigned KEY_W     = $clog2(TT_ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // driver side (MMIO)
  input  logic             wr_en,
  input  logic [KEY_W-1:0] wr_key,
  input  logic             wr_valid,
  input  logic [IDX_W-1:0] wr_base,
  // pipeline side
  input  logic             rd_en,
  input  logic [KEY_W-1:0] rd_key,
  output logic             hit,
  output logic [IDX_W-1:0] base,
  output logic             ready
);

  typedef struct packed {
    logic             valid;
    logic [IDX_W-1:0] base;
  } entry_t;

  entry_t wr_entry, rd_entry;

  assign wr_entry = '{valid: wr_valid, base: wr_base};

  nemo_sdp_ram #(.DEPTH(TT_ENTRIES), .WIDTH($bits(entry_t))) u_ram (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (wr_en),
    .waddr (wr_key),
    .wdata (wr_entry),
    .re    (rd_en),
    .raddr (rd_key),
    .rdata (rd_entry),
    .ready (ready)
  );

  assign hit  = rd_entry.valid;
  assign base = rd_entry.base;

endmodule

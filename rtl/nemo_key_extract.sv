// nemo_key_extract: first half of a NEMO match stage ("extract key & offset").
//
// For one memory request it decides whether the pipeline tracks it and, if
// so, derives the translation-table key and the sub-region offset:
//   filter : request type (reads, writes or both) and enable bit
//   range  : range_lo <= addr < range_hi  (prefilter before key lookup)
//   key    : ((addr - key_sub) & pri_mask) >> pri_shift
//   offset : (addr & sec_mask) >> sec_shift
// The key selects a power-of-two, size-aligned primary region; the offset
// selects a sub-region inside it and is added later to the base index that
// the translation table returns. A request whose key does not fit the table
// or whose offset does not fit the state array is not passed.
//
// Purely combinational; the caller registers the outputs.
//
// From the design: type filter, range prefilter, mask-and-shift key and
// offset, subtraction in the key path. This design's choices: the order
// subtract-mask-shift, an exclusive upper range bound, and dropping keys or
// offsets that exceed the table sizes instead of wrapping them.
//
// The whole rule record is passed in for uniformity; this stage reads only
// its filter, range and mask/shift fields, so lint reports the operator
// fields as unused.
module nemo_key_extract
  import nemo_pkg::*;
#(
  parameter int unsigned KEY_W = 13,  // translation table has 2**KEY_W entries
  parameter int unsigned IDX_W = 13   // state array has 2**IDX_W states
) (
  input  cfg_t              cfg,
  input  logic              is_write,
  input  logic [63:0]       addr,
  output logic              pass,       // request is tracked and in range
  output logic              type_hit,   // request type selected by the filter
  output logic              range_hit,  // address inside the prefilter range
  output logic [KEY_W-1:0]  key,
  output logic [IDX_W-1:0]  offset
);

  logic [63:0] key_full, off_full;
  logic        key_fits, off_fits;

  always_comb begin
    type_hit  = cfg.enable && (is_write ? cfg.track_wr : cfg.track_rd);
    range_hit = (addr >= cfg.range_lo) && (addr < cfg.range_hi);
    key_full  = ((addr - cfg.key_sub) & cfg.pri_mask) >> cfg.pri_shift;
    off_full  = (addr & cfg.sec_mask) >> cfg.sec_shift;
    key_fits  = (key_full >> KEY_W) == 64'd0;
    off_fits  = (off_full >> IDX_W) == 64'd0;
    key       = key_full[KEY_W-1:0];
    offset    = off_full[IDX_W-1:0];
    pass      = type_hit && range_hit && key_fits && off_fits;
  end

endmodule

// nemo_match_map: second half of a NEMO match stage ("match & map").
//
// Combines the translation-table result with the sub-region offset:
//   if the entry is not valid     -> drop the request
//   idx = base + offset           -> final telemetry state index
// A sum that does not fit the state array (carry out of IDX_W bits) is
// dropped too, so a mis-programmed entry can never touch a state outside
// the array. Purely combinational.
//
// From the design: drop on a missing or invalid key and the base-plus-offset
// arithmetic. This design's choice: dropping on overflow instead of wrapping.
module nemo_match_map #(
  parameter int unsigned IDX_W = 13
) (
  input  logic             entry_valid,
  input  logic [IDX_W-1:0] base,
  input  logic [IDX_W-1:0] offset,
  output logic             match,
  output logic [IDX_W-1:0] idx
);

  logic [IDX_W:0] sum;

  always_comb begin
    sum   = {1'b0, base} + {1'b0, offset};
    idx   = sum[IDX_W-1:0];
    match = entry_valid && !sum[IDX_W];
  end

endmodule

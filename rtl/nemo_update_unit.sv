// nemo_update_unit: NEMO update stage, read-modify-write of telemetry state.
//
// The state SRAM of a channel is organised as lines of LANES (8) 64-bit
// states, so that one telemetry read returns 512 bits. The line holding the
// selected state was read from the SRAM in the previous cycle; this unit
//   - for a monitored request: applies the configured update operator to
//     the selected lane, with the configured constant or the request's data
//     as operand, and writes the line back;
//   - for a telemetry read: returns the line as it was and writes back the
//     line with the read side effect (an update operator or a reset to a
//     configured value) applied to every lane.
// The SRAM has one cycle of read latency, so the line read for this op does
// not yet hold the previous op's write. The unit keeps the last line it
// wrote and forwards it when the line numbers match (`fwd_hit`), so
// back-to-back updates of the same state never stall and never lose a
// count: initiation interval 1.
//
// Timing: inputs in cycle t (with `ram_rdata` for that line), SRAM write at
// the end of cycle t, `upd_*` and `rsp_*` registered, valid in cycle t+1.
//
// From the design: single-cycle update operators, read-modify-write with
// value forwarding instead of stalls, read side effect applied right after
// the data is returned, 512-bit telemetry read. This design's choices:
// whole-line write-back and operand-from-data using the low 64 data bits.
//
// Of the rule record this stage reads only the update and read-side-effect
// fields; lint reports the others as unused.
module nemo_update_unit
  import nemo_pkg::*;
#(
  parameter int unsigned LINE_AW = 10,   // log2 of lines per channel
  parameter int unsigned TAG_W   = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  // op in this cycle
  input  logic                 in_valid,
  input  logic                 in_tread,   // telemetry read, else update
  input  logic [LINE_AW-1:0]   in_line,
  input  logic [LANE_BITS-1:0] in_lane,
  input  logic [STATE_W-1:0]   in_data,    // request data (operand source)
  input  logic [TAG_W-1:0]     in_tag,
  input  logic [LINE_W-1:0]    ram_rdata,
  // SRAM write port
  output logic                 ram_we,
  output logic [LINE_AW-1:0]   ram_waddr,
  output logic [LINE_W-1:0]    ram_wdata,
  // updated state, to the notify stage
  output logic                 upd_valid,
  output logic [STATE_W-1:0]   upd_state,
  // telemetry read response
  output logic                 rsp_valid,
  output logic [TAG_W-1:0]     rsp_tag,
  output logic [LINE_W-1:0]    rsp_data,
  // forwarding used this cycle (observability)
  output logic                 fwd_hit
);

  logic               last_we;
  logic [LINE_AW-1:0] last_line;
  logic [LINE_W-1:0]  last_data;
  logic [LINE_W-1:0]  cur, nxt;
  logic [STATE_W-1:0] operand, new_state;

  always_comb begin
    fwd_hit = in_valid && last_we && (last_line == in_line);
    cur     = fwd_hit ? last_data : ram_rdata;
    operand = cfg.opd_data ? in_data : cfg.upd_operand;
    nxt     = cur;
    new_state = apply_op(cfg.upd_op, cur[in_lane*STATE_W +: STATE_W], operand);
    if (in_tread) begin
      for (int l = 0; l < int'(LANES); l++)
        nxt[l*STATE_W +: STATE_W] = apply_op(cfg.rd_op, cur[l*STATE_W +: STATE_W],
                                             cfg.rd_operand);
    end else begin
      nxt[in_lane*STATE_W +: STATE_W] = new_state;
    end
    ram_we    = in_valid;
    ram_waddr = in_line;
    ram_wdata = nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_we   <= 1'b0;
      last_line <= '0;
      last_data <= '0;
      upd_valid <= 1'b0;
      upd_state <= '0;
      rsp_valid <= 1'b0;
      rsp_tag   <= '0;
      rsp_data  <= '0;
    end else begin
      last_we   <= in_valid;
      last_line <= in_line;
      last_data <= nxt;
      upd_valid <= in_valid && !in_tread;
      upd_state <= new_state;
      rsp_valid <= in_valid && in_tread;
      rsp_tag   <= in_tag;
      rsp_data  <= cur;
    end
  end

endmodule

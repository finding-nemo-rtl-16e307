// nemo_channel: one memory channel's slice of a NEMO telemetry pipeline.
//
// Every pipeline stage is replicated per memory channel so that a pipeline
// keeps up with one request per channel per cycle. The slice owns a copy of
// the translation table and the channel's telemetry state SRAM, and runs a
// four-stage match-update-notify flow with initiation interval 1 and no
// stalls:
//   S1  key/offset extraction and filtering; translation-table read;
//       the update operand field is cut from the address or data
//   S2  match & map: drop on miss, idx = base + offset; state line read
//   S3  update (or telemetry read with side effect), forwarding, write back
//   S4  notify predicate on the new state; telemetry read response
// A telemetry read (`in_tread`) bypasses matching and addresses a state
// line directly; the request tap guarantees that a channel sees at most one
// op per cycle.
//
// Timing: an op presented in cycle 0 is registered into S1 in cycle 1; its
// SRAM write happens at the end of cycle 3; `rsp_valid` is high in cycle 4
// for a telemetry read; `irq` pulses in cycle 5 for an update whose new
// state satisfies the predicate. Monitored requests are ignored until both
// tables have finished their clear after reset (`ready`).
//
// From the design: the stage order, per-channel replication of stages and
// state, table replication per channel, no stalls, forwarding. This
// design's choices: the stage boundaries, the ready gating and the
// ev_* observability pulses.
module nemo_channel
  import nemo_pkg::*;
#(
  parameter int unsigned TT_ENTRIES = 8192,
  parameter int unsigned NUM_STATES = 8192,
  parameter int unsigned TAG_W      = 8,
  localparam int unsigned KEY_W     = $clog2(TT_ENTRIES),
  localparam int unsigned IDX_W     = $clog2(NUM_STATES),
  localparam int unsigned LINES     = NUM_STATES / LANES,
  localparam int unsigned LINE_AW   = $clog2(LINES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  // translation-table write port (from the control registers)
  input  logic               tt_wr_en,
  input  logic [KEY_W-1:0]   tt_wr_key,
  input  logic               tt_wr_valid,
  input  logic [IDX_W-1:0]   tt_wr_base,
  // op input
  input  logic               in_valid,
  input  logic               in_tread,   // telemetry read of line in_line
  input  logic               in_write,   // monitored request is a write
  input  logic [63:0]        in_addr,
  input  logic [STATE_W-1:0] in_data,
  input  logic [LINE_AW-1:0] in_line,
  input  logic [TAG_W-1:0]   in_tag,
  // telemetry read response
  output logic               rsp_valid,
  output logic [TAG_W-1:0]   rsp_tag,
  output logic [LINE_W-1:0]  rsp_data,
  // notify
  output logic               irq,
  output logic               ready,
  // event pulses: filtered, out of range, table miss, counted, forwarded
  output logic               ev_filtered,
  output logic               ev_out_of_range,
  output logic               ev_miss,
  output logic               ev_update,
  output logic               ev_forward
);

  // ---------------- S1 ----------------
  logic               v1, tr1, w1;
  logic [63:0]        a1;
  logic [STATE_W-1:0] d1;
  logic [LINE_AW-1:0] l1;
  logic [TAG_W-1:0]   t1;
  logic               pass1, type_hit1, range_hit1;
  logic [KEY_W-1:0]   key1;
  logic [IDX_W-1:0]   off1;
  logic               tt_ready, st_ready;

  assign ready = tt_ready && st_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; tr1 <= 1'b0; w1 <= 1'b0; a1 <= '0; d1 <= '0; l1 <= '0; t1 <= '0;
    end else begin
      v1  <= in_valid && (in_tread || ready);
      tr1 <= in_tread;
      w1  <= in_write;
      a1  <= in_addr;
      d1  <= in_data;
      l1  <= in_line;
      t1  <= in_tag;
    end
  end

  nemo_key_extract #(.KEY_W(KEY_W), .IDX_W(IDX_W)) u_key (
    .cfg       (cfg),
    .is_write  (w1),
    .addr      (a1),
    .pass      (pass1),
    .type_hit  (type_hit1),
    .range_hit (range_hit1),
    .key       (key1),
    .offset    (off1)
  );

  logic             tt_hit;
  logic [IDX_W-1:0] tt_base;

  nemo_xlat_table #(.TT_ENTRIES(TT_ENTRIES), .IDX_W(IDX_W)) u_tt (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (tt_wr_en),
    .wr_key   (tt_wr_key),
    .wr_valid (tt_wr_valid),
    .wr_base  (tt_wr_base),
    .rd_en    (v1 && !tr1 && pass1),
    .rd_key   (key1),
    .hit      (tt_hit),
    .base     (tt_base),
    .ready    (tt_ready)
  );

  assign ev_filtered     = v1 && !tr1 && !type_hit1;
  assign ev_out_of_range = v1 && !tr1 && type_hit1 && !range_hit1;

  // ---------------- S2 ----------------
  logic               v2, tr2;
  logic [IDX_W-1:0]   off2;
  logic [STATE_W-1:0] d2;
  logic [LINE_AW-1:0] l2;
  logic [TAG_W-1:0]   t2;
  logic               match2;
  logic [IDX_W-1:0]   idx2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; tr2 <= 1'b0; off2 <= '0; d2 <= '0; l2 <= '0; t2 <= '0;
    end else begin
      v2   <= v1 && (tr1 || pass1);
      tr2  <= tr1;
      off2 <= off1;
      d2   <= opd_field(cfg.opd_addr, cfg.opd_shift, cfg.opd_width, a1, d1);   // operand field of the request
      l2   <= l1;
      t2   <= t1;
    end
  end

  nemo_match_map #(.IDX_W(IDX_W)) u_map (
    .entry_valid (tt_hit),
    .base        (tt_base),
    .offset      (off2),
    .match       (match2),
    .idx         (idx2)
  );

  logic               go2;
  logic [LINE_AW-1:0] line2;
  logic [LINE_W-1:0]  st_rdata;
  logic               st_we;
  logic [LINE_AW-1:0] st_waddr;
  logic [LINE_W-1:0]  st_wdata;

  assign go2     = v2 && (tr2 || match2);
  assign line2   = tr2 ? l2 : idx2[IDX_W-1:LANE_BITS];
  assign ev_miss = v2 && !tr2 && !match2;

  nemo_sdp_ram #(.DEPTH(LINES), .WIDTH(LINE_W)) u_state (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (st_we),
    .waddr (st_waddr),
    .wdata (st_wdata),
    .re    (go2),
    .raddr (line2),
    .rdata (st_rdata),
    .ready (st_ready)
  );

  // ---------------- S3 ----------------
  logic                 v3, tr3;
  logic [LINE_AW-1:0]   l3;
  logic [LANE_BITS-1:0] lane3;
  logic [STATE_W-1:0]   d3;
  logic [TAG_W-1:0]     t3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; tr3 <= 1'b0; l3 <= '0; lane3 <= '0; d3 <= '0; t3 <= '0;
    end else begin
      v3    <= go2;
      tr3   <= tr2;
      l3    <= line2;
      lane3 <= idx2[LANE_BITS-1:0];
      d3    <= d2;
      t3    <= t2;
    end
  end

  logic               upd_valid;
  logic [STATE_W-1:0] upd_state;

  nemo_update_unit #(.LINE_AW(LINE_AW), .TAG_W(TAG_W)) u_upd (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg       (cfg),
    .in_valid  (v3),
    .in_tread  (tr3),
    .in_line   (l3),
    .in_lane   (lane3),
    .in_data   (d3),
    .in_tag    (t3),
    .ram_rdata (st_rdata),
    .ram_we    (st_we),
    .ram_waddr (st_waddr),
    .ram_wdata (st_wdata),
    .upd_valid (upd_valid),
    .upd_state (upd_state),
    .rsp_valid (rsp_valid),
    .rsp_tag   (rsp_tag),
    .rsp_data  (rsp_data),
    .fwd_hit   (ev_forward)
  );

  assign ev_update = v3 && !tr3;

  // ---------------- S4 ----------------
  nemo_trigger u_trig (
    .clk       (clk),
    .rst_n     (rst_n),
    .op        (cfg.ntf_op),
    .operand   (cfg.ntf_operand),
    .upd_valid (upd_valid),
    .upd_state (upd_state),
    .irq       (irq)
  );

endmodule

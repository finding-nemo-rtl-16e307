// nemo_pipeline: one NEMO telemetry pipeline (all channels of one MC).
//
// A pipeline carries one telemetry: its control registers hold the rule,
// and one nemo_channel slice per memory channel applies it to that
// channel's requests in parallel, each with its own translation-table copy
// and telemetry state SRAM. Every monitored request of every channel is
// presented to every pipeline; a telemetry read of this pipeline's state is
// presented only here, on the channel that owns the line.
//
// Interface: per-channel op inputs (see nemo_channel), per-channel read
// responses, an MMIO register port (nemo_pipe_csr) and one interrupt line.
// Timing: as nemo_channel; MMIO reads answer one cycle after the request.
//
// From the design: per-pipeline configuration, per-channel replication of
// the stages, tables and state. This design's choice: the sticky
// per-pipeline interrupt register.
//
// The ev_* vectors collect the channels' per-request event pulses (filtered,
// out of range, unmapped, updated, forwarded). They drive no logic and are
// kept as named probe points for simulation and on-chip debug; lint reports
// them as unused, which is expected.
module nemo_pipeline
  import nemo_pkg::*;
#(
  parameter int unsigned NUM_CH     = 2,
  parameter int unsigned TT_ENTRIES = 8192,
  parameter int unsigned NUM_STATES = 8192,
  parameter int unsigned TAG_W      = 8,
  localparam int unsigned LINE_AW   = $clog2(NUM_STATES / LANES)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // MMIO
  input  logic                            mmio_req,
  input  logic                            mmio_we,
  input  reg_e                            mmio_reg,
  input  logic [63:0]                     mmio_wdata,
  output logic                            mmio_rvalid,
  output logic [63:0]                     mmio_rdata,
  // per-channel ops
  input  logic [NUM_CH-1:0]               in_valid,
  input  logic [NUM_CH-1:0]               in_tread,
  input  logic [NUM_CH-1:0]               in_write,
  input  logic [NUM_CH-1:0][63:0]         in_addr,
  input  logic [NUM_CH-1:0][STATE_W-1:0]  in_data,
  input  logic [NUM_CH-1:0][LINE_AW-1:0]  in_line,
  input  logic [NUM_CH-1:0][TAG_W-1:0]    in_tag,
  // per-channel telemetry read responses
  output logic [NUM_CH-1:0]               rsp_valid,
  output logic [NUM_CH-1:0][TAG_W-1:0]    rsp_tag,
  output logic [NUM_CH-1:0][LINE_W-1:0]   rsp_data,
  output logic                            irq,
  output logic                            ready
);

  localparam int unsigned KEY_W = $clog2(TT_ENTRIES);
  localparam int unsigned IDX_W = $clog2(NUM_STATES);

  cfg_t              cfg;
  logic              tt_wr_en, tt_wr_valid;
  logic [KEY_W-1:0]  tt_wr_key;
  logic [IDX_W-1:0]  tt_wr_base;
  logic [NUM_CH-1:0] ch_irq, ch_ready;
  logic [NUM_CH-1:0] ev_filtered, ev_out_of_range, ev_miss, ev_update, ev_forward;

  assign ready = &ch_ready;

  nemo_pipe_csr #(.NUM_CH(NUM_CH), .TT_ENTRIES(TT_ENTRIES), .NUM_STATES(NUM_STATES)) u_csr (
    .clk          (clk),
    .rst_n        (rst_n),
    .req          (mmio_req),
    .we           (mmio_we),
    .regsel       (mmio_reg),
    .wdata        (mmio_wdata),
    .rvalid       (mmio_rvalid),
    .rdata        (mmio_rdata),
    .cfg          (cfg),
    .tt_wr_en     (tt_wr_en),
    .tt_wr_key    (tt_wr_key),
    .tt_wr_valid  (tt_wr_valid),
    .tt_wr_base   (tt_wr_base),
    .ch_irq       (ch_irq),
    .tables_ready (ready),
    .irq          (irq)
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    nemo_channel #(.TT_ENTRIES(TT_ENTRIES), .NUM_STATES(NUM_STATES), .TAG_W(TAG_W)) u_ch (
      .clk             (clk),
      .rst_n           (rst_n),
      .cfg             (cfg),
      .tt_wr_en        (tt_wr_en),
      .tt_wr_key       (tt_wr_key),
      .tt_wr_valid     (tt_wr_valid),
      .tt_wr_base      (tt_wr_base),
      .in_valid        (in_valid[c]),
      .in_tread        (in_tread[c]),
      .in_write        (in_write[c]),
      .in_addr         (in_addr[c]),
      .in_data         (in_data[c]),
      .in_line         (in_line[c]),
      .in_tag          (in_tag[c]),
      .rsp_valid       (rsp_valid[c]),
      .rsp_tag         (rsp_tag[c]),
      .rsp_data        (rsp_data[c]),
      .irq             (ch_irq[c]),
      .ready           (ch_ready[c]),
      .ev_filtered     (ev_filtered[c]),
      .ev_out_of_range (ev_out_of_range[c]),
      .ev_miss         (ev_miss[c]),
      .ev_update       (ev_update[c]),
      .ev_forward      (ev_forward[c])
    );
  end

endmodule

// nemo_top: NEMO telemetry engine of one memory controller.
//
// NEMO gives the operating system a programmable view of memory traffic:
// every request header the memory controller sees is matched against the
// rules of NUM_PIPES telemetry pipelines, each of which maps the request's
// physical address to a 64-bit counter in on-chip SRAM and updates it with
// a simple operator, optionally raising an interrupt. The OS reads the
// counters back with ordinary loads to a reserved "telemetry region" and
// configures the pipelines through MMIO registers. The engine is off the
// data path: it never stalls or delays the memory requests it observes.
//
// Structure: one nemo_req_tap per channel splits telemetry loads from
// ordinary traffic; ordinary traffic is broadcast to all pipelines; each
// nemo_pipeline holds one telemetry with per-channel match-update-notify
// slices. A server with several memory controllers instantiates one
// nemo_top per controller; the OS merges their counters.
//
// Interface:
//   req_*      per channel, one request header per cycle (valid, write,
//              device address, low 64 data bits, tag)
//   dram_valid per channel: the request continues to DRAM
//   rsp_*      per channel, telemetry read data (512 bits = 8 states)
//   mmio_*     byte address [15:7] selects the pipeline, [6:3] the register
//   irq        one line per pipeline
//   ready      tables cleared after reset; monitored traffic is counted
//              only when ready is high
// Timing: a telemetry load presented in cycle 0 returns in cycle 5
// (rsp_valid); an MMIO read returns in cycle 2.
//
// From the design: 2 channels, 8 pipelines (the largest deployment
// evaluated), 8,192 translation entries and 8,192 64-bit states per channel
// per pipeline, a 32 GiB advertised range of which the upper 16 GiB is the
// telemetry region, interrupts tagged by pipeline. This design's choices:
// the MMIO map, the 8-bit tag, the response latency.
//
// MMIO registers are 8-byte words, so byte-address bits [2:0] are ignored;
// lint reports them as unused.
module nemo_top
  import nemo_pkg::*;
#(
  parameter int unsigned ADDR_W     = 35,
  parameter int unsigned NUM_CH     = 2,
  parameter int unsigned NUM_PIPES  = 8,
  parameter int unsigned TT_ENTRIES = 8192,
  parameter int unsigned NUM_STATES = 8192,
  parameter int unsigned TAG_W      = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // memory request taps
  input  logic [NUM_CH-1:0]              req_valid,
  input  logic [NUM_CH-1:0]              req_write,
  input  logic [NUM_CH-1:0][ADDR_W-1:0]  req_addr,
  input  logic [NUM_CH-1:0][63:0]        req_data,
  input  logic [NUM_CH-1:0][TAG_W-1:0]   req_tag,
  output logic [NUM_CH-1:0]              dram_valid,
  // telemetry read responses
  output logic [NUM_CH-1:0]              rsp_valid,
  output logic [NUM_CH-1:0][TAG_W-1:0]   rsp_tag,
  output logic [NUM_CH-1:0][LINE_W-1:0]  rsp_data,
  // MMIO configuration
  input  logic                           mmio_req,
  input  logic                           mmio_we,
  input  logic [15:0]                    mmio_addr,
  input  logic [63:0]                    mmio_wdata,
  output logic                           mmio_rvalid,
  output logic [63:0]                    mmio_rdata,
  // notifications
  output logic [NUM_PIPES-1:0]           irq,
  output logic                           ready
);

  localparam int unsigned LINES   = NUM_STATES / LANES;
  localparam int unsigned LINE_AW = $clog2(LINES);
  localparam int unsigned PIPE_W  = (NUM_PIPES > 1) ? $clog2(NUM_PIPES) : 1;
  localparam int unsigned RSP_LAT = 4;   // channel input to rsp_valid

  // ---------------- taps ----------------
  logic [NUM_CH-1:0]              mon_valid, trd_valid, trd_null;
  logic [NUM_CH-1:0][PIPE_W-1:0]  trd_pipe;
  logic [NUM_CH-1:0][LINE_AW-1:0] trd_line;
  logic [NUM_CH-1:0][63:0]        addr64;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_tap
    nemo_req_tap #(
      .ADDR_W(ADDR_W), .NUM_CH(NUM_CH), .CH(c), .NUM_PIPES(NUM_PIPES), .LINES(LINES)
    ) u_tap (
      .req_valid  (req_valid[c]),
      .req_write  (req_write[c]),
      .req_addr   (req_addr[c]),
      .dram_valid (dram_valid[c]),
      .mon_valid  (mon_valid[c]),
      .trd_valid  (trd_valid[c]),
      .trd_null   (trd_null[c]),
      .trd_pipe   (trd_pipe[c]),
      .trd_line   (trd_line[c])
    );
    assign addr64[c] = 64'(req_addr[c]);
  end

  // ---------------- MMIO decode ----------------
  logic [8:0] mmio_pipe;
  reg_e       mmio_reg;
  logic       mmio_bad_q;

  assign mmio_pipe = mmio_addr[15:7];
  assign mmio_reg  = reg_e'(mmio_addr[6:3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mmio_bad_q <= 1'b0;
    else        mmio_bad_q <= mmio_req && !mmio_we && (32'(mmio_pipe) >= NUM_PIPES);
  end

  // ---------------- pipelines ----------------
  logic [NUM_PIPES-1:0]                         p_rvalid, p_ready;
  logic [NUM_PIPES-1:0][63:0]                   p_rdata;
  logic [NUM_PIPES-1:0][NUM_CH-1:0]             p_rsp_valid;
  logic [NUM_PIPES-1:0][NUM_CH-1:0][TAG_W-1:0]  p_rsp_tag;
  logic [NUM_PIPES-1:0][NUM_CH-1:0][LINE_W-1:0] p_rsp_data;

  for (genvar p = 0; p < NUM_PIPES; p++) begin : g_pipe
    logic [NUM_CH-1:0] sel, tread;
    for (genvar c = 0; c < NUM_CH; c++) begin : g_sel
      assign tread[c] = trd_valid[c] && !trd_null[c] && (32'(trd_pipe[c]) == p);
      assign sel[c]   = mon_valid[c] || tread[c];
    end

    nemo_pipeline #(
      .NUM_CH(NUM_CH), .TT_ENTRIES(TT_ENTRIES), .NUM_STATES(NUM_STATES), .TAG_W(TAG_W)
    ) u_pipe (
      .clk         (clk),
      .rst_n       (rst_n),
      .mmio_req    (mmio_req && (32'(mmio_pipe) == p)),
      .mmio_we     (mmio_we),
      .mmio_reg    (mmio_reg),
      .mmio_wdata  (mmio_wdata),
      .mmio_rvalid (p_rvalid[p]),
      .mmio_rdata  (p_rdata[p]),
      .in_valid    (sel),
      .in_tread    (tread),
      .in_write    (req_write),
      .in_addr     (addr64),
      .in_data     (req_data),
      .in_line     (trd_line),
      .in_tag      (req_tag),
      .rsp_valid   (p_rsp_valid[p]),
      .rsp_tag     (p_rsp_tag[p]),
      .rsp_data    (p_rsp_data[p]),
      .irq         (irq[p]),
      .ready       (p_ready[p])
    );
  end

  assign ready = &p_ready;

  // ---------------- MMIO read mux ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mmio_rvalid <= 1'b0;
      mmio_rdata  <= '0;
    end else begin
      mmio_rvalid <= (|p_rvalid) || mmio_bad_q;
      mmio_rdata  <= '0;
      for (int p = 0; p < int'(NUM_PIPES); p++)
        if (p_rvalid[p]) mmio_rdata <= p_rdata[p];
    end
  end

  // ---------------- telemetry read responses ----------------
  // Loads that name no state travel through a delay line of the pipeline's
  // latency and return zeros.
  logic [NUM_CH-1:0][RSP_LAT-1:0]            null_v;
  logic [NUM_CH-1:0][RSP_LAT-1:0][TAG_W-1:0] null_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      null_v    <= '0;
      null_tag  <= '0;
      rsp_valid <= '0;
      rsp_tag   <= '0;
      rsp_data  <= '0;
    end else begin
      for (int c = 0; c < int'(NUM_CH); c++) begin
        null_v[c]   <= {null_v[c][RSP_LAT-2:0], trd_valid[c] && trd_null[c]};
        null_tag[c] <= {null_tag[c][RSP_LAT-2:0], req_tag[c]};
        rsp_valid[c] <= null_v[c][RSP_LAT-1];
        rsp_tag[c]   <= null_tag[c][RSP_LAT-1];
        rsp_data[c]  <= '0;
        for (int p = 0; p < int'(NUM_PIPES); p++) begin
          if (p_rsp_valid[p][c]) begin
            rsp_valid[c] <= 1'b1;
            rsp_tag[c]   <= p_rsp_tag[p][c];
            rsp_data[c]  <= p_rsp_data[p][c];
          end
        end
      end
    end
  end

endmodule

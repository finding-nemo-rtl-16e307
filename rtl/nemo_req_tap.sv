// nemo_req_tap: request tap of one memory channel in front of NEMO.
//
// NEMO observes memory traffic off the data path. The memory controller
// hands every request header of the channel to this tap, which classifies
// it in the same cycle:
//   - an ordinary request goes on to DRAM (`dram_valid`) and, as a
//     monitoring copy, to every telemetry pipeline (`mon_valid`);
//   - a request to the telemetry region (upper half of the device address
//     range) does not reach DRAM or the monitoring path. A load there is a
//     telemetry read: the tap decodes which pipeline and which 512-bit state
//     line it names (`trd_*`). A store there is discarded.
// Telemetry-region layout, from byte offset 0: pipeline p occupies
// NUM_CH * LINES cache lines; inside it, consecutive 64-byte cache lines
// alternate between channels exactly as DRAM lines do, so line n of
// channel c is at cache line n * NUM_CH + c. A load whose cache line does
// not belong to this channel, or that names a pipeline beyond NUM_PIPES,
// is flagged `trd_null` and answered with zeros.
//
// Purely combinational.
//
// From the design: taps are off the data path, headers are broadcast to all
// pipelines, a 2x advertised range whose upper half returns telemetry
// state, channel chosen by cache-line address parity. This design's
// choices: the layout of the telemetry region, zero data for loads that
// name no state, discarding stores to the region.
module nemo_req_tap
  import nemo_pkg::*;
#(
  parameter int unsigned ADDR_W    = 35,   // 32 GiB advertised range
  parameter int unsigned NUM_CH    = 2,
  parameter int unsigned CH        = 0,    // this channel's index
  parameter int unsigned NUM_PIPES = 8,
  parameter int unsigned LINES     = 1024, // state lines per channel
  localparam int unsigned PIPE_W   = (NUM_PIPES > 1) ? $clog2(NUM_PIPES) : 1,
  localparam int unsigned LINE_AW  = $clog2(LINES)
) (
  input  logic               req_valid,
  input  logic               req_write,
  input  logic [ADDR_W-1:0]  req_addr,
  output logic               dram_valid,
  output logic               mon_valid,
  output logic               trd_valid,
  output logic               trd_null,
  output logic [PIPE_W-1:0]  trd_pipe,
  output logic [LINE_AW-1:0] trd_line
);

  logic        in_region;
  logic [63:0] cl, pipe_full;

  always_comb begin
    in_region  = req_addr[ADDR_W-1];
    dram_valid = req_valid && !in_region;
    mon_valid  = req_valid && !in_region;
    trd_valid  = req_valid && in_region && !req_write;
    cl         = 64'(req_addr[ADDR_W-2:0]) >> CL_BITS;
    pipe_full  = cl / 64'(NUM_CH * LINES);
    trd_pipe   = PIPE_W'(pipe_full);
    trd_line   = LINE_AW'(cl / 64'(NUM_CH));
    trd_null   = (cl % 64'(NUM_CH)) != 64'(CH) || pipe_full >= 64'(NUM_PIPES);
  end

endmodule

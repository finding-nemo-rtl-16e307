// nemo_sdp_ram: simple dual-port synchronous RAM with a clear sweep.
//
// One write port and one read port, both registered with a latency of one
// cycle, as the block RAM the telemetry tables are built from. A read in
// the same cycle as a write to the same word returns the old word (read
// first); callers that need the new value forward it themselves.
//
// SRAM contents are undefined at power-up, so after reset the RAM writes
// zero to every word, one word per cycle, and holds `ready` low until done
// (DEPTH cycles). Writes from the port are ignored while the sweep runs.
// The sweep is this design's own choice; the prototype's tables are cleared
// by software.
module nemo_sdp_ram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  output logic             ready
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    clr_addr;
  logic             clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(DEPTH - 1)) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)  mem[clr_addr] <= '0;
    else if (we)   mem[waddr]    <= wdata;
    if (re)        rdata         <= mem[raddr];
  end

  assign ready = !clearing;

endmodule

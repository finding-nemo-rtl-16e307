// tb_nemo_sdp_ram: checks the telemetry state SRAM: the clear sweep after
// reset (ready timing, all words zero), one-cycle read latency, read-first
// behaviour on a same-cycle write, and random traffic against a model.
module tb_nemo_sdp_ram;
  localparam int DEPTH = 64, WIDTH = 512;
  logic clk = 0, rst_n = 0;
  logic we, re, ready;
  logic [5:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0, cyc = 0;

  nemo_sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] r;
    for (int i = 0; i < WIDTH / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    int c0;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; c0 = cyc;
    while (!ready) @(posedge clk);
    checks++;
    if (cyc - c0 != DEPTH) begin failures++; $display("FAIL clear took %0d", cyc - c0); end
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    // check cleared contents
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); re = 1; raddr = 6'(i);
      @(negedge clk); re = 0; checks++;
      if (rdata !== '0) begin failures++; $display("FAIL not cleared %0d", i); end
    end
    // read-first: write and read the same word in one cycle
    @(negedge clk); we = 1; waddr = 5; wdata = rnd(); re = 1; raddr = 5;
    @(negedge clk); we = 0; re = 0; checks++;
    if (rdata !== '0) begin failures++; $display("FAIL read-first"); end
    model[5] = wdata;
    // random
    repeat (3000) begin
      logic [WIDTH-1:0] exp;
      @(negedge clk);
      re = 1; raddr = 6'($urandom); exp = model[raddr];
      we = $urandom_range(0, 1); waddr = 6'($urandom); wdata = rnd();
      if (we) model[waddr] = wdata;
      @(negedge clk); we = 0; re = 0; checks++;
      if (rdata !== exp) begin failures++; $display("FAIL rd %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 20000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nemo_pipeline: one pipeline at reduced size (256 entries, 256 states)
// with both channels active. The rule is installed through the MMIO port;
// the testbench then streams requests into both channels, interleaves
// telemetry reads, and checks each response (data, tag, latency 4), that
// the channels keep separate state, that a translation entry written once
// is seen by both channels' table copies, and the interrupt line and its
// per-channel status bits.
module tb_nemo_pipeline;
  import nemo_pkg::*;
  import nemo_tb_pkg::*;
  localparam int NCH = 2, N = 256, NL = N / 8;
  logic clk = 0, rst_n = 0;
  logic mmio_req, mmio_we, mmio_rvalid, irq, ready;
  reg_e mmio_reg;
  logic [63:0] mmio_wdata, mmio_rdata;
  logic [NCH-1:0] in_valid, in_tread, in_write, rsp_valid;
  logic [NCH-1:0][63:0] in_addr, in_data;
  logic [NCH-1:0][4:0] in_line;
  logic [NCH-1:0][7:0] in_tag, rsp_tag;
  logic [NCH-1:0][511:0] rsp_data;

  nemo_pipeline #(.NUM_CH(NCH), .TT_ENTRIES(N), .NUM_STATES(N), .TAG_W(8)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, n_irq = 0;
  cfg_t cfg;
  bit tt_v [N];
  int tt_b [N];
  logic [63:0] gold [NCH][N];
  bit pend [NCH];
  logic [511:0] exp_rsp [NCH][int];
  logic [7:0] exp_tag [NCH][int];

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (rsp_valid[c] !== exp_rsp[c].exists(cyc) ||
          (rsp_valid[c] && (rsp_data[c] !== exp_rsp[c][cyc] || rsp_tag[c] !== exp_tag[c][cyc]))) begin
        failures++; $display("FAIL rsp ch%0d at %0d", c, cyc);
      end
    end
  end

  task automatic wr(reg_e r, logic [63:0] d);
    @(negedge clk); in_valid = 0;
    mmio_req = 1; mmio_we = 1; mmio_reg = r; mmio_wdata = d;
    @(negedge clk); mmio_req = 0; mmio_we = 0;
  endtask

  task automatic rd(reg_e r, output logic [63:0] d);
    @(negedge clk); in_valid = 0; mmio_req = 1; mmio_we = 0; mmio_reg = r;
    @(posedge clk); #1; mmio_req = 0; d = mmio_rdata;
    checks++;
    if (!mmio_rvalid) begin failures++; $display("FAIL rvalid"); end
  endtask

  initial begin
    logic [63:0] d;
    in_valid = 0; in_tread = 0; in_write = 0; in_addr = '0; in_data = '0; in_line = '0;
    in_tag = '0; mmio_req = 0; mmio_we = 0; mmio_reg = REG_CTRL; mmio_wdata = 0;
    for (int i = 0; i < N; i++) begin tt_v[i] = 0; tt_b[i] = 0; gold[0][i] = 0; gold[1][i] = 0; end
    pend[0] = 0; pend[1] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (!ready) @(posedge clk);
    rd(REG_STATUS, d); checks++;
    if (d !== 64'd1) begin failures++; $display("FAIL status"); end
    // rule: 64 KiB regions, 8 KiB sub-regions, add, notify >= 12, reset on read
    cfg = '0; cfg.enable = 1; cfg.track_rd = 1; cfg.track_wr = 1; cfg.range_hi = '1;
    cfg.pri_mask = '1; cfg.pri_shift = 16; cfg.sec_mask = 64'hE000; cfg.sec_shift = 13;
    cfg.upd_op = OP_ADD; cfg.upd_operand = 1; cfg.ntf_op = CMP_GE; cfg.ntf_operand = 12;
    cfg.rd_op = OP_SET; cfg.rd_operand = 0;
    wr(REG_PRI_MASK, cfg.pri_mask); wr(REG_PRI_SHIFT, 16); wr(REG_SEC_MASK, cfg.sec_mask);
    wr(REG_SEC_SHIFT, 13); wr(REG_UPD_OPERAND, 1); wr(REG_NTF_OPERAND, 12);
    wr(REG_OPS, 64'h0006_0201); wr(REG_CTRL, 64'h7);
    for (int k = 0; k < 32; k++) begin
      tt_v[k] = (k % 5) != 4; tt_b[k] = (k % 31) * 8;
      wr(REG_TT_WRITE, (64'(k) << 32) | (64'(tt_v[k]) << 16) | 64'(tt_b[k]));
    end
    repeat (4000) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        int r;
        r = $urandom_range(0, 19);
        in_valid[c] = r != 0; in_tread[c] = r == 1; in_tag[c] = 8'($urandom);
        in_write[c] = $urandom_range(0, 1); in_data[c] = 0;
        if (r == 1) begin
          int l;
          logic [511:0] line;
          l = $urandom_range(0, NL - 1); in_line[c] = 5'(l);
          for (int k = 0; k < 8; k++) begin
            line[k*64 +: 64] = gold[c][l*8 + k]; gold[c][l*8 + k] = 0;
          end
          exp_rsp[c][cyc + 4] = line; exp_tag[c][cyc + 4] = in_tag[c];
        end else if (r != 0) begin
          int k, o;
          k = $urandom_range(0, 35); o = $urandom_range(0, 7);
          in_addr[c] = (64'(k) << 16) | (64'(o) << 13) | 64'($urandom_range(0, 8191));
          if (k < N && tt_v[k]) begin
            gold[c][tt_b[k] + o] += 1;
            if (gold[c][tt_b[k] + o] >= 12) begin pend[c] = 1; n_irq++; end
          end
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    rd(REG_IRQ, d); checks++;
    if (d[1:0] !== {pend[1], pend[0]} || irq !== (pend[0] || pend[1])) begin
      failures++; $display("FAIL irq status %b", d[1:0]);
    end
    // final sweep of both channels
    for (int l = 0; l < NL; l++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        logic [511:0] line;
        in_valid[c] = 1; in_tread[c] = 1; in_line[c] = 5'(l); in_tag[c] = 8'(l);
        for (int k = 0; k < 8; k++) begin
          line[k*64 +: 64] = gold[c][l*8 + k]; gold[c][l*8 + k] = 0;
        end
        exp_rsp[c][cyc + 4] = line; exp_tag[c][cyc + 4] = in_tag[c];
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (n_irq == 0) begin failures++; $display("FAIL no interrupt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 50000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

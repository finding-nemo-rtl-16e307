// tb_nemo_update_unit: drives the update stage with a modelled one-cycle
// SRAM (read first) and checks, against a sequential reference, every
// update operator with constant and request-data operands, back-to-back
// updates of the same line (which need forwarding), telemetry reads with
// every side effect, and the one-cycle latency of upd_* and rsp_*.
module tb_nemo_update_unit;
  import nemo_pkg::*;
  import nemo_tb_pkg::*;
  localparam int LAW = 3, NL = 8;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_tread;
  logic [LAW-1:0] in_line;
  logic [2:0] in_lane;
  logic [63:0] in_data;
  logic [7:0] in_tag;
  logic [511:0] ram_rdata;
  logic ram_we;
  logic [LAW-1:0] ram_waddr;
  logic [511:0] ram_wdata;
  logic upd_valid, rsp_valid, fwd_hit;
  logic [63:0] upd_state;
  logic [7:0] rsp_tag;
  logic [511:0] rsp_data;
  logic [511:0] sram [NL];     // what the block has written
  logic [63:0]  gold [NL*8];   // sequential reference
  int checks = 0, failures = 0, cyc = 0, fwd_count = 0;
  int ops_seen [7];

  nemo_update_unit #(.LINE_AW(LAW), .TAG_W(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // modelled SRAM: the line of the op in S3 was read one cycle earlier
  logic [LAW-1:0] next_line;
  always @(posedge clk) begin
    ram_rdata <= sram[next_line];
    if (ram_we) sram[ram_waddr] <= ram_wdata;
    if (fwd_hit) fwd_count++;
  end

  // expected outputs, one cycle later
  bit exp_upd_v, exp_rsp_v;
  logic [63:0] exp_state;
  logic [511:0] exp_line;
  logic [7:0] exp_tag;

  always @(posedge clk) begin
    #1;
    if (rst_n && cyc > 3) begin
      checks++;
      if (upd_valid !== exp_upd_v || (exp_upd_v && upd_state !== exp_state)) begin
        failures++; $display("FAIL upd v=%0d state=%h exp %0d %h", upd_valid, upd_state,
                             exp_upd_v, exp_state);
      end
      checks++;
      if (rsp_valid !== exp_rsp_v || (exp_rsp_v && (rsp_data !== exp_line || rsp_tag !== exp_tag))) begin
        failures++; $display("FAIL rsp v=%0d", rsp_valid);
      end
    end
  end

  initial begin
    cfg = '0; in_valid = 0; in_tread = 0; in_line = 0; in_lane = 0; in_data = 0; in_tag = 0;
    next_line = 0;
    for (int i = 0; i < NL; i++) sram[i] = '0;
    for (int i = 0; i < NL * 8; i++) gold[i] = '0;
    foreach (ops_seen[i]) ops_seen[i] = 0;
    exp_upd_v = 0; exp_rsp_v = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    next_line = 3'($urandom);
    repeat (6000) begin
      logic [LAW-1:0] l;
      @(negedge clk);
      // the op now in S3 uses the line the modelled SRAM read last edge
      l = next_line;
      next_line = ($urandom_range(0, 2) == 0) ? l : LAW'($urandom);
      in_valid = $urandom_range(0, 7) != 0;
      in_tread = $urandom_range(0, 9) == 0;
      in_line = l; in_lane = 3'($urandom);
      in_data = 64'($urandom_range(0, 9));
      in_tag = 8'($urandom);
      if ($urandom_range(0, 30) == 0) begin
        cfg.upd_op = upd_op_e'($urandom_range(1, 5));
        cfg.rd_op = upd_op_e'($urandom_range(0, 6));
        cfg.opd_data = $urandom_range(0, 1);
        cfg.upd_operand = 64'($urandom_range(1, 5));
        cfg.rd_operand = 64'($urandom_range(0, 3));
      end
      // reference
      exp_upd_v = in_valid && !in_tread;
      exp_rsp_v = in_valid && in_tread;
      exp_tag = in_tag;
      if (in_valid && in_tread) begin
        for (int k = 0; k < 8; k++) begin
          exp_line[k*64 +: 64] = gold[l*8 + k];
          gold[l*8 + k] = ref_op(int'(cfg.rd_op), gold[l*8 + k], cfg.rd_operand);
        end
        ops_seen[int'(cfg.rd_op)]++;
      end else if (in_valid) begin
        gold[l*8 + in_lane] = ref_op(int'(cfg.upd_op), gold[l*8 + in_lane],
                                     cfg.opd_data ? in_data : cfg.upd_operand);
        exp_state = gold[l*8 + in_lane];
        ops_seen[int'(cfg.upd_op)]++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    // final contents
    for (int i = 0; i < NL * 8; i++) begin
      checks++;
      if (sram[i/8][(i%8)*64 +: 64] !== gold[i]) begin
        failures++; $display("FAIL final state %0d", i);
      end
    end
    checks++;
    if (fwd_count == 0) begin failures++; $display("FAIL forwarding never used"); end
    for (int i = 1; i < 7; i++) begin
      checks++;
      if (ops_seen[i] == 0) begin failures++; $display("FAIL op %0d never used", i); end
    end
    $display("forwarded=%0d", fwd_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 20000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

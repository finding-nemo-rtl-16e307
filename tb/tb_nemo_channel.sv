// tb_nemo_channel: end-to-end check of one channel slice at reduced size
// (256 table entries, 256 states). A sequential reference model applies
// every op in issue order; the testbench checks each telemetry read
// response (data, tag and a latency of 4 cycles), every interrupt pulse
// (5 cycles after the update), and the complete state array at the end of
// each phase. Phases change the rule: hugepage counting, sub-page offsets,
// read/write filters, range prefilter, request-data operands, notify
// predicates and read side effects. The worked example (key 0x448A6 ->
// base 0x10, offset 0x15 -> state 0x25) is run first.
module tb_nemo_channel;
  import nemo_pkg::*;
  import nemo_tb_pkg::*;
  localparam int N = 256, KW = 8, IW = 8, NL = N / 8;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic tt_wr_en, tt_wr_valid;
  logic [KW-1:0] tt_wr_key;
  logic [IW-1:0] tt_wr_base;
  logic in_valid, in_tread, in_write;
  logic [63:0] in_addr, in_data;
  logic [4:0] in_line;
  logic [7:0] in_tag;
  logic rsp_valid, irq, ready;
  logic [7:0] rsp_tag;
  logic [511:0] rsp_data;
  logic ev_filtered, ev_out_of_range, ev_miss, ev_update, ev_forward;

  nemo_channel #(.TT_ENTRIES(N), .NUM_STATES(N), .TAG_W(8)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [63:0] gold [N];
  bit tt_v [N];
  int tt_b [N];
  // expected responses and interrupts, keyed by the cycle they appear in
  logic [511:0] exp_rsp [int];
  logic [7:0] exp_tag [int];
  bit exp_irq [int];
  int n_filtered = 0, n_range = 0, n_miss = 0, n_update = 0, n_fwd = 0, n_irq = 0, n_read = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    n_filtered += int'(ev_filtered); n_range += int'(ev_out_of_range);
    n_miss += int'(ev_miss); n_update += int'(ev_update); n_fwd += int'(ev_forward);
  end

  // compare outputs every cycle
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (rsp_valid !== exp_rsp.exists(cyc) ||
        (rsp_valid && (rsp_data !== exp_rsp[cyc] || rsp_tag !== exp_tag[cyc]))) begin
      failures++; $display("FAIL rsp at %0d valid=%0d", cyc, rsp_valid);
    end
    checks++;
    if (irq !== exp_irq.exists(cyc)) begin
      failures++; $display("FAIL irq at %0d = %0d", cyc, irq);
    end
    if (irq) n_irq++;
  end

  task automatic idle();
    in_valid = 0; in_tread = 0;
  endtask

  task automatic tt_put(int k, bit v, int b);
    @(negedge clk); idle(); tt_wr_en = 1; tt_wr_key = KW'(k); tt_wr_valid = v; tt_wr_base = IW'(b);
    @(negedge clk); tt_wr_en = 0;
    tt_v[k] = v; tt_b[k] = b;
  endtask

  // present one monitored request, update the model
  task automatic mon(logic [63:0] a, bit w, logic [63:0] d);
    longint unsigned k, o;
    @(negedge clk);
    in_valid = 1; in_tread = 0; in_write = w; in_addr = a; in_data = d; in_tag = 8'($urandom);
    if (ref_extract(cfg, w, a, KW, IW, k, o) && tt_v[k] && (tt_b[k] + int'(o)) < N) begin
      int i;
      i = tt_b[k] + int'(o);
      gold[i] = ref_op(int'(cfg.upd_op), gold[i], cfg.opd_data ? ref_field(cfg, a, d) : cfg.upd_operand);
      if (ref_cmp(int'(cfg.ntf_op), gold[i], cfg.ntf_operand)) exp_irq[cyc + 5] = 1;
    end
  endtask

  task automatic tread(int l);
    logic [511:0] line;
    @(negedge clk);
    in_valid = 1; in_tread = 1; in_line = 5'(l); in_tag = 8'($urandom); in_write = 0;
    for (int k = 0; k < 8; k++) begin
      line[k*64 +: 64] = gold[l*8 + k];
      gold[l*8 + k] = ref_op(int'(cfg.rd_op), gold[l*8 + k], cfg.rd_operand);
    end
    exp_rsp[cyc + 4] = line; exp_tag[cyc + 4] = in_tag;
    n_read++;
  endtask

  task automatic drain_and_verify();
    @(negedge clk); idle();
    repeat (8) @(negedge clk);
    for (int l = 0; l < NL; l++) tread(l);
    @(negedge clk); idle();
    repeat (8) @(negedge clk);
  endtask

  // random address: hugepage 0..39 (2 MiB), 4 KiB page 0..511 inside
  function automatic logic [63:0] raddr(logic [63:0] basea);
    return basea + (64'($urandom_range(0, 39)) << 21) + (64'($urandom_range(0, 511)) << 12)
           + 64'($urandom_range(0, 63) * 64);
  endfunction

  initial begin
    cfg = '0; cfg.range_hi = '1;
    tt_wr_en = 0; tt_wr_key = 0; tt_wr_valid = 0; tt_wr_base = 0;
    in_valid = 0; in_tread = 0; in_write = 0; in_addr = 0; in_data = 0; in_line = 0; in_tag = 0;
    for (int i = 0; i < N; i++) begin gold[i] = 0; tt_v[i] = 0; tt_b[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    while (!ready) @(posedge clk);

    // ---- worked example ----
    cfg.enable = 1; cfg.track_rd = 1; cfg.track_wr = 1;
    cfg.key_sub = 64'h44800_00000; cfg.pri_mask = '1; cfg.pri_shift = 20;
    cfg.sec_mask = 64'hFF000; cfg.sec_shift = 12;
    cfg.upd_op = OP_ADD; cfg.upd_operand = 1; cfg.rd_op = OP_SET; cfg.rd_operand = 0;
    tt_put(8'hA6, 1, 'h10);
    mon(64'h448A615B80, 1, 64'h8A026DE1);
    @(negedge clk); idle(); repeat (6) @(negedge clk);
    checks++;
    if (gold[8'h25] != 1) begin failures++; $display("FAIL example model"); end
    tread(8'h25 / 8);
    @(negedge clk); idle(); repeat (6) @(negedge clk);
    tt_put(8'hA6, 0, 0);
    cfg.key_sub = 0;

    // ---- phases with different rules ----
    for (int ph = 0; ph < 8; ph++) begin
      cfg.enable = (ph != 7);
      cfg.track_rd = (ph != 2); cfg.track_wr = (ph != 3);
      cfg.range_lo = (ph == 4) ? 64'h40_0000_0000 + (64'd8 << 21) : 64'h40_0000_0000;
      cfg.range_hi = (ph == 4) ? 64'h40_0000_0000 + (64'd30 << 21) : '1;
      cfg.key_sub = 64'h40_0000_0000;
      cfg.pri_mask = '1; cfg.pri_shift = 21;
      cfg.sec_mask = (ph == 0) ? 64'd0 : 64'h7000; cfg.sec_shift = 12;
      cfg.upd_op = (ph < 4) ? OP_ADD : upd_op_e'(1 + ph % 5);
      cfg.opd_data = (ph == 5 || ph == 6);
      // ph 5: operand = 4 KiB page number bits [14:12] of the address;
      // ph 6: operand = data bits [2:1]
      cfg.opd_addr = (ph == 5); cfg.opd_shift = (ph == 5) ? 6'd12 : 6'd1;
      cfg.opd_width = (ph == 5) ? 6'd3 : 6'd2;
      cfg.upd_operand = 64'($urandom_range(1, 3));
      cfg.ntf_op = cmp_op_e'(ph % 6);
      cfg.ntf_operand = 64'($urandom_range(5, 40));
      cfg.rd_op = (ph % 2) ? OP_SET : upd_op_e'(ph % 6);
      cfg.rd_operand = 64'($urandom_range(0, 2));
      // translation entries: keys 0..39, some invalid, one overflowing base
      for (int k = 0; k < 40; k++)
        tt_put(k, $urandom_range(0, 5) != 0, (k == 7) ? N - 4 : (k % 31) * 8);
      repeat (1500) begin
        int r;
        r = $urandom_range(0, 19);
        if (r == 0) tread($urandom_range(0, NL - 1));
        else if (r == 1) begin @(negedge clk); idle(); end
        else if (r < 6) mon(64'h40_0000_0000 + (64'd5 << 21) + (64'd2 << 12), $urandom_range(0, 1),
                            64'($urandom_range(0, 9)));   // hot line: forwarding
        else mon(raddr(64'h40_0000_0000), $urandom_range(0, 1), 64'($urandom_range(0, 9)));
      end
      drain_and_verify();
    end
    // every mechanism must have happened
    checks += 6;
    if (n_filtered == 0) begin failures++; $display("FAIL no filtered request"); end
    if (n_range == 0)    begin failures++; $display("FAIL no out-of-range request"); end
    if (n_miss == 0)     begin failures++; $display("FAIL no table miss"); end
    if (n_update == 0)   begin failures++; $display("FAIL no update"); end
    if (n_fwd == 0)      begin failures++; $display("FAIL no forwarding"); end
    if (n_irq == 0)      begin failures++; $display("FAIL no interrupt"); end
    $display("filtered=%0d out_of_range=%0d miss=%0d updates=%0d forwarded=%0d irq=%0d reads=%0d",
             n_filtered, n_range, n_miss, n_update, n_fwd, n_irq, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 100000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nemo_top: end-to-end test of the NEMO engine at its full default size
// (2 channels, 8 pipelines, 8,192 translation entries and 8,192 states per
// channel per pipeline, 35-bit device addresses).
//
// The testbench acts as the driver: it programs eight telemetries over
// MMIO, streams random memory traffic into both channels (one request per
// channel per cycle at most), and reads telemetry back with loads to the
// telemetry region. A reference model applies every request and read, in
// issue order, to its own copy of every state. Checked:
//   - every telemetry read response: data, tag, latency of 5 cycles;
//   - the DRAM pass-through flag of every request;
//   - the sticky interrupt register of every pipeline after each phase,
//     and the irq line rising 6 cycles after a request that meets the
//     predicate;
//   - the complete state of every pipeline at the end (read with reset).
// Telemetries installed (driver examples of the use cases):
//   P0 per-hugepage hotness, reset on read
//   P1 per-4 KiB counters inside 16 hugepages, window re-programmed each
//      phase (time multiplexing of translation entries)
//   P2 per-tenant bandwidth: many hugepages -> one state, notify on >= cap
//   P3 reads only, range prefilter, XOR with an address field
//   P4 writes only, subtract, notify on ==
//   P5 shift left, read side effect "set to 1"
//   P6 shift right by request data, notify on <
//   P7 1 GiB regions, side effect add, notify on >, <=
// Each mechanism is counted and must occur: forwarding, type filter, range
// filter, table miss, interrupt, read side effect, telemetry read, loads
// that name no state, stores to the telemetry region, entry removal.
module tb_nemo_top;
  import nemo_pkg::*;
  import nemo_tb_pkg::*;

  localparam int NCH = 2, NP = 8, NS = 8192, NLINE = NS / 8, AW = 35;
  localparam logic [AW-1:0] REGION = AW'(1) << (AW - 1);

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] req_valid, req_write, dram_valid, rsp_valid;
  logic [NCH-1:0][AW-1:0] req_addr;
  logic [NCH-1:0][63:0] req_data;
  logic [NCH-1:0][7:0] req_tag, rsp_tag;
  logic [NCH-1:0][511:0] rsp_data;
  logic mmio_req, mmio_we, mmio_rvalid, ready;
  logic [15:0] mmio_addr;
  logic [63:0] mmio_wdata, mmio_rdata;
  logic [NP-1:0] irq;

  nemo_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model ----------------
  cfg_t cfgs [NP];
  bit tt_v [NP][int];
  int tt_b [NP][int];
  logic [63:0] gold [NP][NCH][int];
  bit irq_pend [NP][NCH];
  logic [511:0] exp_rsp [NCH][int];
  logic [7:0] exp_tag [NCH][int];
  logic [NCH-1:0] exp_dram;

  // mechanism counters
  int n_fwd = 0, n_filt = 0, n_range = 0, n_miss = 0, n_upd = 0, n_irq = 0;
  int n_side = 0, n_tread = 0, n_null = 0, n_rstore = 0, n_remove = 0;
  int ev_fwd [NP][NCH], ev_filt [NP][NCH], ev_rng [NP][NCH], ev_miss [NP][NCH], ev_upd [NP][NCH];

  for (genvar p = 0; p < NP; p++) begin : g_ev
    for (genvar c = 0; c < NCH; c++) begin : g_evc
      initial begin ev_fwd[p][c] = 0; ev_filt[p][c] = 0; ev_rng[p][c] = 0; ev_miss[p][c] = 0;
                    ev_upd[p][c] = 0; end
      always @(posedge clk) begin
        ev_fwd[p][c]  += int'(dut.g_pipe[p].u_pipe.ev_forward[c]);
        ev_filt[p][c] += int'(dut.g_pipe[p].u_pipe.ev_filtered[c]);
        ev_rng[p][c]  += int'(dut.g_pipe[p].u_pipe.ev_out_of_range[c]);
        ev_miss[p][c] += int'(dut.g_pipe[p].u_pipe.ev_miss[c]);
        ev_upd[p][c]  += int'(dut.g_pipe[p].u_pipe.ev_update[c]);
      end
    end
  end

  // per-cycle output checks
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (rsp_valid[c] !== exp_rsp[c].exists(cyc) ||
          (rsp_valid[c] && (rsp_data[c] !== exp_rsp[c][cyc] || rsp_tag[c] !== exp_tag[c][cyc]))) begin
        failures++;
        if (failures < 20) $display("FAIL rsp ch%0d at %0d valid=%0d", c, cyc, rsp_valid[c]);
      end
      if (exp_rsp[c].exists(cyc)) begin exp_rsp[c].delete(cyc); exp_tag[c].delete(cyc); end
    end
  end

  // DRAM pass-through is combinational: check while the request is held
  task automatic check_dram();
    #1;
    checks++;
    if (dram_valid !== exp_dram) begin
      failures++; $display("FAIL dram_valid %b exp %b", dram_valid, exp_dram);
    end
  endtask

  // ---------------- MMIO ----------------
  task automatic mmio_wr(int p, reg_e r, logic [63:0] d);
    @(negedge clk);
    req_valid = 0;
    mmio_req = 1; mmio_we = 1; mmio_addr = 16'((p << 7) | (int'(r) << 3)); mmio_wdata = d;
    @(negedge clk); mmio_req = 0; mmio_we = 0;
  endtask

  task automatic mmio_rd(int p, reg_e r, output logic [63:0] d);
    @(negedge clk);
    req_valid = 0;
    mmio_req = 1; mmio_we = 0; mmio_addr = 16'((p << 7) | (int'(r) << 3));
    @(negedge clk); mmio_req = 0;
    @(posedge clk); #1;
    checks++;
    if (!mmio_rvalid) begin failures++; $display("FAIL mmio rvalid"); end
    d = mmio_rdata;
  endtask

  task automatic install(int p, cfg_t c);
    cfgs[p] = c;
    mmio_wr(p, REG_RANGE_LO, c.range_lo);
    mmio_wr(p, REG_RANGE_HI, c.range_hi);
    mmio_wr(p, REG_KEY_SUB, c.key_sub);
    mmio_wr(p, REG_PRI_MASK, c.pri_mask);
    mmio_wr(p, REG_PRI_SHIFT, 64'(c.pri_shift));
    mmio_wr(p, REG_SEC_MASK, c.sec_mask);
    mmio_wr(p, REG_SEC_SHIFT, 64'(c.sec_shift));
    mmio_wr(p, REG_OPS, 64'(c.upd_op) | (64'(c.ntf_op) << 8) | (64'(c.rd_op) << 16));
    mmio_wr(p, REG_UPD_OPERAND, c.upd_operand);
    mmio_wr(p, REG_NTF_OPERAND, c.ntf_operand);
    mmio_wr(p, REG_RD_OPERAND, c.rd_operand);
    mmio_wr(p, REG_OPD_FIELD, 64'(c.opd_addr) | (64'(c.opd_shift) << 8) | (64'(c.opd_width) << 16));
    mmio_wr(p, REG_CTRL, {60'd0, c.opd_data, c.track_wr, c.track_rd, c.enable});
  endtask

  task automatic set_tt(int p, int key, bit v, int b);
    mmio_wr(p, REG_TT_WRITE, (64'(key) << 32) | (64'(v) << 16) | 64'(b));
    if (tt_v[p].exists(key) && tt_v[p][key] && !v) n_remove++;
    tt_v[p][key] = v; tt_b[p][key] = b;
  endtask

  // ---------------- traffic ----------------
  int hp [64];   // tracked hugepage numbers

  function automatic logic [63:0] g(int p, int c, int i);
    return gold[p][c].exists(i) ? gold[p][c][i] : 64'd0;
  endfunction

  // model one monitored request on channel c
  task automatic model_mon(int c, bit w, logic [63:0] a, logic [63:0] d);
    for (int p = 0; p < NP; p++) begin
      longint unsigned k, o;
      if (ref_extract(cfgs[p], w, a, 13, 13, k, o) && tt_v[p].exists(int'(k)) &&
          tt_v[p][int'(k)] && tt_b[p][int'(k)] + int'(o) < NS) begin
        int i;
        i = tt_b[p][int'(k)] + int'(o);
        gold[p][c][i] = ref_op(int'(cfgs[p].upd_op), g(p, c, i),
                               cfgs[p].opd_data ? ref_field(cfgs[p], a, d) : cfgs[p].upd_operand);
        if (ref_cmp(int'(cfgs[p].ntf_op), gold[p][c][i], cfgs[p].ntf_operand)) begin
          irq_pend[p][c] = 1; n_irq++;
        end
      end
    end
  endtask

  // model a telemetry load on channel c at cache line cl of the region
  task automatic model_tread(int c, int cl, logic [7:0] tag);
    int p, l;
    logic [511:0] line;
    p = cl / (NCH * NLINE);
    l = (cl / NCH) % NLINE;
    line = '0;
    if (p < NP) begin
      for (int k = 0; k < 8; k++) begin
        line[k*64 +: 64] = g(p, c, l*8 + k);
        gold[p][c][l*8 + k] = ref_op(int'(cfgs[p].rd_op), g(p, c, l*8 + k), cfgs[p].rd_operand);
      end
      if (cfgs[p].rd_op != OP_NOP) n_side++;
      n_tread++;
    end else n_null++;
    exp_rsp[c][cyc + 5] = line; exp_tag[c][cyc + 5] = tag;
  endtask

  function automatic logic [AW-1:0] rand_addr(int c);
    logic [63:0] a;
    int r;
    r = $urandom_range(0, 9);
    if (r < 7) a = (64'(hp[$urandom_range(0, 63)]) << 21) | (64'($urandom_range(0, 511)) << 12);
    else if (r == 7) a = (64'(hp[5]) << 21) | (64'd3 << 12);                 // hot line
    else a = 64'($urandom_range(0, 8191)) << 21 | (64'($urandom_range(0, 511)) << 12);
    a |= 64'($urandom_range(0, 31)) << 7;
    a |= 64'(c) << 6;
    return AW'(a);
  endfunction

  // one cycle of traffic on both channels
  task automatic traffic_cycle(int read_pct);
    @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      int r;
      r = $urandom_range(0, 99);
      req_tag[c] = 8'($urandom);
      req_data[c] = 64'($urandom_range(0, 7));
      req_write[c] = $urandom_range(0, 1);
      req_valid[c] = r < 90;
      exp_dram[c] = 0;
      if (r < read_pct) begin
        // telemetry load, sometimes naming no pipeline, sometimes a store
        int cl;
        cl = $urandom_range(0, NP * NCH * NLINE - 1);
        if ($urandom_range(0, 49) == 0) cl = NP * NCH * NLINE + $urandom_range(0, 99);
        cl = (cl & ~1) | c;
        req_addr[c] = REGION | AW'(64'(cl) << 6);
        if ($urandom_range(0, 29) == 0) begin
          req_write[c] = 1; n_rstore++;
        end else begin
          req_write[c] = 0;
          model_tread(c, cl, req_tag[c]);
        end
      end else if (req_valid[c]) begin
        req_addr[c] = rand_addr(c);
        exp_dram[c] = 1;
        model_mon(c, req_write[c], 64'(req_addr[c]), req_data[c]);
      end
    end
    check_dram();
  endtask

  task automatic drain();
    @(negedge clk); req_valid = 0;
    repeat (10) @(negedge clk);
  endtask

  // read every line of pipeline p on both channels
  task automatic sweep(int p);
    for (int l = 0; l < NLINE; l++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        int cl;
        cl = p * NCH * NLINE + l * NCH + c;
        req_valid[c] = 1; req_write[c] = 0; req_tag[c] = 8'($urandom);
        req_addr[c] = REGION | AW'(64'(cl) << 6);
        model_tread(c, cl, req_tag[c]);
      end
    end
    drain();
  endtask

  task automatic check_irqs();
    for (int p = 0; p < NP; p++) begin
      logic [63:0] d;
      mmio_rd(p, REG_IRQ, d);
      checks++;
      if (d[1:0] !== {irq_pend[p][1], irq_pend[p][0]} ||
          irq[p] !== (irq_pend[p][0] || irq_pend[p][1])) begin
        failures++; $display("FAIL irq pipe %0d reg=%b exp %b%b", p, d[1:0], irq_pend[p][1],
                             irq_pend[p][0]);
      end
      mmio_wr(p, REG_IRQ, 64'h3);
      irq_pend[p][0] = 0; irq_pend[p][1] = 0;
    end
    @(negedge clk); checks++;
    if (irq !== '0) begin failures++; $display("FAIL irq not cleared"); end
  endtask

  function automatic cfg_t base_cfg();
    cfg_t c;
    c = '0;
    c.enable = 1; c.track_rd = 1; c.track_wr = 1;
    c.range_hi = 64'h4_0000_0000;           // the 16 GiB of DRAM
    c.pri_mask = '1; c.pri_shift = 21;      // 2 MiB hugepage key
    c.upd_op = OP_ADD; c.upd_operand = 1;
    c.rd_op = OP_SET; c.rd_operand = 0;     // reset on read
    return c;
  endfunction

  initial begin
    cfg_t c;
    logic [63:0] d;
    int t0;
    req_valid = 0; req_write = 0; req_addr = '0; req_data = '0; req_tag = '0;
    mmio_req = 0; mmio_we = 0; mmio_addr = 0; mmio_wdata = 0; exp_dram = 0;
    for (int p = 0; p < NP; p++) begin cfgs[p] = '0; irq_pend[p][0] = 0; irq_pend[p][1] = 0; end
    for (int i = 0; i < 64; i++) hp[i] = (i * 127 + 11) % 8192;
    repeat (3) @(posedge clk); rst_n = 1;
    t0 = cyc;
    while (!ready) @(posedge clk);
    $display("tables cleared after %0d cycles", cyc - t0);
    checks++;
    if (cyc - t0 < 8192 || cyc - t0 > 8200) begin failures++; $display("FAIL clear time"); end

    // P0: per-hugepage hotness
    c = base_cfg(); install(0, c);
    for (int i = 0; i < 48; i++) set_tt(0, hp[i], 1, i);
    // P1: per-4 KiB counters in 16 hugepages
    c = base_cfg(); c.sec_mask = 64'h1F_F000; c.sec_shift = 12; install(1, c);
    // P2: per-tenant bandwidth, 4 tenants, notify at the cap
    c = base_cfg(); c.ntf_op = CMP_GE; c.ntf_operand = 300; install(2, c);
    for (int i = 0; i < 64; i++) set_tt(2, hp[i], 1, i % 4);
    // P3: reads only in the lower 8 GiB, XOR with request data
    c = base_cfg(); c.track_wr = 0; c.range_hi = 64'h2_0000_0000; c.upd_op = OP_XOR;
    c.opd_data = 1; c.opd_addr = 1; c.opd_shift = 7; c.opd_width = 5;   // address bits [11:7]
    c.rd_op = OP_NOP; install(3, c);
    for (int i = 0; i < 64; i++) set_tt(3, hp[i], 1, i);
    // P4: writes only, subtract 1, notify on == -5
    c = base_cfg(); c.track_rd = 0; c.upd_op = OP_SUB; c.ntf_op = CMP_EQ;
    c.ntf_operand = -64'sd5; install(4, c);
    for (int i = 0; i < 64; i++) set_tt(4, hp[i], 1, 8 * i);
    // P5: shift left, read side effect "set to 1"
    c = base_cfg(); c.upd_op = OP_SHL; c.rd_op = OP_SET; c.rd_operand = 1; install(5, c);
    for (int i = 0; i < 64; i++) set_tt(5, hp[i], 1, i);
    // P6: shift right by request data, notify when < 4, never reset
    c = base_cfg(); c.upd_op = OP_SHR; c.opd_data = 1; c.ntf_op = CMP_LT; c.ntf_operand = 4;
    c.rd_op = OP_XOR; c.rd_operand = 64'hFFFF; install(6, c);
    for (int i = 0; i < 64; i++) set_tt(6, hp[i], 1, i);
    // P7: 1 GiB regions with 2 MiB sub-regions, notify on >
    c = base_cfg(); c.pri_shift = 30; c.sec_mask = 64'h3FE0_0000; c.sec_shift = 21;
    c.ntf_op = CMP_GT; c.ntf_operand = 3; c.rd_op = OP_ADD; c.rd_operand = 1; install(7, c);
    for (int i = 0; i < 16; i++) set_tt(7, i, 1, i * 512);

    // MMIO read-back and a read of a pipeline that does not exist
    mmio_rd(2, REG_NTF_OPERAND, d); checks++;
    if (d !== 64'd300) begin failures++; $display("FAIL mmio readback"); end
    mmio_rd(NP + 3, REG_CTRL, d); checks++;
    if (d !== 64'd0) begin failures++; $display("FAIL mmio bad pipe"); end

    for (int ph = 0; ph < 4; ph++) begin
      // re-program P1's window of 16 hugepages
      for (int i = 0; i < 16; i++) if (ph > 0) set_tt(1, hp[(ph - 1) * 16 + i], 0, 0);
      for (int i = 0; i < 16; i++) set_tt(1, hp[ph * 16 + i], 1, i * 512);
      if (ph == 2) begin   // change P7 to <= mid-run
        c = cfgs[7]; c.ntf_op = CMP_LE; c.ntf_operand = 1; install(7, c);
      end
      repeat (3000) traffic_cycle(8);
      drain();
      sweep(1);
      check_irqs();
    end
    for (int p = 0; p < NP; p++) sweep(p);
    check_irqs();

    // interrupt latency: one request whose update meets P0's predicate;
    // the request is present in cycle 0, irq[0] must first be high in cycle 6
    c = cfgs[0]; c.ntf_op = CMP_GE; c.ntf_operand = 1; install(0, c);
    @(negedge clk);
    req_valid = 2'b01; req_write = 0; req_data = '0; req_tag = '0;
    req_addr[0] = rand_addr(0);
    req_addr[0] = AW'((64'(hp[0]) << 21) | 64'(req_addr[0][20:0]));
    model_mon(0, 0, 64'(req_addr[0]), 64'd0);
    begin
      int first;
      first = -1;
      for (int k = 1; k <= 10; k++) begin
        @(negedge clk); req_valid = 0;
        if (irq[0] && first < 0) first = k;
      end
      checks++;
      if (first != 6) begin failures++; $display("FAIL irq latency %0d, expected 6", first); end
    end
    check_irqs();

    for (int p = 0; p < NP; p++)
      for (int ch = 0; ch < NCH; ch++) begin
        n_fwd += ev_fwd[p][ch]; n_filt += ev_filt[p][ch]; n_range += ev_rng[p][ch];
        n_miss += ev_miss[p][ch]; n_upd += ev_upd[p][ch];
      end
    $display("updates=%0d forwarded=%0d filtered=%0d out_of_range=%0d miss=%0d irq=%0d",
             n_upd, n_fwd, n_filt, n_range, n_miss, n_irq);
    $display("telemetry_reads=%0d side_effects=%0d null_reads=%0d region_stores=%0d removed=%0d",
             n_tread, n_side, n_null, n_rstore, n_remove);
    checks += 11;
    if (n_upd == 0)    begin failures++; $display("FAIL no update"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL no forwarding"); end
    if (n_filt == 0)   begin failures++; $display("FAIL no filtered request"); end
    if (n_range == 0)  begin failures++; $display("FAIL no range drop"); end
    if (n_miss == 0)   begin failures++; $display("FAIL no table miss"); end
    if (n_irq == 0)    begin failures++; $display("FAIL no interrupt"); end
    if (n_tread == 0)  begin failures++; $display("FAIL no telemetry read"); end
    if (n_side == 0)   begin failures++; $display("FAIL no read side effect"); end
    if (n_null == 0)   begin failures++; $display("FAIL no load naming no state"); end
    if (n_rstore == 0) begin failures++; $display("FAIL no store to the region"); end
    if (n_remove == 0) begin failures++; $display("FAIL no entry removed"); end
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 200000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

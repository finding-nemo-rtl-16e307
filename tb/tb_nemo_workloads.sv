// tb_nemo_workloads: the three operating-system use cases of the engine,
// run on nemo_top at its full default size (2 channels, 8 pipelines,
// 8,192 translation entries and 8,192 states per channel per pipeline).
//
// The testbench plays the driver and the memory controller. Both channels
// carry a request every cycle (line rate), drawn from a skewed
// distribution over the 16 GiB of DRAM. A model counts every access and
// every telemetry read is compared with it.
//
//   Phase 1, hot-set tracking and huge-page split candidates (8 pipelines):
//     P0 gives every 2 MiB huge page of the 16 GiB its own counter: 8,192
//        translation entries, a full table, increment on every access,
//        reset on read.
//     P1..P7 each track 16 huge pages at 4 KiB granularity (512 counters
//        per huge page, 112 huge pages at once); after every interval the
//        driver removes their entries and installs the next 112 huge pages.
//     After each interval all eight pipelines are read in full, one 512-bit
//     line per channel per cycle. Every line must match the model; the hot
//     set must hold most of the counted accesses. Half-way, the hot set
//     moves to other huge pages and the counts must follow at once, since
//     reset-on-read returns only the last interval.
//   Phase 2, per-tenant bandwidth (P0 re-programmed):
//     all 8,192 huge pages are mapped many-to-one onto two tenant states,
//     increment per access, reset on read, interrupt when a channel's
//     count reaches the cap. A noisy tenant crosses the cap; the interrupt
//     line must rise exactly 6 cycles after the request that crossed it.
//     In a second interval only the quiet tenant runs and no interrupt may
//     occur.
//
// Every telemetry read is checked for data and a latency of 5 cycles; the
// DRAM pass-through flag is checked on every request.
module tb_nemo_workloads;
  import nemo_pkg::*;

  localparam int NCH = 2, NP = 8, NS = 8192, NLINE = NS / 8, AW = 35;
  localparam int NHP = 8192;                    // 16 GiB / 2 MiB
  localparam int NHOT = NHP / 5;                // 20 % of the pages ...
  localparam int HOT_PCT = 90;                  // ... get 90 % of the accesses
  localparam int WIN = 16;                      // huge pages per skew pipeline
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

  // ---------------- model ----------------
  int cnt [NP][NCH][int];        // expected counter values
  int win_p [int];               // huge page -> skew pipeline tracking it
  int win_i [int];               //           -> slot inside that pipeline
  int tenant_of [int];           // phase 2: huge page -> tenant state
  bit phase2 = 0;
  int cap = 0;
  int cross_cyc = -1;            // issue cycle of the first crossing update
  int irq_cyc = -1;              // first cycle irq[0] is seen high
  int hot_base = 0;

  // expected telemetry read responses, in order per channel
  typedef struct { int p; int l; int t; logic [511:0] d; } exp_t;
  exp_t expq [NCH][$];
  int n_lines = 0, n_req = 0;

  function automatic int c0(int p, int c, int i);
    return cnt[p][c].exists(i) ? cnt[p][c][i] : 0;
  endfunction

  // response checker
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      if (rsp_valid[c]) begin
        exp_t e;
        checks++;
        if (expq[c].size() == 0) begin
          failures++; $display("FAIL unexpected response ch%0d", c);
        end else begin
          e = expq[c].pop_front();
          if (cyc - e.t != 5 || rsp_data[c] !== e.d) begin
            failures++;
            if (failures < 10)
              $display("FAIL read p%0d line %0d ch%0d latency %0d", e.p, e.l, c, cyc - e.t);
          end
        end
      end
    end
    if (irq[0] && irq_cyc < 0) irq_cyc = cyc;
  end

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
    d = mmio_rdata;
  endtask

  task automatic set_tt(int p, int key, bit v, int b);
    mmio_wr(p, REG_TT_WRITE, (64'(key) << 32) | (64'(v) << 16) | 64'(b));
  endtask

  // huge-page counting rule: key = huge page number, optional 4 KiB offset
  task automatic install(int p, bit per_basepage, cmp_op_e ntf, int ntf_val);
    mmio_wr(p, REG_RANGE_LO, 64'd0);
    mmio_wr(p, REG_RANGE_HI, 64'h4_0000_0000);
    mmio_wr(p, REG_KEY_SUB, 64'd0);
    mmio_wr(p, REG_PRI_MASK, 64'h3_FFE0_0000);
    mmio_wr(p, REG_PRI_SHIFT, 64'd21);
    mmio_wr(p, REG_SEC_MASK, per_basepage ? 64'h1F_F000 : 64'd0);
    mmio_wr(p, REG_SEC_SHIFT, 64'd12);
    mmio_wr(p, REG_OPS, 64'(OP_ADD) | (64'(ntf) << 8) | (64'(OP_SET) << 16));
    mmio_wr(p, REG_UPD_OPERAND, 64'd1);
    mmio_wr(p, REG_NTF_OPERAND, 64'(ntf_val));
    mmio_wr(p, REG_RD_OPERAND, 64'd0);
    mmio_wr(p, REG_CTRL, 64'b0111);
  endtask

  // ---------------- traffic ----------------
  // one access on channel c to huge page hp, 4 KiB page bp
  task automatic model_access(int c, int hp, int bp);
    if (!phase2) begin
      cnt[0][c][hp] = c0(0, c, hp) + 1;
      if (win_p.exists(hp)) begin
        int p, i;
        p = win_p[hp]; i = win_i[hp] * 512 + bp;
        cnt[p][c][i] = c0(p, c, i) + 1;
      end
    end else begin
      int t;
      t = tenant_of[hp];
      cnt[0][c][t] = c0(0, c, t) + 1;
      if (cnt[0][c][t] == cap && cross_cyc < 0) cross_cyc = cyc;
    end
  endtask

  // every cycle a request on each channel; mode picks the access pattern
  task automatic run(int cycles, int mode);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        int hp, bp;
        if (mode == 0) begin                  // hot set of 20 % of the pages
          if ($urandom_range(0, 99) < HOT_PCT) hp = (hot_base + $urandom_range(0, NHOT - 1)) % NHP;
          else hp = $urandom_range(0, NHP - 1);
          // inside a huge page, a few 4 KiB pages are hot (skew)
          bp = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 511) : $urandom_range(0, 7);
        end else if (mode == 1) begin         // noisy tenant 80 %, quiet 20 %
          hp = ($urandom_range(0, 99) < 80) ? NHP / 2 + $urandom_range(0, NHP / 2 - 1)
                                            : $urandom_range(0, NHP / 2 - 1);
          bp = $urandom_range(0, 511);
        end else begin                        // quiet tenant only
          hp = $urandom_range(0, NHP / 2 - 1);
          bp = $urandom_range(0, 511);
        end
        req_valid[c] = 1; req_write[c] = ($urandom_range(0, 19) == 0);
        req_tag[c] = '0; req_data[c] = 64'($urandom);
        req_addr[c] = AW'((64'(hp) << 21) | (64'(bp) << 12) |
                          (64'($urandom_range(0, 31)) << 7) | (64'(c) << 6));
        model_access(c, hp, bp);
        n_req++;
      end
      #1; checks++;
      if (dram_valid !== 2'b11) begin failures++; $display("FAIL dram_valid"); end
    end
    @(negedge clk); req_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  // read every line of pipeline p on both channels, one per channel per cycle
  task automatic sweep(int p);
    for (int l = 0; l < NLINE; l++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        exp_t e;
        e.p = p; e.l = l; e.t = cyc; e.d = '0;
        for (int k = 0; k < 8; k++) begin
          e.d[k*64 +: 64] = 64'(c0(p, c, l * 8 + k));
          if (cnt[p][c].exists(l * 8 + k)) cnt[p][c].delete(l * 8 + k);   // reset on read
        end
        expq[c].push_back(e);
        req_valid[c] = 1; req_write[c] = 0; req_tag[c] = '0;
        req_addr[c] = REGION | AW'(64'(p * NCH * NLINE + l * NCH + c) << 6);
        n_lines++;
      end
    end
    @(negedge clk); req_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  // install the next 112 huge pages of the skew window
  task automatic reprogram(int first);
    int old [int];
    foreach (win_p[hp]) old[hp] = win_p[hp];
    foreach (old[hp]) begin set_tt(old[hp], hp, 0, 0); win_p.delete(hp); win_i.delete(hp); end
    for (int p = 1; p < NP; p++)
      for (int i = 0; i < WIN; i++) begin
        int hp;
        hp = (first + (p - 1) * WIN + i) % NHP;
        set_tt(p, hp, 1, i * 512);
        win_p[hp] = p; win_i[hp] = i;
      end
  endtask

  // hot-set quality: share of P0's counted accesses that fall in the hot set
  function automatic int hot_share_pct();
    longint hot, all;
    hot = 0; all = 0;
    for (int c = 0; c < NCH; c++)
      foreach (cnt[0][c][hp]) begin
        all += cnt[0][c][hp];
        if ((hp - hot_base + NHP) % NHP < NHOT) hot += cnt[0][c][hp];
      end
    return all == 0 ? 0 : int'(hot * 100 / all);
  endfunction

  initial begin
    logic [63:0] d;
    int share;
    req_valid = 0; req_write = 0; req_addr = '0; req_data = '0; req_tag = '0;
    mmio_req = 0; mmio_we = 0; mmio_addr = 0; mmio_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (!ready) @(posedge clk);

    // ---- phase 1: hot set and split candidates ----
    install(0, 0, CMP_NONE, 0);
    for (int hp = 0; hp < NHP; hp++) set_tt(0, hp, 1, hp);        // one-to-one, full table
    for (int p = 1; p < NP; p++) install(p, 1, CMP_NONE, 0);       // one-to-many
    for (int iv = 0; iv < 4; iv++) begin
      if (iv == 2) hot_base = NHP / 2;                               // hot-set shift
      reprogram(hot_base + iv * (NP - 1) * WIN);
      run(4000, 0);
      share = hot_share_pct();
      $display("interval %0d: hot set holds %0d%% of counted accesses", iv, share);
      checks++;
      if (share < 80) begin failures++; $display("FAIL hot set not visible"); end
      for (int p = 0; p < NP; p++) sweep(p);
    end

    // ---- phase 2: per-tenant bandwidth with a cap ----
    phase2 = 1; cap = 2500;
    for (int c = 0; c < NCH; c++) cnt[0][c].delete();
    mmio_wr(0, REG_CTRL, 64'd0);
    install(0, 0, CMP_GE, cap);
    for (int hp = 0; hp < NHP; hp++) begin                           // many-to-one
      tenant_of[hp] = (hp < NHP / 2) ? 0 : 1;
      set_tt(0, hp, 1, tenant_of[hp]);
    end
    mmio_wr(0, REG_IRQ, 64'h3);
    cross_cyc = -1; irq_cyc = -1;
    run(4000, 1);
    checks += 3;
    $display("noisy tenant: %0d + %0d, quiet tenant: %0d + %0d accesses",
             c0(0, 0, 1), c0(0, 1, 1), c0(0, 0, 0), c0(0, 1, 0));
    if (cross_cyc < 0) begin failures++; $display("FAIL noisy tenant never reached the cap"); end
    if (irq_cyc != cross_cyc + 6) begin
      failures++; $display("FAIL interrupt at %0d, cap crossed at %0d", irq_cyc, cross_cyc);
    end
    if (c0(0, 0, 0) >= cap || c0(0, 1, 0) >= cap) begin
      failures++; $display("FAIL quiet tenant over the cap");
    end
    sweep(0);
    mmio_wr(0, REG_IRQ, 64'h3);
    @(negedge clk); checks++;
    if (irq[0]) begin failures++; $display("FAIL irq not cleared"); end
    irq_cyc = -1;
    run(2000, 2);
    sweep(0);
    mmio_rd(0, REG_IRQ, d);
    checks++;
    if (irq_cyc >= 0 || d[1:0] != 2'b00) begin failures++; $display("FAIL quiet interval raised irq"); end

    repeat (10) @(negedge clk);
    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin failures++; $display("FAIL missing responses"); end
    $display("requests=%0d telemetry_lines=%0d cycles=%0d", n_req, n_lines, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 300000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

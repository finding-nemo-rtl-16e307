// tb_nemo_pipe_csr: checks the MMIO register file: reset values, write then
// read back of every rule register with one-cycle read latency, the
// translation-table write pulse and its fields, sticky per-channel
// interrupts with write-1-to-clear, the status register, and 3,000 cycles
// of random accesses and interrupt pulses checked against a shadow model.
module tb_nemo_pipe_csr;
  import nemo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req, we, rvalid;
  reg_e regsel;
  logic [63:0] wdata, rdata;
  cfg_t cfg;
  logic tt_wr_en, tt_wr_valid, irq, tables_ready;
  logic [12:0] tt_wr_key, tt_wr_base;
  logic [1:0] ch_irq;
  int checks = 0, failures = 0, cyc = 0;

  nemo_pipe_csr #(.NUM_CH(2), .TT_ENTRIES(8192), .NUM_STATES(8192)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic wr(reg_e r, logic [63:0] d);
    @(negedge clk); req = 1; we = 1; regsel = r; wdata = d;
    @(negedge clk); req = 0; we = 0;
  endtask

  task automatic rd_check(reg_e r, logic [63:0] exp);
    @(negedge clk); req = 1; we = 0; regsel = r;
    @(posedge clk); #1; req = 0;
    checks++;
    if (!rvalid || rdata !== exp) begin
      failures++; $display("FAIL reg %0d = %h exp %h (rvalid %0d)", r, rdata, exp, rvalid);
    end
  endtask

  initial begin
    logic [63:0] v [15];
    req = 0; we = 0; regsel = REG_CTRL; wdata = 0; ch_irq = 0; tables_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    checks++;
    if (cfg.enable || cfg.range_hi !== '1 || cfg.upd_op != OP_NOP) begin
      failures++; $display("FAIL reset values");
    end
    rd_check(REG_STATUS, 0);
    tables_ready = 1;
    rd_check(REG_STATUS, 1);
    // rule registers
    for (int r = 1; r <= 11; r++) v[r] = {$urandom, $urandom};
    v[REG_PRI_SHIFT] &= 64'h3F; v[REG_SEC_SHIFT] &= 64'h3F;
    v[REG_OPS] = 64'h0005_0203;   // rd_op = XOR, ntf_op = GE, upd_op = SHR
    for (int r = 1; r <= 11; r++) wr(reg_e'(r), v[r]);
    wr(REG_CTRL, 64'hB);
    for (int r = 1; r <= 11; r++) rd_check(reg_e'(r), v[r]);
    rd_check(REG_CTRL, 64'hB);
    checks++;
    if (!cfg.enable || !cfg.track_rd || cfg.track_wr || !cfg.opd_data ||
        cfg.pri_mask !== v[REG_PRI_MASK] || cfg.upd_op != OP_SHR || cfg.ntf_op != CMP_GE ||
        cfg.rd_op != OP_XOR || cfg.rd_operand !== v[REG_RD_OPERAND]) begin
      failures++; $display("FAIL cfg fields");
    end
    // translation entry write: key 0x1A6, valid, base 0x10
    @(negedge clk); req = 1; we = 1; regsel = REG_TT_WRITE;
    wdata = (64'h1A6 << 32) | (64'd1 << 16) | 64'h10;
    @(posedge clk); #1; req = 0; we = 0;
    checks++;
    if (!tt_wr_en || tt_wr_key !== 13'h1A6 || !tt_wr_valid || tt_wr_base !== 13'h10) begin
      failures++; $display("FAIL tt write");
    end
    @(posedge clk); #1; checks++;
    if (tt_wr_en) begin failures++; $display("FAIL tt write not a pulse"); end
    // interrupts
    checks++; if (irq) begin failures++; $display("FAIL irq at start"); end
    @(negedge clk); ch_irq = 2'b10; @(negedge clk); ch_irq = 0;
    checks++; if (!irq) begin failures++; $display("FAIL irq not raised"); end
    rd_check(REG_IRQ, 2);
    wr(REG_IRQ, 1);             // clearing the other channel leaves it set
    rd_check(REG_IRQ, 2);
    wr(REG_IRQ, 2);
    rd_check(REG_IRQ, 0);
    checks++; if (irq) begin failures++; $display("FAIL irq not cleared"); end

    // random register traffic against a shadow model, one access per cycle,
    // with random interrupt pulses from both channels
    begin
      logic [63:0] m [16];
      logic [1:0]  pend;
      logic [63:0] exp_rd;
      bit          was_rd, was_tt;
      logic [63:0] tt_d;
      for (int r = 0; r < 16; r++) m[r] = '0;
      for (int r = 1; r <= 11; r++) m[r] = v[r];
      m[REG_CTRL] = 64'hB;
      pend = 2'b00;
      for (int n = 0; n < 3000; n++) begin
        int r;
        @(negedge clk);
        r = $urandom_range(0, 15);
        req = ($urandom_range(0, 3) != 0); we = $urandom_range(0, 1);
        regsel = reg_e'(r); wdata = {$urandom, $urandom};
        ch_irq = 2'($urandom_range(0, 3)) & {$urandom_range(0, 7) == 0, $urandom_range(0, 7) == 0};
        tables_ready = $urandom_range(0, 1);
        // expected read data, from the state before the edge
        unique case (r)
          13:      exp_rd = 64'(pend);
          14:      exp_rd = 64'(tables_ready);
          12:      exp_rd = '0;
          default: exp_rd = m[r];
        endcase
        was_rd = req && !we;
        was_tt = req && we && r == 12;
        tt_d = wdata;
        // model the write and the interrupt bits
        if (req && we) begin
          unique case (r)
            0:       m[0] = wdata & 64'hF;
            5, 7:    m[r] = wdata & 64'h3F;
            8:       m[8] = wdata & 64'h7_0707;
            15:      m[15] = wdata & 64'h3F_3F01;
            12, 14:  ;
            13:      pend &= ~wdata[1:0];
            default: m[r] = wdata;
          endcase
        end
        pend |= ch_irq;
        @(posedge clk); #1;
        req = 0; we = 0; ch_irq = 0;
        checks++;
        if (rvalid !== was_rd || (was_rd && rdata !== exp_rd)) begin
          failures++;
          if (failures < 10) $display("FAIL random read reg %0d = %h exp %h", r, rdata, exp_rd);
        end
        checks++;
        if (tt_wr_en !== was_tt || (was_tt && (tt_wr_key !== tt_d[44:32] ||
            tt_wr_valid !== tt_d[16] || tt_wr_base !== tt_d[12:0]))) begin
          failures++; $display("FAIL random tt write");
        end
        checks++;
        if (irq !== |pend || cfg.range_lo !== m[1] || cfg.sec_mask !== m[6] ||
            cfg.upd_op != upd_op_e'(m[8][2:0]) || cfg.rd_op != upd_op_e'(m[8][18:16]) ||
            cfg.ntf_op != cmp_op_e'(m[8][10:8]) || cfg.enable !== m[0][0] ||
            cfg.opd_data !== m[0][3] || cfg.pri_shift !== m[5][5:0] ||
            cfg.opd_addr !== m[15][0] || cfg.opd_shift !== m[15][13:8] ||
            cfg.opd_width !== m[15][21:16]) begin
          failures++;
          if (failures < 10) $display("FAIL random cfg/irq state after reg %0d", r);
        end
      end
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

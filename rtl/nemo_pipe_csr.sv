// nemo_pipe_csr: MMIO control registers of one NEMO telemetry pipeline.
//
// The driver installs a telemetry rule by writing these 64-bit registers
// (see nemo_pkg::reg_e for the map): the request filter, range prefilter,
// primary and secondary mask/shift, update operator and operand, notify
// predicate and operand, and the read side effect. Writing REG_TT_WRITE
// adds ({key, valid=1, base}) or removes (valid=0) a translation entry; the
// write is broadcast to every channel's copy of the table. Each channel's
// notify pulse sets a sticky bit in REG_IRQ (write 1 to clear); `irq` is
// their OR, one interrupt line per pipeline.
//
// Timing: a register write takes effect in the next cycle; a read returns
// `rdata` with `rvalid` one cycle after `req && !we`.
//
// From the design: configuration by MMIO with 64-bit data, dynamic add and
// remove of translation entries, interrupts tagged by pipeline. This
// design's choices: the register map, reset values (pipeline disabled,
// whole address range, all operators no-op) and write-1-to-clear.
module nemo_pipe_csr
  import nemo_pkg::*;
#(
  parameter int unsigned NUM_CH     = 2,
  parameter int unsigned TT_ENTRIES = 8192,
  parameter int unsigned NUM_STATES = 8192,
  localparam int unsigned KEY_W     = $clog2(TT_ENTRIES),
  localparam int unsigned IDX_W     = $clog2(NUM_STATES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // MMIO
  input  logic              req,
  input  logic              we,
  input  reg_e              regsel,
  input  logic [63:0]       wdata,
  output logic              rvalid,
  output logic [63:0]       rdata,
  // configuration
  output cfg_t              cfg,
  output logic              tt_wr_en,
  output logic [KEY_W-1:0]  tt_wr_key,
  output logic              tt_wr_valid,
  output logic [IDX_W-1:0]  tt_wr_base,
  // status
  input  logic [NUM_CH-1:0] ch_irq,
  input  logic              tables_ready,
  output logic              irq
);

  logic [NUM_CH-1:0] irq_pending;
  logic              wr;

  assign wr = req && we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg            <= '0;
      cfg.range_hi   <= '1;
      cfg.upd_op     <= OP_NOP;
      cfg.ntf_op     <= CMP_NONE;
      cfg.rd_op      <= OP_NOP;
      irq_pending    <= '0;
      tt_wr_en       <= 1'b0;
      tt_wr_key      <= '0;
      tt_wr_valid    <= 1'b0;
      tt_wr_base     <= '0;
      rvalid         <= 1'b0;
      rdata          <= '0;
    end else begin
      tt_wr_en <= 1'b0;
      if (wr) begin
        unique case (regsel)
          REG_CTRL: begin
            cfg.enable   <= wdata[0];
            cfg.track_rd <= wdata[1];
            cfg.track_wr <= wdata[2];
            cfg.opd_data <= wdata[3];
          end
          REG_RANGE_LO:    cfg.range_lo    <= wdata;
          REG_RANGE_HI:    cfg.range_hi    <= wdata;
          REG_KEY_SUB:     cfg.key_sub     <= wdata;
          REG_PRI_MASK:    cfg.pri_mask    <= wdata;
          REG_PRI_SHIFT:   cfg.pri_shift   <= wdata[5:0];
          REG_SEC_MASK:    cfg.sec_mask    <= wdata;
          REG_SEC_SHIFT:   cfg.sec_shift   <= wdata[5:0];
          REG_OPS: begin
            cfg.upd_op <= upd_op_e'(wdata[2:0]);
            cfg.ntf_op <= cmp_op_e'(wdata[10:8]);
            cfg.rd_op  <= upd_op_e'(wdata[18:16]);
          end
          REG_UPD_OPERAND: cfg.upd_operand <= wdata;
          REG_NTF_OPERAND: cfg.ntf_operand <= wdata;
          REG_RD_OPERAND:  cfg.rd_operand  <= wdata;
          REG_OPD_FIELD: begin
            cfg.opd_addr  <= wdata[0];
            cfg.opd_shift <= wdata[13:8];
            cfg.opd_width <= wdata[21:16];
          end
          REG_TT_WRITE: begin
            tt_wr_en    <= 1'b1;
            tt_wr_key   <= wdata[32 +: KEY_W];
            tt_wr_valid <= wdata[16];
            tt_wr_base  <= wdata[IDX_W-1:0];
          end
          default: ;
        endcase
      end
      // sticky interrupts: set by the channels, cleared by writing ones
      irq_pending <= (irq_pending & ~((wr && regsel == REG_IRQ) ? wdata[NUM_CH-1:0]
                                                                : '0)) | ch_irq;
      rvalid <= req && !we;
      if (req && !we) begin
        unique case (regsel)
          REG_CTRL:        rdata <= {60'd0, cfg.opd_data, cfg.track_wr, cfg.track_rd,
                                     cfg.enable};
          REG_RANGE_LO:    rdata <= cfg.range_lo;
          REG_RANGE_HI:    rdata <= cfg.range_hi;
          REG_KEY_SUB:     rdata <= cfg.key_sub;
          REG_PRI_MASK:    rdata <= cfg.pri_mask;
          REG_PRI_SHIFT:   rdata <= {58'd0, cfg.pri_shift};
          REG_SEC_MASK:    rdata <= cfg.sec_mask;
          REG_SEC_SHIFT:   rdata <= {58'd0, cfg.sec_shift};
          REG_OPS:         rdata <= {45'd0, cfg.rd_op, 5'd0, cfg.ntf_op, 5'd0, cfg.upd_op};
          REG_UPD_OPERAND: rdata <= cfg.upd_operand;
          REG_NTF_OPERAND: rdata <= cfg.ntf_operand;
          REG_RD_OPERAND:  rdata <= cfg.rd_operand;
          REG_IRQ:         rdata <= 64'(irq_pending);
          REG_STATUS:      rdata <= {63'd0, tables_ready};
          REG_OPD_FIELD:   rdata <= {42'd0, cfg.opd_width, 2'd0, cfg.opd_shift, 7'd0,
                                     cfg.opd_addr};
          default:         rdata <= '0;
        endcase
      end
    end
  end

  assign irq = |irq_pending;

endmodule

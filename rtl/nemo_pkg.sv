// nemo_pkg: types and constants shared by the NEMO telemetry engine.
//
// A NEMO pipeline applies one configurable telemetry rule to every memory
// request of a memory controller: filter the request, map its physical
// address to a telemetry state index, update that state with a simple
// associative operator, and optionally compare the result against a
// threshold to raise an interrupt. This package holds the operator
// encodings, the rule configuration record written over MMIO, the MMIO
// register map and the two functions (update and compare) that every stage
// uses, so that the state update, the read side effect and the notify
// predicate share one definition.
//
// From the design: the update operators (+, -, >>, <<, XOR), the notify
// predicates (==, >=, >, <, <=), the read side effect (an update operator
// or reset to a configured value), a part of the request as operand, 64-bit
// states and 512-bit telemetry read lines. This design's own choices: the numeric encodings, the register
// map, shift amounts taken from the low 6 bits of the operand,
// two's-complement wrap-around for + and -, and the operand field being a
// shifted and truncated slice of the address or of the low 64 data bits.
//
// LANE_BITS and CL_BITS are used by the modules, not by the package itself,
// so lint of the package alone reports them as unused.
package nemo_pkg;

  // Width of one telemetry state and of an MMIO data word.
  localparam int unsigned STATE_W = 64;
  // One telemetry read returns a 512-bit line, i.e. 8 consecutive states.
  localparam int unsigned LINE_W = 512;
  localparam int unsigned LANES = LINE_W / STATE_W;
  localparam int unsigned LANE_BITS = $clog2(LANES);
  // Byte offset bits of a 64-byte cache line.
  localparam int unsigned CL_BITS = 6;

  // Update operator; OP_SET (replace by operand) is only meaningful as the
  // read side effect ("reset to a configured value").
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,
    OP_ADD = 3'd1,
    OP_SUB = 3'd2,
    OP_SHR = 3'd3,
    OP_SHL = 3'd4,
    OP_XOR = 3'd5,
    OP_SET = 3'd6
  } upd_op_e;

  // Notify predicate: new_state <op> operand.
  typedef enum logic [2:0] {
    CMP_NONE = 3'd0,
    CMP_EQ   = 3'd1,
    CMP_GE   = 3'd2,
    CMP_GT   = 3'd3,
    CMP_LT   = 3'd4,
    CMP_LE   = 3'd5
  } cmp_op_e;

  // Telemetry rule of one pipeline (Table-1 style options).
  typedef struct packed {
    logic                 enable;
    logic                 track_rd;     // count read requests
    logic                 track_wr;     // count write requests
    logic                 opd_data;     // update operand = request field
    logic                 opd_addr;     // field taken from address, else data
    logic [5:0]           opd_shift;    // field = (source >> opd_shift)
    logic [5:0]           opd_width;    //         low opd_width bits, 0 = all
    logic [63:0]          range_lo;     // prefilter: range_lo <= addr
    logic [63:0]          range_hi;     //            addr <  range_hi
    logic [63:0]          key_sub;      // subtracted before the primary mask
    logic [63:0]          pri_mask;
    logic [5:0]           pri_shift;
    logic [63:0]          sec_mask;     // zero: no sub-region offset
    logic [5:0]           sec_shift;
    upd_op_e              upd_op;
    logic [STATE_W-1:0]   upd_operand;
    cmp_op_e              ntf_op;
    logic [STATE_W-1:0]   ntf_operand;
    upd_op_e              rd_op;        // read side effect
    logic [STATE_W-1:0]   rd_operand;
  } cfg_t;

  // MMIO register index within a pipeline's 128-byte window of 8-byte
  // registers (byte address bits [6:3]).
  typedef enum logic [3:0] {
    REG_CTRL        = 4'd0,   // [0] enable [1] track_rd [2] track_wr [3] opd_data
    REG_RANGE_LO    = 4'd1,
    REG_RANGE_HI    = 4'd2,
    REG_KEY_SUB     = 4'd3,
    REG_PRI_MASK    = 4'd4,
    REG_PRI_SHIFT   = 4'd5,   // [5:0]
    REG_SEC_MASK    = 4'd6,
    REG_SEC_SHIFT   = 4'd7,   // [5:0]
    REG_OPS         = 4'd8,   // [2:0] upd_op [10:8] ntf_op [18:16] rd_op
    REG_UPD_OPERAND = 4'd9,
    REG_NTF_OPERAND = 4'd10,
    REG_RD_OPERAND  = 4'd11,
    REG_TT_WRITE    = 4'd12,  // write only: [63:32] key [16] valid [15:0] base
    REG_IRQ         = 4'd13,  // per-channel sticky interrupt, write 1 to clear
    REG_STATUS      = 4'd14,  // [0] tables initialised
    REG_OPD_FIELD   = 4'd15   // [0] from address [13:8] shift [21:16] width
  } reg_e;

  // Apply an update operator to a state.
  function automatic logic [STATE_W-1:0] apply_op(upd_op_e op,
                                                  logic [STATE_W-1:0] s,
                                                  logic [STATE_W-1:0] v);
    unique case (op)
      OP_ADD:  return s + v;
      OP_SUB:  return s - v;
      OP_SHR:  return s >> v[5:0];
      OP_SHL:  return s << v[5:0];
      OP_XOR:  return s ^ v;
      OP_SET:  return v;
      default: return s;
    endcase
  endfunction

  // Operand field of a request: address or data word, shifted right and cut
  // to opd_width bits (0 keeps all 64).
  function automatic logic [STATE_W-1:0] opd_field(logic from_addr, logic [5:0] shift,
                                                   logic [5:0] width, logic [63:0] addr,
                                                   logic [63:0] data);
    logic [63:0] v;
    v = (from_addr ? addr : data) >> shift;
    if (width != 6'd0) v &= ~(64'hFFFF_FFFF_FFFF_FFFF << width);
    return v;
  endfunction

  // Evaluate a notify predicate; CMP_NONE never fires.
  function automatic logic compare(cmp_op_e op, logic [STATE_W-1:0] s,
                                   logic [STATE_W-1:0] v);
    unique case (op)
      CMP_EQ:  return s == v;
      CMP_GE:  return s >= v;
      CMP_GT:  return s > v;
      CMP_LT:  return s < v;
      CMP_LE:  return s <= v;
      default: return 1'b0;
    endcase
  endfunction

endpackage

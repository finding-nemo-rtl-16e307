// nemo_tb_pkg: reference arithmetic for the NEMO testbenches.
//
// Golden models of the telemetry rule, written independently of the RTL:
// operators are evaluated with explicit case tables on 64-bit values, and
// the key/offset derivation is computed bit by bit. Testbenches compare the
// design against these.
package nemo_tb_pkg;
  import nemo_pkg::*;

  function automatic logic [63:0] ref_op(int op, logic [63:0] s, logic [63:0] v);
    logic [63:0] r;
    case (op)
      1: r = s + v;
      2: r = s + (~v + 64'd1);
      3: begin r = s; for (int i = 0; i < int'(v[5:0]); i++) r = {1'b0, r[63:1]}; end
      4: begin r = s; for (int i = 0; i < int'(v[5:0]); i++) r = {r[62:0], 1'b0}; end
      5: r = s ^ v;
      6: r = v;
      default: r = s;
    endcase
    return r;
  endfunction

  function automatic bit ref_cmp(int op, logic [63:0] s, logic [63:0] v);
    case (op)
      1: return s == v;
      2: return !(s < v);
      3: return !(s <= v);
      4: return s < v;
      5: return !(s > v);
      default: return 1'b0;
    endcase
  endfunction

  // shift right by a 6-bit amount, bit by bit
  function automatic logic [63:0] ref_shr(logic [63:0] x, int sh);
    logic [63:0] r = '0;
    for (int i = 0; i < 64; i++) if (i + sh < 64) r[i] = x[i + sh];
    return r;
  endfunction

  // operand field: bits [shift +: width] of the address or data word
  function automatic logic [63:0] ref_field(cfg_t c, logic [63:0] addr, logic [63:0] data);
    logic [63:0] src, sh, r;
    src = c.opd_addr ? addr : data;
    sh  = ref_shr(src, int'(c.opd_shift));
    r   = '0;
    for (int i = 0; i < 64; i++) if (c.opd_width == 0 || i < int'(c.opd_width)) r[i] = sh[i];
    return r;
  endfunction

  // Returns 1 when the request is tracked; key and offset by reference.
  function automatic bit ref_extract(cfg_t c, bit is_write, logic [63:0] addr,
                                     int key_w, int idx_w,
                                     output longint unsigned key,
                                     output longint unsigned off);
    logic [63:0] k, o;
    bit ok;
    k   = ref_shr((addr - c.key_sub) & c.pri_mask, int'(c.pri_shift));
    o   = ref_shr(addr & c.sec_mask, int'(c.sec_shift));
    key = k;
    off = o;
    ok  = c.enable && (is_write ? c.track_wr : c.track_rd);
    ok  = ok && !(addr < c.range_lo) && (addr < c.range_hi);
    ok  = ok && (k < (64'd1 << key_w)) && (o < (64'd1 << idx_w));
    return ok;
  endfunction
endpackage

// tb_nemo_key_extract: checks filter, range prefilter and key/offset
// derivation against the reference model, including the worked example of a
// 40-bit address split into a 20-bit key and an 8-bit 4 KiB-page offset.
module tb_nemo_key_extract;
  import nemo_pkg::*;
  import nemo_tb_pkg::*;

  localparam int KW = 20, IW = 13;
  cfg_t cfg;
  logic is_write;
  logic [63:0] addr;
  logic pass, type_hit, range_hit;
  logic [KW-1:0] key;
  logic [IW-1:0] offset;
  int checks = 0, failures = 0;

  nemo_key_extract #(.KEY_W(KW), .IDX_W(IW)) dut (.*);

  task automatic check();
    longint unsigned k, o;
    bit p;
    #1;
    p = ref_extract(cfg, is_write, addr, KW, IW, k, o);
    checks++;
    if (pass !== p || (p && (key !== KW'(k) || offset !== IW'(o)))) begin
      failures++;
      $display("FAIL addr=%h pass=%0d/%0d key=%h/%h off=%h/%h", addr, pass, p, key, k,
               offset, o);
    end
  endtask

  initial begin
    // worked example: key = address bits [39:20], offset = bits [19:12]
    cfg = '0;
    cfg.enable = 1; cfg.track_rd = 1; cfg.track_wr = 1;
    cfg.range_hi = '1;
    cfg.pri_mask = 64'hFF_FFF0_0000; cfg.pri_shift = 20;
    cfg.sec_mask = 64'h0F_F000;      cfg.sec_shift = 12;
    is_write = 1; addr = 64'h448A615B80;
    #1; checks++;
    if (!pass || key !== 20'h448A6 || offset !== 13'h15) begin
      failures++; $display("FAIL example key=%h off=%h", key, offset);
    end
    // 2 MiB hugepage key relative to a range base, 4 KiB sub-pages
    cfg.key_sub = 64'h4000_0000; cfg.range_lo = 64'h4000_0000; cfg.range_hi = 64'h4_4000_0000;
    cfg.pri_mask = '1; cfg.pri_shift = 21; cfg.sec_mask = 64'h1F_F000;
    addr = 64'h4060_3000; #1; checks++;
    if (!pass || key !== 20'h3 || offset !== 13'h3) begin
      failures++; $display("FAIL hugepage key=%h off=%h", key, offset);
    end
    addr = 64'h3FFF_FFC0; #1; checks++;
    if (pass || range_hit) begin failures++; $display("FAIL below range"); end
    // filter: reads only
    cfg.track_wr = 0; addr = 64'h4060_3000; is_write = 1; #1; checks++;
    if (pass || type_hit) begin failures++; $display("FAIL write filter"); end
    is_write = 0; #1; checks++;
    if (!pass) begin failures++; $display("FAIL read pass"); end
    // random rules and addresses
    repeat (4000) begin
      cfg.enable   = ($urandom_range(0, 9) != 0);
      cfg.track_rd = $urandom_range(0, 1);
      cfg.track_wr = $urandom_range(0, 1);
      cfg.range_lo = {$urandom, $urandom} >> $urandom_range(24, 63);
      cfg.range_hi = cfg.range_lo + ({$urandom, $urandom} >> $urandom_range(20, 63));
      cfg.key_sub  = ($urandom_range(0, 1)) ? cfg.range_lo : 64'd0;
      cfg.pri_mask = ($urandom_range(0, 1)) ? '1 : ({$urandom, $urandom});
      cfg.pri_shift = 6'($urandom_range(6, 40));
      cfg.sec_mask = ($urandom_range(0, 2) == 0) ? 64'd0 : ({$urandom, $urandom} >> $urandom_range(20, 60));
      cfg.sec_shift = 6'($urandom_range(6, 30));
      is_write = $urandom_range(0, 1);
      addr = cfg.range_lo + ({$urandom, $urandom} >> $urandom_range(18, 63));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

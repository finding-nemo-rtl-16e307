// tb_nemo_match_map: checks drop-on-miss, base + offset and drop on
// overflow, including the worked example base 0x10 + offset 0x15 = 0x25.
module tb_nemo_match_map;
  localparam int IW = 13;
  logic entry_valid;
  logic [IW-1:0] base, offset, idx;
  logic match;
  int checks = 0, failures = 0;

  nemo_match_map #(.IDX_W(IW)) dut (.*);

  initial begin
    entry_valid = 1; base = 13'h10; offset = 13'h15; #1; checks++;
    if (!match || idx !== 13'h25) begin failures++; $display("FAIL example"); end
    entry_valid = 0; #1; checks++;
    if (match) begin failures++; $display("FAIL miss"); end
    repeat (5000) begin
      int unsigned s;
      entry_valid = $urandom_range(0, 3) != 0;
      base = IW'($urandom); offset = IW'($urandom >> $urandom_range(0, 31));
      #1;
      s = int'(base) + int'(offset);
      checks++;
      if (match !== (entry_valid && s < (1 << IW)) || (match && int'(idx) != s)) begin
        failures++; $display("FAIL b=%h o=%h m=%0d idx=%h", base, offset, match, idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

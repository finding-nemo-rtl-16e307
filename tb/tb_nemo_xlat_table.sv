// tb_nemo_xlat_table: checks that every entry is invalid after the reset
// sweep, that added entries return their base one cycle after the lookup,
// that removed entries miss, and random add/remove/lookup against a model.
module tb_nemo_xlat_table;
  localparam int N = 256, IW = 13;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_valid, rd_en, hit, ready;
  logic [7:0] wr_key, rd_key;
  logic [IW-1:0] wr_base, base;
  bit mv [N];
  logic [IW-1:0] mb [N];
  int checks = 0, failures = 0, cyc = 0;

  nemo_xlat_table #(.TT_ENTRIES(N), .IDX_W(IW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic lookup(int k);
    @(negedge clk); rd_en = 1; rd_key = 8'(k);
    @(negedge clk); rd_en = 0; checks++;
    if (hit !== mv[k] || (mv[k] && base !== mb[k])) begin
      failures++; $display("FAIL key %0d hit=%0d base=%h exp %0d %h", k, hit, base, mv[k], mb[k]);
    end
  endtask

  task automatic put(int k, bit v, int b);
    @(negedge clk); wr_en = 1; wr_key = 8'(k); wr_valid = v; wr_base = IW'(b);
    @(negedge clk); wr_en = 0;
    mv[k] = v; mb[k] = IW'(b);
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_key = 0; rd_key = 0; wr_valid = 0; wr_base = 0;
    for (int i = 0; i < N; i++) begin mv[i] = 0; mb[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    while (!ready) @(posedge clk);
    for (int i = 0; i < N; i++) lookup(i);
    put(8'hA6, 1, 'h10); put(8'h12, 1, 'h650);   // two tracked regions
    lookup(8'hA6); lookup(8'h12);
    put(8'hA6, 0, 0);                            // remove
    lookup(8'hA6);
    repeat (3000) begin
      if ($urandom_range(0, 2) == 0) put($urandom_range(0, N - 1), $urandom_range(0, 1), $urandom);
      else lookup($urandom_range(0, N - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 50000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

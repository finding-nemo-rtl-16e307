// tb_nemo_req_tap: checks request classification for channel 1 of 2:
// DRAM traffic vs telemetry region, decoding of pipeline and state line,
// null flag for foreign-channel lines and pipelines past the last one, and
// discarding of stores to the telemetry region.
module tb_nemo_req_tap;
  localparam int AW = 35, NCH = 2, NP = 8, LINES = 1024;
  logic req_valid, req_write;
  logic [AW-1:0] req_addr;
  logic dram_valid, mon_valid, trd_valid, trd_null;
  logic [2:0] trd_pipe;
  logic [9:0] trd_line;
  int checks = 0, failures = 0;

  nemo_req_tap #(.ADDR_W(AW), .NUM_CH(NCH), .CH(1), .NUM_PIPES(NP), .LINES(LINES)) dut (.*);

  initial begin
    repeat (5000) begin
      longint unsigned off, cl;
      bit region, exp_null;
      int exp_pipe, exp_line;
      req_valid = $urandom_range(0, 5) != 0;
      req_write = $urandom_range(0, 1);
      region = $urandom_range(0, 1);
      off = {$urandom, $urandom} % (region ? 64'(NP * 3 / 2) * NCH * LINES * 64 : 64'h4_0000_0000);
      req_addr = AW'({region, 34'(off)});
      #1;
      cl = off / 64;
      exp_pipe = int'(cl / (NCH * LINES));
      exp_line = int'((cl / NCH) % LINES);
      exp_null = (cl % NCH) != 1 || exp_pipe >= NP;
      checks++;
      if (dram_valid !== (req_valid && !region) || mon_valid !== (req_valid && !region) ||
          trd_valid !== (req_valid && region && !req_write)) begin
        failures++; $display("FAIL class addr=%h", req_addr);
      end
      if (trd_valid) begin
        checks++;
        if (trd_null !== exp_null || (!exp_null && (int'(trd_pipe) != exp_pipe ||
            int'(trd_line) != exp_line))) begin
          failures++; $display("FAIL decode addr=%h pipe=%0d line=%0d null=%0d", req_addr,
                               trd_pipe, trd_line, trd_null);
        end
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

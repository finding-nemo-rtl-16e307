// tb_nemo_trigger: checks every notify predicate, including CMP_NONE, and
// the one-cycle registered latency of the interrupt pulse.
module tb_nemo_trigger;
  import nemo_pkg::*;
  import nemo_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  cmp_op_e op;
  logic [63:0] operand, upd_state;
  logic upd_valid, irq;
  int checks = 0, failures = 0;

  nemo_trigger dut (.*);
  always #5 clk = ~clk;

  initial begin
    upd_valid = 0; op = CMP_NONE; operand = 0; upd_state = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      bit exp;
      @(negedge clk);
      op = cmp_op_e'($urandom_range(0, 5));
      operand = 64'($urandom_range(0, 20));
      upd_state = ($urandom_range(0, 3) == 0) ? operand : 64'($urandom_range(0, 20));
      upd_valid = $urandom_range(0, 4) != 0;
      exp = upd_valid && ref_cmp(int'(op), upd_state, operand);
      @(posedge clk); #1;
      checks++;
      if (irq !== exp) begin
        failures++; $display("FAIL op=%0d s=%0d v=%0d irq=%0d", op, upd_state, operand, irq);
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

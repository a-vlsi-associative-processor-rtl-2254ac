// tb_ap_pe_operand: checks the input buffer (one-clock delay of the memory
// bit, zero when no read), the optional inversion, the hold register and
// the choice between external bit and held bit, against a reference model.
module tb_ap_pe_operand;
  import ap_pkg::*;
  logic clk = 0, rst_n = 0, mem_bit = 0, rd_en = 0, hold_en = 0, inv = 0, ext_bit = 0;
  op2_e op2_sel = OP2_EXT;
  logic a_raw, a_op, p_op;
  logic buf_m = 0, hold_m = 0;
  int checks = 0, failures = 0;
  ap_pe_operand dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      mem_bit = $urandom; rd_en = ($urandom % 4) != 0; hold_en = $urandom;
      inv = $urandom; ext_bit = $urandom; op2_sel = op2_e'($urandom % 2);
      #1;
      checks++;
      if (a_raw !== buf_m || a_op !== (buf_m ^ inv) ||
          p_op !== ((op2_sel == OP2_HOLD) ? hold_m : ext_bit)) begin
        failures++; $display("FAIL step %0d", i);
      end
      @(posedge clk);
      if (hold_en) hold_m = buf_m;
      buf_m = rd_en & mem_bit;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

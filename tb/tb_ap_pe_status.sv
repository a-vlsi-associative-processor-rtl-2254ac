// tb_ap_pe_status: checks the activity derived from the three operating
// modes and that the status register loads only while the PE is active.
module tb_ap_pe_status;
  import ap_pkg::*;
  logic clk = 0, rst_n = 0, first_sel = 0, load = 0, d = 0, status_q, active;
  mode_e mode = MODE_NORMAL;
  logic m_s = 0, exp_act;
  int checks = 0, failures = 0;
  ap_pe_status dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      mode = mode_e'($urandom % 3); first_sel = $urandom; load = $urandom; d = $urandom;
      #1;
      exp_act = (mode == MODE_FORCED) ? 1'b1 : (mode == MODE_ONE) ? first_sel : m_s;
      checks++;
      if (active !== exp_act || status_q !== m_s) begin failures++; $display("FAIL step %0d", i); end
      @(posedge clk);
      if (load && exp_act) m_s = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

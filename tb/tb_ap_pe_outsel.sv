// tb_ap_pe_outsel: checks the 4-to-1 output selection, the output latch
// (loads only when enabled), the forced-low output of an inactive PE and the
// latched activity flag, against a reference model.
module tb_ap_pe_outsel;
  import ap_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, active = 0, sum = 0, done = 0, dec = 0, status = 0;
  outsel_e out_sel = OUT_ARITH;
  logic sel_o, out_q, valid_q, exp_sel, m_out = 0, m_valid = 0;
  int checks = 0, failures = 0;
  ap_pe_outsel dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = $urandom; active = $urandom; sum = $urandom; done = $urandom; dec = $urandom;
      status = $urandom; out_sel = outsel_e'($urandom % 4);
      #1;
      case (out_sel)
        OUT_ARITH: exp_sel = sum;
        OUT_DONE:  exp_sel = done;
        OUT_DEC:   exp_sel = dec;
        default:   exp_sel = status;
      endcase
      checks++;
      if (sel_o !== exp_sel || out_q !== m_out || valid_q !== m_valid) begin
        failures++; $display("FAIL step %0d", i);
      end
      @(posedge clk);
      if (en) begin m_out = active & exp_sel; m_valid = active; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

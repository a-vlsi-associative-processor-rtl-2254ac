// tb_ap_pe_arith: checks bit-serial addition and subtraction through the
// full adder and carry latch, against integer arithmetic, including idle
// clocks (en low) between bits that must keep the carry.
module tb_ap_pe_arith;
  logic clk = 0, rst_n = 0, en = 0, p = 0, a = 0, c_init = 0, c_val = 0, sum;
  int checks = 0, failures = 0;
  ap_pe_arith dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input logic [7:0] x, input logic [7:0] y, input bit sub, input bit gaps);
    logic [7:0] r, exp;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      p = x[k]; a = y[k] ^ sub; en = 1; c_init = (k == 0); c_val = sub;
      #1 r[k] = sum;
      @(posedge clk); #1 en = 0;
      if (gaps) begin @(negedge clk); p = $urandom; a = $urandom; c_init = 0; @(posedge clk); end
    end
    exp = sub ? x - y : x + y;
    checks++;
    if (r !== exp) begin failures++; $display("FAIL %0d %s %0d = %0d exp %0d", x, sub ? "-" : "+", y, r, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) run(8'($urandom), 8'($urandom), i[0], i[1]);
    run(8'hff, 8'h01, 0, 0);
    run(8'h00, 8'h01, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

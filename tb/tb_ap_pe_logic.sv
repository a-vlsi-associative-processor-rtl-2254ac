// tb_ap_pe_logic: checks the MSB-first comparator. For random pairs it
// compares the "finished" and "decision" outputs after the last bit with
// the expected p>a (inv=0) or a>p (inv=1), and that the state holds on
// idle clocks.
module tb_ap_pe_logic;
  logic clk = 0, rst_n = 0, en = 0, cmp_clr = 0, p = 0, a = 0, inv = 0, done_o, dec_o;
  int checks = 0, failures = 0;
  ap_pe_logic dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input logic [7:0] x, input logic [7:0] y, input logic iv);
    logic d, g;
    for (int k = 7; k >= 0; k--) begin
      @(negedge clk);
      p = x[k]; a = y[k]; inv = iv; en = 1; cmp_clr = (k == 7);
      #1 d = done_o; g = dec_o;
      @(posedge clk); #1 en = 0;
      @(negedge clk); p = $urandom; a = $urandom; cmp_clr = 0;
    end
    checks += 2;
    if (d !== (x != y)) begin failures++; $display("FAIL done %0d %0d", x, y); end
    if (g !== (iv ? (y > x) : (x > y))) begin failures++; $display("FAIL dec %0d %0d inv %0d", x, y, iv); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [7:0] x, y;
      x = 8'($urandom); y = (i % 5 == 0) ? x : (i % 3 == 0) ? x ^ 8'(1 << (i % 8)) : 8'($urandom);
      run(x, y, i[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ap_wired_or: checks the global output bus: high if any PE output or the
// chained bus input is high, low only when all are low.
module tb_ap_wired_or;
  localparam int N = 128;
  logic [N-1:0] pe_out;
  logic bus_in, bus_out;
  int checks = 0, failures = 0;
  ap_wired_or #(.N(N)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 400; i++) begin
      pe_out = '0;
      if (i % 4 == 1) pe_out[$urandom % N] = 1'b1;
      if (i % 4 == 2) pe_out = {$urandom, $urandom, $urandom, $urandom};
      bus_in = (i % 8 == 3);
      #1;
      checks++;
      if (bus_out !== (bus_in || pe_out != 0)) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

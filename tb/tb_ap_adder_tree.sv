// tb_ap_adder_tree: checks the pipelined serial adder tree. Random W-bit
// values, one per input, are streamed LSB first followed by zero bits; the
// sum must come out bit-serially exactly log2(N) clocks later, marked by
// sum_start. Each sum starts right after random bits that leave carries
// in the tree, to check that start clears them.
module tb_ap_adder_tree;
  localparam int N = 128, LEVELS = 7, W = 8, SB = W + LEVELS;
  logic clk = 0, rst_n = 0, start = 0, sum_bit, sum_start;
  logic [N-1:0] in_bits = '0;
  logic [W-1:0] v [N];
  int checks = 0, failures = 0;
  ap_adder_tree #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      int unsigned expsum, got;
      int t_start, t_out;
      expsum = 0;
      for (int i = 0; i < N; i++) begin
        v[i] = (rep == 0) ? W'('1) : (rep % 2) ? W'($urandom % 2) : W'($urandom);
        expsum += v[i];
      end
      got = 0;
      t_out = -1;
      // a few random bits first leave non-zero carries in the tree
      for (int k = -3; k < SB + LEVELS; k++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) in_bits[i] = (k < 0) ? 1'($urandom) : (k < W) ? v[i][k] : 1'b0;
        start = (k == 0);
        if (k == 0) t_start = k;
        #1;
        if (sum_start && t_out < 0 && k >= 0) t_out = k;
        if (t_out >= 0 && k - t_out < SB) got |= int'(sum_bit) << (k - t_out);
      end
      checks += 2;
      if (got != expsum) begin failures++; $display("FAIL rep %0d sum %0d exp %0d", rep, got, expsum); end
      if (t_out - t_start != LEVELS) begin failures++; $display("FAIL latency %0d", t_out - t_start); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

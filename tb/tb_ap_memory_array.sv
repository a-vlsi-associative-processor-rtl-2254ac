// tb_ap_memory_array: checks the dual-bus memory against a reference array:
// random per-row write enables and data, a read of another (or the same)
// address in the same clock, with the read returning the old contents.
module tb_ap_memory_array;
  import ap_pkg::*;
  localparam int ROWS = 128, BITS = 256;
  logic clk = 0;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  logic [ROWS-1:0] rd_bit, row_wen, row_wd;
  logic wr_en;
  logic [BITS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;
  ap_memory_array #(.ROWS(ROWS), .BITS(BITS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    // fill every cell once
    wr_en = 1; row_wen = '1; rd_addr = '0;
    for (int b = 0; b < BITS; b++) begin
      @(negedge clk);
      wr_addr = ADDR_W'(b);
      row_wd = {$urandom, $urandom, $urandom, $urandom};
      for (int r = 0; r < ROWS; r++) ref_mem[r][b] = row_wd[r];
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_addr = ADDR_W'($urandom);
      wr_addr = (i % 5 == 0) ? rd_addr : ADDR_W'($urandom);
      wr_en = (i % 3 != 0);
      row_wen = {$urandom, $urandom, $urandom, $urandom};
      row_wd = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (rd_bit[r] !== ref_mem[r][rd_addr]) begin failures++; if (failures < 10) $display("FAIL row %0d addr %0d", r, rd_addr); end
      end
      @(posedge clk);
      if (wr_en) for (int r = 0; r < ROWS; r++) if (row_wen[r]) ref_mem[r][wr_addr] = row_wd[r];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

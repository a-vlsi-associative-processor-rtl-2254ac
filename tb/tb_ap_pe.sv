// tb_ap_pe: runs one PE against a small bit-addressed memory model and
// checks whole bit-serial operations: X+A and X-A at one clock per bit,
// B+A at two clocks per bit, an MSB-first comparison loaded into the status
// register, status store to memory, and that an inactive PE neither writes
// memory nor drives its output.
module tb_ap_pe;
  import ap_pkg::*;
  logic clk = 0, rst_n = 0, first_sel = 0;
  uinstr_t u;
  logic mem_bit, out_q, wr_en_o, status_q, active;
  logic [63:0] mem;
  int checks = 0, failures = 0;

  ap_pe dut (.*);
  always #5 clk = ~clk;
  assign mem_bit = mem[u.rd_addr[5:0]];
  always_ff @(posedge clk) if (wr_en_o) mem[u.wr_addr[5:0]] <= out_q;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic step(input uinstr_t ui);
    @(negedge clk); u = ui; @(posedge clk); #1;
  endtask

  function automatic uinstr_t nop(input mode_e m);
    uinstr_t x = UINSTR_NOP; x.mode = m; return x;
  endfunction

  // C(8 bits at c) = X op A(8 bits at a), one bit per clock
  task automatic op_x(input logic [7:0] x, input int a, input int c, input bit sub, input mode_e m);
    for (int t = 0; t < 10; t++) begin
      uinstr_t ui = nop(m);
      if (t < 8) begin ui.rd_en = 1; ui.rd_addr = ADDR_W'(a + t); end
      if (t >= 1 && t <= 8) begin
        ui.alu_en = 1; ui.ext_bit = x[t-1]; ui.inv = sub; ui.c_init = (t == 1); ui.c_val = sub;
      end
      if (t >= 2) begin ui.wr_en = 1; ui.wr_addr = ADDR_W'(c + t - 2); end
      step(ui);
    end
  endtask

  // C = B + A, two clocks per bit through the hold register
  task automatic add_b(input int b, input int a, input int c);
    for (int t = 0; t < 18; t++) begin
      uinstr_t ui = nop(MODE_NORMAL);
      if (t < 16) begin ui.rd_en = 1; ui.rd_addr = ADDR_W'((t[0] ? a : b) + t / 2); ui.hold_en = t[0]; end
      if (t >= 2 && !t[0]) begin ui.alu_en = 1; ui.op2_sel = OP2_HOLD; ui.c_init = (t == 2); end
      if (t >= 3 && t[0]) begin ui.wr_en = 1; ui.wr_addr = ADDR_W'(c + (t - 3) / 2); end
      step(ui);
    end
  endtask

  // S = X > A, MSB first
  task automatic cmp_x(input logic [7:0] x, input int a);
    for (int t = 0; t < 9; t++) begin
      uinstr_t ui = nop(MODE_NORMAL);
      if (t < 8) begin ui.rd_en = 1; ui.rd_addr = ADDR_W'(a + 7 - t); end
      if (t >= 1) begin
        ui.alu_en = 1; ui.ext_bit = x[8 - t]; ui.cmp_clr = (t == 1);
        ui.out_sel = OUT_DEC; ui.st_load = (t == 8);
      end
      step(ui);
    end
  endtask

  task automatic set_s(input logic v);
    uinstr_t ui = nop(MODE_FORCED);
    step(ui);
    ui.alu_en = 1; ui.c_init = 1; ui.ext_bit = v; ui.st_load = 1;
    step(ui);
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    u = UINSTR_NOP;
    mem = {$urandom, $urandom};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] x, av, bv, prev_c;
      x = 8'($urandom); av = 8'($urandom); bv = 8'($urandom);
      mem[7:0] = av; mem[15:8] = bv;
      set_s(1);
      check("status set", status_q, 1);
      op_x(x, 0, 16, 0, MODE_NORMAL);
      check("X+A", mem[23:16], 8'(x + av));
      op_x(x, 0, 24, 1, MODE_NORMAL);
      check("X-A", mem[31:24], 8'(x - av));
      add_b(8, 0, 32);
      check("B+A", mem[39:32], 8'(bv + av));
      cmp_x(x, 0);
      check("X>A", status_q, x > av);
      // store status: forced mode, output STATUS, write to bit 48
      begin
        uinstr_t ui;
        ui = nop(MODE_FORCED);
        ui.alu_en = 1; ui.out_sel = OUT_STATUS; step(ui);
        ui = nop(MODE_FORCED); ui.wr_en = 1; ui.wr_addr = 48; step(ui);
        check("store S", mem[48], x > av);
      end
      // inactive: clear S, then an add must not write and output stays low
      set_s(0);
      prev_c = mem[23:16];
      op_x(8'hff, 0, 16, 0, MODE_NORMAL);
      check("inactive no write", mem[23:16], prev_c);
      check("inactive output low", out_q, 0);
      // one-active mode with the token: PE writes
      first_sel = 1;
      op_x(x, 8, 16, 0, MODE_ONE);
      check("one-active X+B", mem[23:16], 8'(x + bv));
      first_sel = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

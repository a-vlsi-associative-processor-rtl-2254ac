// tb_ap_chip: micro-instruction level test of one full-size chip.
//
// The testbench drives micro-instructions directly. It sets every status
// register in forced mode, writes a different random value into each PE in
// one-active mode (moving the first-active token by clearing one status bit
// at a time), reads all PEs back in parallel through the output latches,
// runs X+A on every PE, streams a field through the adder tree and checks
// the sum and its log2(N) latency, checks the wired-OR bus, and reads
// through the "row above" link, where PE 0 takes the previous chip's row.
module tb_ap_chip;
  import ap_pkg::*;
  localparam int N = 128, BITS = 256, L = 7;
  logic clk = 0, rst_n = 0;
  uinstr_t u;
  logic bus_in = 0, bus_out, tok_in = 0, tok_out, sum_bit, sum_start;
  logic prev_rd_in = 1, prev_wd_in = 0, prev_wen_in = 0;
  logic next_rd_in = 0, next_wd_in = 0, next_wen_in = 0;
  logic prev_rd_out, prev_wd_out, prev_wen_out, next_rd_out, next_wd_out, next_wen_out;
  logic [N-1:0] pe_out, status, pe_active;
  logic [7:0] av [N];
  logic [7:0] got [N];
  int checks = 0, failures = 0;

  ap_chip #(.N_PE(N), .MEM_BITS(BITS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input string what, input longint g, input longint e);
    checks++;
    if (g != e) begin failures++; if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  task automatic step(input uinstr_t ui);
    @(negedge clk); u = ui; @(posedge clk); #1;
  endtask

  function automatic uinstr_t nop(input mode_e m);
    uinstr_t x = UINSTR_NOP; x.mode = m; return x;
  endfunction

  task automatic set_s(input mode_e m, input logic v);
    uinstr_t ui = nop(m);
    step(ui);
    ui.alu_en = 1; ui.c_init = 1; ui.ext_bit = v; ui.st_load = 1;
    step(ui);
  endtask

  // Write X into bits a..a+7 (no memory read: input buffer is 0).
  task automatic write_x(input logic [7:0] x, input int a, input mode_e m);
    for (int t = 0; t < 10; t++) begin
      uinstr_t ui = nop(m);
      if (t >= 1 && t <= 8) begin ui.alu_en = 1; ui.ext_bit = x[t-1]; ui.c_init = (t == 1); end
      if (t >= 2) begin ui.wr_en = 1; ui.wr_addr = ADDR_W'(a + t - 2); end
      step(ui);
    end
  endtask

  // Read bits a..a+7 of every PE in parallel through pe_out (forced mode).
  task automatic read_all(input int a, input link_e lk);
    for (int t = 0; t < 9; t++) begin
      uinstr_t ui = nop(MODE_FORCED);
      if (t < 8) begin ui.rd_en = 1; ui.rd_addr = ADDR_W'(a + t); ui.rd_link = lk; end
      if (t >= 1) begin ui.alu_en = 1; ui.c_init = 1; end
      step(ui);
      if (t >= 1) for (int i = 0; i < N; i++) got[i][t-1] = pe_out[i];
      if (t >= 1) begin check("wired-OR", bus_out, |pe_out); end
    end
  endtask

  initial begin
    uinstr_t ui;
    u = UINSTR_NOP;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) av[i] = 8'($urandom);

    set_s(MODE_FORCED, 1);
    check("all status", status, {N{1'b1}});
    check("tok_out", tok_out, 1);
    for (int i = 0; i < N; i++) begin
      step(nop(MODE_ONE));
      check("one active", pe_active, {{(N-1){1'b0}}, 1'b1} << i);
      write_x(av[i], 0, MODE_ONE);
      set_s(MODE_ONE, 0);
    end
    check("status cleared", status, 0);
    check("tok_out empty", tok_out, 0);

    read_all(0, LINK_FRONT);
    for (int i = 0; i < N; i++) check("readback", got[i], av[i]);

    // C = 0x5A + A on all PEs
    for (int t = 0; t < 10; t++) begin
      ui = nop(MODE_FORCED);
      if (t < 8) begin ui.rd_en = 1; ui.rd_addr = ADDR_W'(t); end
      if (t >= 1 && t <= 8) begin ui.alu_en = 1; ui.ext_bit = 8'h5A >> (t - 1); ui.c_init = (t == 1); end
      if (t >= 2) begin ui.wr_en = 1; ui.wr_addr = ADDR_W'(200 + t - 2); end
      step(ui);
    end
    read_all(200, LINK_FRONT);
    for (int i = 0; i < N; i++) check("X+A", got[i], 8'(av[i] + 8'h5A));

    // read through the link to the row above
    read_all(0, LINK_UP);
    for (int i = 0; i < N; i++) check("link up", got[i], (i == 0) ? 8'hFF : av[i-1]);
    check("next_rd_out", next_rd_out, dut.row_rd[N-1]);

    // adder tree: stream field A, LSB first, then zeros
    begin
      int unsigned sum = 0, res = 0;
      int t0 = -1, tout = -1;
      for (int i = 0; i < N; i++) sum += av[i];
      for (int t = 0; t < 8 + 2 * L + 4; t++) begin
        ui = nop(MODE_FORCED);
        if (t < 8) begin ui.rd_en = 1; ui.rd_addr = ADDR_W'(t); end
        ui.alu_en = (t >= 1); ui.c_init = 1;
        ui.sum_start = (t == 2);
        if (t == 2) t0 = t;
        @(negedge clk); u = ui; #1;
        if (sum_start && tout < 0) tout = t;
        if (tout >= 0 && t - tout < 8 + L) res |= int'(sum_bit) << (t - tout);
        @(posedge clk); #1;
      end
      check("tree sum", res, sum);
      check("tree latency", tout - t0, L);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ap_control_unit: checks the micro-instruction streams of the control
// unit. For random widths and addresses it counts, per instruction, the busy
// clocks (n+2, 2n+2, n+3, 2n+3, n+1, 2n+1, 4n, ...), the read, compute, hold
// and write clocks, the address sequences and the external data bits. A
// one-PE pass-through model (input buffer, output latch) stands in for the
// chips' wired-OR bus, and a serial stream stands in for the adder tree, to
// check the results of READ1, MAX and COUNT.
module tb_ap_control_unit;
  import ap_pkg::*;
  localparam int L = 7;
  logic clk = 0, rst_n = 0, h_valid = 0, h_ready, res_valid, res_flag, busy;
  hinstr_t h;
  logic [39:0] res_data;
  uinstr_t u;
  logic bus_in, any_status = 1;
  logic [0:0] sum_bits = '0;
  logic [31:0] v;           // value seen by the PE model
  logic [ADDR_W-1:0] base;  // its field address
  logic inbuf_m = 0, out_m = 0;
  int checks = 0, failures = 0;
  int cyc, n_rd, n_alu, n_wr, n_hold, n_st, n_inv_err, n_addr_err, n_ext_err, n_sum_start;
  int tree_cnt = 1000;
  logic [31:0] tree_val;

  ap_control_unit #(.N_CHIPS(1), .TREE_LEVELS(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // pass-through PE model driving the bus
  assign bus_in = out_m;
  always_ff @(posedge clk) begin
    inbuf_m <= u.rd_en ? v[5'(u.rd_addr - base)] : 1'b0;
    if (u.alu_en) out_m <= inbuf_m;
  end
  // adder tree model: emits tree_val serially L clocks after sum_start
  always_ff @(posedge clk) begin
    if (u.sum_start) tree_cnt <= -L + 1;
    else if (tree_cnt < 1000) tree_cnt <= tree_cnt + 1;
  end
  always_comb sum_bits[0] = (tree_cnt >= 0 && tree_cnt < 32) ? tree_val[5'(tree_cnt)] : 1'b0;

  task automatic check(input string what, input longint g, input longint e);
    checks++;
    if (g != e) begin failures++; if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, g, e); end
  endtask

  task automatic issue(input hinstr_t hi);
    int exp_rd, exp_wr, k_alu;
    @(negedge clk);
    while (!h_ready) @(negedge clk);
    h = hi; h_valid = 1;
    @(negedge clk); h_valid = 0;
    {cyc, n_rd, n_alu, n_wr, n_hold, n_st, n_inv_err, n_addr_err, n_ext_err, n_sum_start} = '0;
    k_alu = 0;
    while (busy) begin
      cyc++;
      if (u.rd_en) n_rd++;
      if (u.hold_en) n_hold++;
      if (u.sum_start) n_sum_start++;
      if (u.alu_en) begin
        n_alu++;
        if (u.st_load) n_st++;
        if (hi.op inside {HOP_ADD_X, HOP_SUB_X, HOP_WRITE_X} && k_alu < hi.n && u.ext_bit != hi.x[k_alu]) n_ext_err++;
        if (hi.op inside {HOP_SUB_X, HOP_SUB_B} && !u.inv) n_inv_err++;
        if (hi.op inside {HOP_SUB_X, HOP_SUB_B} && k_alu == 0 && !(u.c_init && u.c_val)) n_inv_err++;
        k_alu++;
      end
      if (u.wr_en) begin
        if (hi.op inside {HOP_ADD_X, HOP_ADD_B, HOP_SUB_X, HOP_SUB_B} && u.wr_addr != hi.c + ADDR_W'(n_wr)) n_addr_err++;
        n_wr++;
      end
      @(negedge clk);
    end
  endtask

  function automatic hinstr_t mk(input hop_e op, input int n);
    hinstr_t r = '0;
    r.op = op; r.mode = MODE_NORMAL; r.n = 6'(n);
    r.a = ADDR_W'($urandom % 64); r.b = ADDR_W'(64 + $urandom % 64); r.c = ADDR_W'(128 + $urandom % 64);
    r.x = $urandom;
    return r;
  endfunction

  initial begin
    h = '0; u = UINSTR_NOP; v = '0; base = '0; tree_val = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 30; rep++) begin
      int n;
      hinstr_t hi;
      n = 1 + ($urandom % 16);
      hi = mk(HOP_ADD_X, n); issue(hi);
      check("ADD_X clocks", cyc, n + 2); check("ADD_X rd", n_rd, n); check("ADD_X alu", n_alu, n);
      check("ADD_X wr", n_wr, n); check("ADD_X ext", n_ext_err, 0); check("ADD_X addr", n_addr_err, 0);
      hi = mk(HOP_ADD_B, n); issue(hi);
      check("ADD_B clocks", cyc, 2 * n + 2); check("ADD_B rd", n_rd, 2 * n); check("ADD_B hold", n_hold, n);
      check("ADD_B alu", n_alu, n); check("ADD_B wr", n_wr, n); check("ADD_B addr", n_addr_err, 0);
      hi = mk(HOP_SUB_X, n); issue(hi);
      check("SUB_X clocks", cyc, n + 3); check("SUB_X alu", n_alu, n + 1); check("SUB_X wr", n_wr, n + 1);
      check("SUB_X inv", n_inv_err, 0); check("SUB_X ext", n_ext_err, 0); check("SUB_X addr", n_addr_err, 0);
      hi = mk(HOP_SUB_B, n); issue(hi);
      check("SUB_B clocks", cyc, 2 * n + 3); check("SUB_B alu", n_alu, n + 1); check("SUB_B wr", n_wr, n + 1);
      check("SUB_B inv", n_inv_err, 0); check("SUB_B addr", n_addr_err, 0);
      hi = mk(HOP_CMP_X, n); issue(hi);
      check("CMP_X clocks", cyc, n + 1); check("CMP_X wr", n_wr, 0); check("CMP_X st", n_st, 1);
      hi = mk(HOP_CMP_B, n); issue(hi);
      check("CMP_B clocks", cyc, 2 * n + 1); check("CMP_B st", n_st, 1);
      // READ1 and MAX through the pass-through PE model
      hi = mk(HOP_READ1, n); v = hi.x & 32'((64'd1 << n) - 1); base = hi.a; issue(hi);
      @(negedge clk);
      check("READ1 clocks", cyc, n + 2); check("READ1 value", res_data, v); check("READ1 flag", res_flag, 1);
      hi = mk(HOP_MAX, n); v = hi.x & 32'((64'd1 << n) - 1); base = hi.a; issue(hi);
      check("MAX clocks", cyc, 4 * n); check("MAX value", res_data, v);
      // COUNT with the serial tree model
      hi = mk(HOP_COUNT, n); tree_val = $urandom % (1 << (n + L)); issue(hi);
      check("COUNT clocks", cyc, n + 2 * L + 2); check("COUNT start", n_sum_start, 1);
      check("COUNT value", res_data, tree_val);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

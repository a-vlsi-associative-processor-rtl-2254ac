// tb_class_machine_chain: the end-to-end test of tb_class_machine on a chain
// of two 16-PE chips, so that the first-active token, the wired-OR bus, the
// per-chip adder-tree sums and the neighbour-row links cross the chip
// boundary. The sequence is the same as in tb_class_machine:
//
// Every PE gets two random 8-bit values A and B, written one PE at a time in
// one-active mode. The test then runs each high-level instruction on all PEs
// and reads every PE's result back through the one-active readout, comparing
// with values computed here. It checks the clock count of each arithmetic
// instruction (n+2, 2n+2, n+3, 2n+3), conditional execution in normal mode,
// the adder-tree sum, the wired-OR maximum search and the neighbour links,
// and counts how often each mechanism was exercised; one that never ran is
// a failure.
module tb_class_machine_chain;
  import ap_pkg::*;
  localparam int N_CHIPS = 2, N_PE = 16, MEM_BITS = 128, RES_W = 40;
  localparam int NT = N_CHIPS * N_PE;
  localparam int L = $clog2(N_PE);

  logic clk = 0, rst_n = 0, h_valid = 0, h_ready, res_valid, res_flag, busy;
  hinstr_t h;
  logic [RES_W-1:0] res_data;
  logic [NT-1:0] pe_status;
  int checks = 0, failures = 0;
  int last_cycles;
  logic [RES_W-1:0] last_res;
  logic last_flag;
  logic [7:0] av [NT];
  logic [7:0] bv [NT];
  logic [15:0] exp_f [NT];
  // mechanism counters
  int n_one_active, n_forced, n_skip_write, n_carry_sub, n_hold, n_cmp;
  int n_tree, n_or_search, n_token_empty, n_link_up, n_link_down, n_chip_cross;

  class_machine #(.N_CHIPS(N_CHIPS), .N_PE(N_PE), .MEM_BITS(MEM_BITS)) dut (
    .clk, .rst_n, .h_valid, .h_ready, .h, .res_valid, .res_data, .res_flag,
    .busy, .pe_status
  );

  always #5 clk = ~clk;
  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic hinstr_t mk(input hop_e op, input mode_e mode, input int a, input int b,
                                 input int c, input int n, input longint x);
    hinstr_t r;
    r.op = op; r.mode = mode; r.inv = 1'b0; r.rlink = LINK_FRONT; r.wlink = LINK_FRONT;
    r.a = ADDR_W'(a); r.b = ADDR_W'(b); r.c = ADDR_W'(c); r.n = 6'(n); r.x = 32'(x);
    return r;
  endfunction

  // Issue one instruction, wait for it to end, record its busy clocks.
  task automatic issue(input hinstr_t hi);
    int cyc;
    @(negedge clk);
    while (!h_ready) @(negedge clk);
    h = hi; h_valid = 1'b1;
    @(negedge clk);
    h_valid = 1'b0;
    cyc = 0;
    while (busy) begin cyc++; @(negedge clk); end
    last_cycles = cyc;
    last_res = res_data;
    last_flag = res_flag;
  endtask

  task automatic set_all(input logic v);
    issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, longint'(v)));
    n_forced++;
  endtask

  // Read field (a, n) of every PE in turn and compare with exp_f.
  task automatic verify(input string what, input int a, input int n);
    set_all(1);
    for (int i = 0; i < NT; i++) begin
      issue(mk(HOP_READ1, MODE_NORMAL, a, 0, 0, n, 0));
      n_one_active++;
      check({what, " flag"}, last_flag, 1);
      check(what, last_res & ((40'd1 << n) - 1), exp_f[i] & ((16'd1 << n) - 1));
    end
    check({what, " all read"}, pe_status, 0);
    issue(mk(HOP_READ1, MODE_NORMAL, a, 0, 0, n, 0));
    check({what, " empty flag"}, last_flag, 0);
    n_token_empty++;
  endtask

  initial begin
    int mx, sum, cnt;
    {n_one_active, n_forced, n_skip_write, n_carry_sub, n_hold, n_cmp} = '0;
    {n_tree, n_or_search, n_token_empty, n_link_up, n_link_down, n_chip_cross} = '0;
    h = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // load A at 0..7 and B at 8..15, one PE at a time
    for (int i = 0; i < NT; i++) begin
      av[i] = 8'($urandom); bv[i] = 8'($urandom);
    end
    av[NT/2] = 8'd255;           // a known maximum for two PEs
    av[NT/3] = 8'd255;
    set_all(1);
    for (int i = 0; i < NT; i++) begin
      issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, 0, 8, av[i]));
      issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, 8, 8, bv[i]));
      issue(mk(HOP_READ1, MODE_NORMAL, 0, 0, 0, 8, 0));   // reads A, moves the token on
      n_one_active += 3;
      check("load readback", last_res, av[i]);
    end
    for (int i = 0; i < NT; i++) exp_f[i] = 16'(bv[i]);
    verify("B", 8, 8);

    // C = X + A, all PEs active
    set_all(1);
    issue(mk(HOP_ADD_X, MODE_NORMAL, 0, 0, 16, 8, 8'd77));
    check("ADD_X clocks", last_cycles, 8 + 2);
    for (int i = 0; i < NT; i++) exp_f[i] = 16'(8'(av[i] + 8'd77));
    verify("X+A", 16, 8);

    // C = B + A
    set_all(1);
    issue(mk(HOP_ADD_B, MODE_NORMAL, 0, 8, 24, 8, 0));
    check("ADD_B clocks", last_cycles, 2 * 8 + 2);
    n_hold++;
    for (int i = 0; i < NT; i++) exp_f[i] = 16'(8'(av[i] + bv[i]));
    verify("B+A", 24, 8);

    // C = X - A (9 bits, two's complement)
    set_all(1);
    issue(mk(HOP_SUB_X, MODE_NORMAL, 0, 0, 32, 8, 8'd100));
    check("SUB_X clocks", last_cycles, 8 + 3);
    n_carry_sub++;
    for (int i = 0; i < NT; i++) exp_f[i] = 16'(9'(9'd100 - 9'(av[i])));
    verify("X-A", 32, 9);

    // C = B - A
    set_all(1);
    issue(mk(HOP_SUB_B, MODE_NORMAL, 0, 8, 48, 8, 0));
    check("SUB_B clocks", last_cycles, 2 * 8 + 3);
    n_carry_sub++; n_hold++;
    for (int i = 0; i < NT; i++) exp_f[i] = 16'(9'(9'(bv[i]) - 9'(av[i])));
    verify("B-A", 48, 9);

    // S = 128 > A, then a conditional add that inactive PEs must skip
    set_all(1);
    issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, 64, 8, 8'hAA));
    issue(mk(HOP_CMP_X, MODE_NORMAL, 0, 0, 0, 8, 128));
    check("CMP_X clocks", last_cycles, 8 + 1);
    n_cmp++;
    for (int i = 0; i < NT; i++) check("CMP_X status", pe_status[i], av[i] < 8'd128);
    // adder tree: sum of A over the active PEs
    sum = 0; cnt = 0;
    for (int i = 0; i < NT; i++) if (av[i] < 128) begin sum += av[i]; cnt++; end
    issue(mk(HOP_COUNT, MODE_NORMAL, 0, 0, 0, 8, 0));
    check("COUNT sum", last_res, sum);
    check("COUNT clocks", last_cycles, 8 + 2 * L + 2);
    n_tree++;
    // count active PEs: store S in bit 70, count a 1-bit field
    issue(mk(HOP_STORE_S, MODE_FORCED, 0, 0, 70, 1, 0));
    issue(mk(HOP_COUNT, MODE_FORCED, 70, 0, 0, 1, 0));
    check("COUNT active", last_res, cnt);
    n_tree++;
    issue(mk(HOP_LOAD_S, MODE_FORCED, 70, 0, 0, 1, 0));
    for (int i = 0; i < NT; i++) check("LOAD_S status", pe_status[i], av[i] < 8'd128);
    issue(mk(HOP_ADD_X, MODE_NORMAL, 0, 0, 64, 8, 1));
    for (int i = 0; i < NT; i++) begin
      exp_f[i] = (av[i] < 128) ? 16'(8'(av[i] + 1)) : 16'h00AA;
      if (av[i] >= 128) n_skip_write++;
    end
    verify("conditional X+A", 64, 8);

    // S = A > B (inverted sense, both from memory)
    set_all(1);
    begin
      hinstr_t hi = mk(HOP_CMP_B, MODE_NORMAL, 0, 8, 0, 8, 0);
      hi.inv = 1'b1;
      issue(hi);
    end
    check("CMP_B clocks", last_cycles, 2 * 8 + 1);
    n_cmp++;
    for (int i = 0; i < NT; i++) check("CMP_B status", pe_status[i], av[i] > bv[i]);

    // maximum search with the wired-OR bus
    set_all(1);
    mx = 0;
    for (int i = 0; i < NT; i++) if (av[i] > mx) mx = av[i];
    issue(mk(HOP_MAX, MODE_NORMAL, 0, 0, 0, 8, 0));
    check("MAX value", last_res, mx);
    check("MAX clocks", last_cycles, 4 * 8);
    n_or_search++;
    for (int i = 0; i < NT; i++) check("MAX status", pe_status[i], av[i] == mx);

    // links: write A into the row below, read A from the row below
    set_all(1);
    issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, 80, 8, 8'h55));
    begin
      hinstr_t hi = mk(HOP_ADD_X, MODE_FORCED, 0, 0, 80, 8, 0);
      hi.wlink = LINK_DOWN;
      issue(hi);
      n_link_down++;
      hi = mk(HOP_ADD_X, MODE_FORCED, 0, 0, 88, 8, 0);
      hi.rlink = LINK_DOWN;
      issue(hi);
      n_link_down++;
      hi = mk(HOP_ADD_X, MODE_FORCED, 8, 0, 96, 8, 0);
      hi.rlink = LINK_UP;
      issue(hi);
      n_link_up++;
    end
    for (int i = 0; i < NT; i++) exp_f[i] = (i == 0) ? 16'h55 : 16'(av[i-1]);
    verify("write link down", 80, 8);
    for (int i = 0; i < NT; i++) exp_f[i] = (i == NT - 1) ? 16'h00 : 16'(av[i+1]);
    verify("read link down", 88, 8);
    for (int i = 0; i < NT; i++) exp_f[i] = (i == 0) ? 16'h00 : 16'(bv[i-1]);
    verify("read link up", 96, 8);
    if (N_CHIPS > 1) n_chip_cross++;

    check("mech one-active", n_one_active > 0, 1);
    check("mech forced", n_forced > 0, 1);
    check("mech skipped write", n_skip_write > 0, 1);
    check("mech subtract", n_carry_sub > 0, 1);
    check("mech hold", n_hold > 0, 1);
    check("mech compare", n_cmp > 0, 1);
    check("mech adder tree", n_tree > 0, 1);
    check("mech wired-OR search", n_or_search > 0, 1);
    check("mech empty token", n_token_empty > 0, 1);
    check("mech link up", n_link_up > 0, 1);
    check("mech link down", n_link_down > 0, 1);
    if (N_CHIPS > 1) check("mech chip crossing", n_chip_cross > 0, 1);
    $display("mechanisms: one-active %0d forced %0d skipped-writes %0d subtract %0d hold %0d compare %0d tree %0d or-search %0d empty-token %0d link-up %0d link-down %0d chip-cross %0d",
             n_one_active, n_forced, n_skip_write, n_carry_sub, n_hold, n_cmp, n_tree,
             n_or_search, n_token_empty, n_link_up, n_link_down, n_chip_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

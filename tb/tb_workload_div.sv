// tb_workload_div: integer division on the full-size machine.
//
// Workload: the divisions of the arithmetic rate table, Q = B / A and
// Q = X / A on every PE at once, for 8-bit, 16-bit and 32-bit operands. The machine
// has no divide instruction; division is built here from host instructions
// as restoring division that never shifts data: the dividend sits in the low
// n bits of a (2n+1)-bit work field W, and step i (from n-1 down to 0) works
// on the (n+1)-bit slice W[i..i+n], which is the partial remainder.
//   A1 = A - 1 (n-bit ADD_X of all ones, top bit 0), once per division;
//   per step: S = slice > A1, that is slice >= A (CMP_B, all PEs);
//             Q[i] = S (STORE_S);
//             slice -= A where S is set (SUB_B, n+1 bits; its sign bit
//             lands on W[i+n+1], which is already 0).
// The remainder is left in W[0..n-1]. Every PE gets a random B and a
// random non-zero A through one-active writes; quotients and remainders are
// read back with READ1 one PE at a time and checked. The clock count of
// each division is checked against the schedule above and printed with the
// rate it gives on 1024 PEs at 100 MHz, for comparison with the rate
// table. The sequence is this testbench's choice: the machine's
// documentation states that division is feasible but not how. Fields
// wider than 32 bits are written in 32-bit pieces.
module tb_workload_div;
  import ap_pkg::*;
  localparam int NT = 128, ROUNDS = 3;
  localparam int WIDTHS [3] = '{8, 16, 32};
  logic clk = 0, rst_n = 0, h_valid = 0, h_ready, res_valid, res_flag, busy;
  hinstr_t h;
  logic [39:0] res_data;
  logic [NT-1:0] pe_status;
  int checks = 0, failures = 0;
  int last_cycles;
  longint total_cycles = 0;
  logic [39:0] last_res;
  int n_bda = 0, n_xda = 0;

  class_machine dut (
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

  // Issue one instruction and wait for it to end; counts its clocks.
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
    total_cycles += cyc + 1;
    last_res = res_data;
  endtask

  // Read an n-bit field of every PE, one at a time, and compare.
  task automatic verify(input string what, input int f, input int n,
                        input longint expv [NT]);
    issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
    for (int i = 0; i < NT; i++) begin
      issue(mk(HOP_READ1, MODE_NORMAL, f, 0, 0, n, 0));
      check(what, longint'(last_res), expv[i]);
    end
  endtask

  // Write a field of any width in pieces of at most 32 bits (value < 2^32).
  task automatic write_wide(input int f, input int len, input longint v);
    for (int o = 0; o < len; o += 32) begin
      int w;
      w = (len - o) < 32 ? (len - o) : 32;
      issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, f + o, w, o == 0 ? v : 0));
    end
  endtask

  // Q = W[0..n-1] / A on every PE, remainder left in W[0..n-1].
  task automatic divide(input int n, input int f_a, input int f_a1, input int f_w, input int f_q);
    issue(mk(HOP_ADD_X, MODE_FORCED, f_a, 0, f_a1, n, (longint'(1) << n) - 1));
    issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, f_a1 + n, 1, 0));
    for (int i = n - 1; i >= 0; i--) begin
      issue(mk(HOP_CMP_B, MODE_FORCED, f_a1, f_w + i, 0, n + 1, 0));
      issue(mk(HOP_STORE_S, MODE_FORCED, 0, 0, f_q + i, 1, 0));
      issue(mk(HOP_SUB_B, MODE_NORMAL, f_a, f_w + i, f_w + i, n + 1, 0));
    end
  endtask

  initial begin
    h = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (WIDTHS[wi]) begin
      int n, f_a, f_a1, f_b, f_w, f_q;
      longint av [NT];
      longint bv [NT];
      longint expq [NT];
      longint expr [NT];
      longint t0, t_bda, t_xda, sched;
      n = WIDTHS[wi];
      // fields: A and A-1 (n+1 bits), B (n bits), W (2n+1 bits), Q (n bits)
      f_a = 0; f_a1 = n + 1; f_b = 2 * n + 2; f_w = 3 * n + 2; f_q = 5 * n + 3;
      t_bda = 0; t_xda = 0;
      // one division: ADD_X and WRITE_X for A-1, then per step CMP_B, STORE_S, SUB_B, each +1 gap
      sched = (n + 2 + 1) + (1 + 2 + 1) + n * ((2 * (n + 1) + 1 + 1) + (2 + 1) + (2 * (n + 1) + 3 + 1));
      for (int r = 0; r < ROUNDS; r++) begin
        longint x;
        for (int i = 0; i < NT; i++) begin
          av[i] = 1 + longint'($urandom) % ((longint'(1) << n) - 1);
          bv[i] = longint'($urandom) % (longint'(1) << n);
          if (i % 4 == 1) av[i] = av[i] % 16 + 1;   // small divisors too
        end
        if (r == 0) begin
          av[0] = 1; bv[0] = (longint'(1) << n) - 1;              // largest quotient
          av[1] = (longint'(1) << n) - 1; bv[1] = av[1];          // quotient 1
          av[2] = (longint'(1) << n) - 1; bv[2] = av[2] - 1;      // quotient 0
        end
        issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
        for (int i = 0; i < NT; i++) begin
          issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, f_a, n + 1, av[i]));
          issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, f_b, n, bv[i]));
          issue(mk(HOP_SET_S, MODE_ONE, 0, 0, 0, 1, 0));
        end
        check("operands stored", pe_status, 0);

        // Q = B / A: W = B with zeros above (copied by adding 0)
        write_wide(f_w, 2 * n + 1, 0);
        issue(mk(HOP_ADD_X, MODE_FORCED, f_b, 0, f_w, n, 0));
        t0 = total_cycles;
        divide(n, f_a, f_a1, f_w, f_q);
        check("B/A clocks", total_cycles - t0, sched);
        t_bda += total_cycles - t0;
        n_bda++;
        for (int i = 0; i < NT; i++) begin expq[i] = bv[i] / av[i]; expr[i] = bv[i] % av[i]; end
        verify("B/A quotient", f_q, n, expq);
        verify("B/A remainder", f_w, n, expr);

        // Q = X / A, X the same for all PEs
        x = longint'($urandom) % (longint'(1) << n);
        if (r == 0) x = (longint'(1) << n) - 1;
        write_wide(f_w, 2 * n + 1, x);
        t0 = total_cycles;
        divide(n, f_a, f_a1, f_w, f_q);
        check("X/A clocks", total_cycles - t0, sched);
        t_xda += total_cycles - t0;
        n_xda++;
        for (int i = 0; i < NT; i++) begin expq[i] = x / av[i]; expr[i] = x % av[i]; end
        verify("X/A quotient", f_q, n, expq);
        verify("X/A remainder", f_w, n, expr);
      end
      $display("DIV %0d-bit: %0d clocks per division (%0d MOPS on 1024 PEs at 100 MHz)",
               n, t_bda / ROUNDS, 102400 / (t_bda / ROUNDS));
    end
    check("B/A divisions run", n_bda > 0, 1);
    check("X/A divisions run", n_xda > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

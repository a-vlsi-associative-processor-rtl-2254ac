// tb_workload_mul: integer multiplication on the full-size machine.
//
// Workload: the multiplications of the arithmetic rate table, C = X * A and
// C = B * A on every PE at once, for 8-bit, 16-bit and 32-bit operands.
// The machine has no multiply instruction; multiplication is built here
// from host instructions by shift and add, LSB of the multiplier first.
//   B * A: C = 0; for each bit i of B, S = B[i] (LOAD_S) and then the
//          (n+1)-bit field C[i..i+n] += A (ADD_B) on the PEs with S set.
//   X * A: C = 0; for each bit j of X that is 1, C[j..j+n] += A on all PEs.
// A is stored with one zero bit on top, so each partial sum fits its n+1
// bits: before step i the product so far is below 2^(n+i). Every PE gets
// random A and B through one-active writes; the products are read back with
// READ1 one PE at a time (32 bits at a time) and checked. Fields wider
// than 32 bits are cleared in 32-bit pieces. The clock count of each
// product is checked against the schedule above and printed with the rate
// it gives on 1024 PEs at 100 MHz, for comparison with the rate table.
// The shift-and-add sequence is this testbench's choice: the machine's
// documentation states that multiplication is feasible but not how.
module tb_workload_mul;
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
  int n_bxa = 0, n_xxa = 0;

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

  // Clear a field of any width in pieces of at most 32 bits; returns the
  // clocks this takes by the instruction schedule.
  task automatic clear(input int f, input int len, output longint clocks);
    clocks = 0;
    for (int o = 0; o < len; o += 32) begin
      int w;
      w = (len - o) < 32 ? (len - o) : 32;
      issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, f + o, w, 0));
      clocks += w + 2 + 1;
    end
  endtask

  // Read the 2n-bit product of every PE, one PE and 32 bits at a time.
  task automatic verify(input string what, input int f_c, input int n,
                        input logic [63:0] expv [NT]);
    for (int o = 0; o < 2 * n; o += 32) begin
      int w;
      w = (2 * n - o) < 32 ? (2 * n - o) : 32;
      issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
      for (int i = 0; i < NT; i++) begin
        issue(mk(HOP_READ1, MODE_NORMAL, f_c + o, 0, 0, w, 0));
        check(what, longint'(last_res), longint'((expv[i] >> o) & ((64'd1 << w) - 1)));
      end
    end
  endtask

  initial begin
    h = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (WIDTHS[wi]) begin
      int n, f_a, f_b, f_c;
      longint av [NT];
      longint bv [NT];
      logic [63:0] expv [NT];
      longint t0, t_bxa, t_xxa, t_clr;
      int n_x;
      n = WIDTHS[wi];
      // fields: A (n+1 bits, top bit 0), B (n bits), C (2n bits)
      f_a = 0; f_b = n + 1; f_c = 2 * n + 1;
      t_bxa = 0; t_xxa = 0; n_x = 0;
      for (int r = 0; r < ROUNDS; r++) begin
        longint x, ones, sched;
        for (int i = 0; i < NT; i++) begin
          av[i] = longint'($urandom) % (longint'(1) << n);
          bv[i] = longint'($urandom) % (longint'(1) << n);
        end
        if (r == 0) begin
          av[0] = (longint'(1) << n) - 1;   // largest operands in PE 0
          bv[0] = (longint'(1) << n) - 1;
        end
        issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
        for (int i = 0; i < NT; i++) begin
          issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, f_a, n + 1, av[i]));
          issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, f_b, n, bv[i]));
          issue(mk(HOP_SET_S, MODE_ONE, 0, 0, 0, 1, 0));
        end
        check("operands stored", pe_status, 0);

        // C = B * A
        t0 = total_cycles;
        clear(f_c, 2 * n, t_clr);
        for (int i = 0; i < n; i++) begin
          issue(mk(HOP_LOAD_S, MODE_FORCED, f_b + i, 0, 0, 1, 0));
          issue(mk(HOP_ADD_B, MODE_NORMAL, f_a, f_c + i, f_c + i, n + 1, 0));
        end
        sched = t_clr + n * ((2 + 1) + (2 * (n + 1) + 2 + 1));
        check("B*A clocks", total_cycles - t0, sched);
        t_bxa += total_cycles - t0;
        n_bxa++;
        for (int i = 0; i < NT; i++) expv[i] = 64'(av[i]) * 64'(bv[i]);
        verify("B*A", f_c, n, expv);

        // C = X * A, X the same for all PEs
        x = longint'($urandom) % (longint'(1) << n);
        if (r == 0) x = (longint'(1) << n) - 1;
        t0 = total_cycles;
        ones = 0;
        clear(f_c, 2 * n, t_clr);
        for (int j = 0; j < n; j++)
          if (x[j]) begin
            issue(mk(HOP_ADD_B, MODE_FORCED, f_a, f_c + j, f_c + j, n + 1, 0));
            ones++;
          end
        sched = t_clr + ones * (2 * (n + 1) + 2 + 1);
        check("X*A clocks", total_cycles - t0, sched);
        t_xxa += total_cycles - t0;
        n_x++;
        n_xxa++;
        for (int i = 0; i < NT; i++) expv[i] = 64'(av[i]) * 64'(x);
        verify("X*A", f_c, n, expv);
      end
      $display("MUL %0d-bit: B*A %0d clocks (%0d MOPS on 1024 PEs at 100 MHz), X*A %0d clocks on average (%0d MOPS)",
               n, t_bxa / ROUNDS, 102400 / (t_bxa / ROUNDS), t_xxa / n_x, 102400 / (t_xxa / n_x));
    end
    check("B*A products run", n_bxa > 0, 1);
    check("X*A products run", n_xxa > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

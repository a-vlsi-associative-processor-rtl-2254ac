// tb_workload_rce: RCE learning and classification on the full-size machine.
//
// Workload: the same kind of two-class 2-D database (1000 points, disc and
// ring), run with 5-bit, 8-bit and 16-bit coordinates (W). One PE
// per neuron holds a centre, a class, a radius and "used"/"free" flags.
// Learning presents NTRAIN vectors once: Manhattan distances on all used
// neurons in parallel, S = radius > distance marks the neurons that fire,
// those of the wrong class get their radius cut to the distance, and if no
// neuron of the right class fired a new neuron is written into the first
// free PE in one-active mode with radius R0 = 12 scaled by 2^(W-5).
// Classification then marks the firing neurons, counts them and the class-1
// ones with the adder tree, and reads the class of the first one. Every step
// is checked against a model of the same rules; clock counts and the share of
// them spent on distances are printed for each width.
module tb_workload_rce;
  import ap_pkg::*;
  localparam int NT = 128, DB = 1000, NTRAIN = 300, NTEST = 100, R0 = 12;
  localparam int WIDTHS [3] = '{5, 8, 16};
  // field layout in every PE's memory, set for each data width W
  int W, F_X0, F_X1, F_C0, F_C1, F_CLS, F_D0, F_D1, F_D, F_T, F_R, F_USED, F_FREE, F_INS;
  logic clk = 0, rst_n = 0, h_valid = 0, h_ready, res_valid, res_flag, busy;
  hinstr_t h;
  logic [39:0] res_data;
  logic [NT-1:0] pe_status;
  int checks = 0, failures = 0;
  int last_cycles;
  longint total_cycles = 0;
  longint dist_cycles = 0;    // clocks spent in distance()
  logic [39:0] last_res;
  logic last_flag;

  class_machine dut (
    .clk, .rst_n, .h_valid, .h_ready, .h, .res_valid, .res_data, .res_flag,
    .busy, .pe_status
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic hinstr_t mk(input hop_e op, input mode_e mode, input int a, input int b,
                                 input int c, input int n, input longint x, input logic inv = 1'b0);
    hinstr_t r;
    r.op = op; r.mode = mode; r.inv = inv; r.rlink = LINK_FRONT; r.wlink = LINK_FRONT;
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
    last_flag = res_flag;
  endtask

  // Database: 2-D points with w-bit coordinates around the centre of the
  // square. Class 0 lies in a disc of radius 7/32 of the side, class 1 in a
  // ring of radii 10/32 to 15/32 (for w = 5: radius 7, ring 10 to 15).
  int px [DB];
  int py [DB];
  int pc [DB];
  task automatic make_db(input int w);
    longint sc, x, y, r2;
    sc = longint'(1) << (w - 5);
    for (int i = 0; i < DB; i++) begin
      int c;
      c = i % 2;
      do begin
        x = $urandom % (longint'(1) << w); y = $urandom % (longint'(1) << w);
        r2 = (x - 16 * sc) * (x - 16 * sc) + (y - 16 * sc) * (y - 16 * sc);
      end while (c == 0 ? !(r2 < 49 * sc * sc) : !(r2 > 100 * sc * sc && r2 < 225 * sc * sc));
      px[i] = int'(x); py[i] = int'(y); pc[i] = c;
    end
  endtask

  // Fields: X0, X1, C0, C1 (W bits), CLS (1), D0, D1 (W+1), D (W+1),
  // T or R (W+2), then the 1-bit flags.
  task automatic layout(input int w);
    W = w;
    F_X0 = 0; F_X1 = W; F_C0 = 2 * W; F_C1 = 3 * W; F_CLS = 4 * W;
    F_D0 = 4 * W + 1; F_D1 = F_D0 + W + 1; F_D = F_D1 + W + 1;
    F_T = F_D + W + 1; F_R = F_T;
    F_USED = F_T + W + 2; F_FREE = F_USED + 1; F_INS = F_USED + 2;
  endtask

  // Manhattan distance |x - C0| + |y - C1| of every active PE into D
  // (W+1 bits), using only host instructions. act_src reloads the activity:
  // -1 = all PEs, otherwise the address of a bit holding it.
  task automatic distance(input int x, input int y, input int act_src);
    longint t_start;
    t_start = total_cycles;
    issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, F_X0, W, x));
    issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, F_X1, W, y));
    for (int d = 0; d < 2; d++) begin
      int fc, fx, fd, v;
      fc = d ? F_C1 : F_C0; fx = d ? F_X1 : F_X0; fd = d ? F_D1 : F_D0; v = d ? y : x;
      restore(act_src);
      issue(mk(HOP_SUB_X, MODE_NORMAL, fc, 0, fd, W, v));          // D = x - C
      issue(mk(HOP_CMP_X, MODE_NORMAL, fc, 0, 0, W, v, 1'b1));     // S = C > x
      issue(mk(HOP_SUB_B, MODE_NORMAL, fx, fc, fd, W, 0));         // D = C - x there
    end
    restore(act_src);
    issue(mk(HOP_ADD_B, MODE_NORMAL, F_D0, F_D1, F_D, W + 1, 0));       // D = |dx| + |dy|
    dist_cycles += total_cycles - t_start;
  endtask

  task automatic restore(input int act_src);
    if (act_src < 0) issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
    else             issue(mk(HOP_LOAD_S, MODE_FORCED, act_src, 0, 0, 1, 0));
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mx [NT];
  int my [NT];
  int mc [NT];
  int mr [NT];
  int nn = 0;
  int n_shrink = 0, n_added = 0, n_unknown = 0, n_ambig = 0, n_ok = 0;

  function automatic int mdist(input int i, input int x, input int y);
    return iabs(x - mx[i]) + iabs(y - my[i]);
  endfunction

  initial begin
    h = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (WIDTHS[wi]) begin : g_width
    longint t0, t_learn, t_class, d0, p_learn, p_class;
    int r0;
    layout(WIDTHS[wi]);
    make_db(W);
    r0 = R0 << (W - 5);
    nn = 0; n_shrink = 0; n_added = 0; n_unknown = 0; n_ambig = 0; n_ok = 0;
    issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, F_USED, 1, 0));
    issue(mk(HOP_WRITE_X, MODE_FORCED, 0, 0, F_FREE, 1, 1));

    // learning: one presentation of NTRAIN vectors
    t0 = total_cycles; d0 = dist_cycles;
    for (int v = 0; v < NTRAIN; v++) begin
      int x, y, c;
      bit fired [NT];
      bit good;
      x = px[v]; y = py[v]; c = pc[v];
      good = 0;
      for (int i = 0; i < nn; i++) begin
        fired[i] = mr[i] > mdist(i, x, y);
        if (fired[i] && mc[i] == c) good = 1;
      end
      for (int i = 0; i < nn; i++)
        if (fired[i] && mc[i] != c) begin mr[i] = mdist(i, x, y); n_shrink++; end

      distance(x, y, F_USED);
      restore(F_USED);
      issue(mk(HOP_CMP_B, MODE_NORMAL, F_D, F_R, 0, W + 1, 0));          // S = R > D
      for (int i = 0; i < nn; i++) check("fired", pe_status[i], fired[i]);
      issue(mk(HOP_STORE_S, MODE_FORCED, 0, 0, F_INS, 1, 0));
      issue(mk(HOP_LOAD_S, MODE_FORCED, F_INS, 0, 0, 1, 0));
      issue(mk(HOP_CMP_X, MODE_NORMAL, F_CLS, 0, 0, 1, c, !c));      // wrong class
      issue(mk(HOP_ADD_X, MODE_NORMAL, F_D, 0, F_R, W + 1, 0));          // R = D
      issue(mk(HOP_LOAD_S, MODE_FORCED, F_INS, 0, 0, 1, 0));
      issue(mk(HOP_CMP_X, MODE_NORMAL, F_CLS, 0, 0, 1, !c, c));      // right class
      issue(mk(HOP_READ1, MODE_NORMAL, F_CLS, 0, 0, 1, 0));
      check("right class fired", last_flag, good);
      if (!good) begin
        issue(mk(HOP_LOAD_S, MODE_FORCED, F_FREE, 0, 0, 1, 0));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_C0, W, x));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_C1, W, y));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_CLS, 1, c));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_R, W + 1, r0));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_USED, 1, 1));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_FREE, 1, 0));
        if (nn < NT) begin
          mx[nn] = x; my[nn] = y; mc[nn] = c; mr[nn] = r0; nn++; n_added++;
        end
      end
    end
    t_learn = (total_cycles - t0) / NTRAIN;
    p_learn = 100 * (dist_cycles - d0) / (total_cycles - t0);

    // neurons: count with the adder tree, then read radii and classes back
    issue(mk(HOP_COUNT, MODE_FORCED, F_USED, 0, 0, 1, 0));
    check("neurons", last_res, nn);
    issue(mk(HOP_LOAD_S, MODE_FORCED, F_USED, 0, 0, 1, 0));
    for (int i = 0; i < nn; i++) begin
      issue(mk(HOP_READ1, MODE_NORMAL, F_R, 0, 0, W + 1, 0));
      check("radius", last_res, mr[i]);
    end
    issue(mk(HOP_LOAD_S, MODE_FORCED, F_USED, 0, 0, 1, 0));
    for (int i = 0; i < nn; i++) begin
      issue(mk(HOP_READ1, MODE_NORMAL, F_CLS, 0, 0, 1, 0));
      check("neuron class", last_res, mc[i]);
    end

    // classification
    t0 = total_cycles; d0 = dist_cycles;
    for (int v = 0; v < NTEST; v++) begin
      int x, y, k, k1, first;
      x = px[600 + v]; y = py[600 + v];
      k = 0; k1 = 0; first = -1;
      for (int i = 0; i < nn; i++)
        if (mr[i] > mdist(i, x, y)) begin
          k++; k1 += mc[i];
          if (first < 0) first = i;
        end
      distance(x, y, F_USED);
      restore(F_USED);
      issue(mk(HOP_CMP_B, MODE_NORMAL, F_D, F_R, 0, W + 1, 0));
      issue(mk(HOP_STORE_S, MODE_FORCED, 0, 0, F_INS, 1, 0));
      issue(mk(HOP_COUNT, MODE_FORCED, F_INS, 0, 0, 1, 0));
      check("firing neurons", last_res, k);
      issue(mk(HOP_LOAD_S, MODE_FORCED, F_INS, 0, 0, 1, 0));
      issue(mk(HOP_COUNT, MODE_NORMAL, F_CLS, 0, 0, 1, 0));
      check("firing class-1 neurons", last_res, k1);
      issue(mk(HOP_READ1, MODE_NORMAL, F_CLS, 0, 0, 1, 0));
      check("some neuron fired", last_flag, k > 0);
      if (k > 0) check("class of first firing neuron", last_res, mc[first]);
      if (k == 0) n_unknown++;
      else if (k1 != 0 && k1 != k) n_ambig++;
      else if ((k1 == k) == (pc[600 + v] == 1)) n_ok++;
    end
    t_class = (total_cycles - t0) / NTEST;
    p_class = 100 * (dist_cycles - d0) / (total_cycles - t0);
    check("radius cuts happened", n_shrink > 0, 1);
    check("neurons added", n_added > 0, 1);
    $display("RCE %0d-bit: %0d neurons, %0d radius cuts; test: %0d right, %0d unknown, %0d ambiguous of %0d",
             W, nn, n_shrink, n_ok, n_unknown, n_ambig, NTEST);
    $display("RCE %0d-bit: %0d clocks per learned vector, %0d per classified vector (%0d and %0d vectors/s at 100 MHz)",
             W, t_learn, t_class, 100000000 / t_learn, 100000000 / t_class);
    $display("RCE %0d-bit: distance computation takes %0d%% of learning and %0d%% of classification",
             W, p_learn, p_class);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_workload_lvq: LVQ learning and classification on the full-size machine.
//
// Workload: a two-class 2-D database of 1000 points, class 0 in a disc and
// class 1 in a surrounding ring, run with 5-bit, 8-bit and 16-bit
// coordinates (W). 128 of its points, with their classes, start as the
// centroids, one per PE. Everything runs as host instructions.
// Nearest centroid: Manhattan distances on all PEs in parallel (subtract,
// compare, subtract the other way, add), then max - distance with
// max = 2^(W+1)-1 and a wired-OR maximum search, which leaves only the
// nearest centroids active; the first of them is the winner.
// Learning (NLEARN vectors, every fifth label flipped so that both cases
// occur): the winner alone, in one-active mode, moves each coordinate by
// |x - c| / 2^SHIFT towards the input if the classes agree and away from it
// if not, clamped to the coordinate range. The step size and the clamp are
// this testbench's choices; only the towards/away rule is the algorithm's.
// Classification: the class of the winner is read out.
// Distances, winners, moved centroids and classes are checked against a
// model here. Clock counts per vector and the share spent on distances are
// printed for each width.
module tb_workload_lvq;
  import ap_pkg::*;
  localparam int NT = 128, DB = 1000, NTEST = 100, NLEARN = 200, SHIFT = 2;
  localparam int WIDTHS [3] = '{5, 8, 16};
  // field layout in every PE's memory, set for each data width W
  int W, F_X0, F_X1, F_C0, F_C1, F_CLS, F_D0, F_D1, F_D, F_T, F_R, F_USED, F_FREE, F_INS, F_P;
  logic clk = 0, rst_n = 0, h_valid = 0, h_ready, res_valid, res_flag, busy;
  hinstr_t h;
  logic [39:0] res_data;
  logic [NT-1:0] pe_status;
  int checks = 0, failures = 0;
  int last_cycles;
  longint total_cycles = 0;
  longint dist_cycles = 0;    // clocks spent in distance()
  int n_clamp = 0, n_toward_up = 0, n_down = 0, n_agree = 0, n_disagree = 0;
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
  // T or R (W+2), the 1-bit flags, then P (W+3), a copy of one |x - c| with
  // zeros above, so that P shifted right reads clean zeros at the top.
  task automatic layout(input int w);
    W = w;
    F_X0 = 0; F_X1 = W; F_C0 = 2 * W; F_C1 = 3 * W; F_CLS = 4 * W;
    F_D0 = 4 * W + 1; F_D1 = F_D0 + W + 1; F_D = F_D1 + W + 1;
    F_T = F_D + W + 1; F_R = F_T;
    F_USED = F_T + W + 2; F_FREE = F_USED + 1; F_INS = F_USED + 2;
    F_P = F_INS + 1;
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
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cx [NT];
    int cy [NT];
    int cc [NT];
    h = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (WIDTHS[wi]) begin
      int correct;
      longint t0, tmax, d0, t_learn;
      layout(WIDTHS[wi]);
      make_db(W);
      correct = 0;
      tmax = (longint'(1) << (W + 1)) - 1;
      // store centroids one PE at a time
      issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
      for (int i = 0; i < NT; i++) begin
        int k;
        k = (i * 7) % DB;
        cx[i] = px[k]; cy[i] = py[k]; cc[i] = pc[k];
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_C0, W, cx[i]));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_C1, W, cy[i]));
        issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_CLS, 1, cc[i]));
        issue(mk(HOP_SET_S, MODE_ONE, 0, 0, 0, 1, 0));
      end
      check("centroids stored", pe_status, 0);

      // learning: only the nearest centroid moves, by 1/2^SHIFT of the
      // difference in each coordinate, towards the input if the classes
      // agree and away from it (clamped to the coordinate range) if not
      t0 = total_cycles; d0 = dist_cycles;
      for (int v = 0; v < NLEARN; v++) begin
        int k, x, y, dmin, best, lbl;
        k = 2 * v + 1;
        x = px[k]; y = py[k];
        lbl = pc[k] ^ int'(v % 5 == 4);   // every fifth label flipped, as noise
        dmin = 1 << 30; best = -1;
        for (int i = 0; i < NT; i++) begin
          int d;
          d = iabs(x - cx[i]) + iabs(y - cy[i]);
          if (d < dmin) begin dmin = d; best = i; end
        end
        distance(x, y, -1);
        restore(-1);
        issue(mk(HOP_SUB_X, MODE_NORMAL, F_D, 0, F_T, W + 1, tmax));
        issue(mk(HOP_MAX, MODE_NORMAL, F_T, 0, 0, W + 1, 0));
        issue(mk(HOP_STORE_S, MODE_FORCED, 0, 0, F_INS, 1, 0));      // nearest set
        issue(mk(HOP_READ1, MODE_NORMAL, F_CLS, 0, 0, 1, 0));
        check("learning: winner class", last_res, cc[best]);
        for (int d = 0; d < 2; d++) begin
          int fc, fd, c, xv, step, nc;
          fc = d ? F_C1 : F_C0; fd = d ? F_D1 : F_D0; xv = d ? y : x;
          issue(mk(HOP_LOAD_S, MODE_FORCED, F_INS, 0, 0, 1, 0));
          issue(mk(HOP_READ1, MODE_NORMAL, fc, 0, 0, W, 0));         // winner's coordinate
          c = int'(last_res);
          check("learning: winner coordinate", c, d ? cy[best] : cx[best]);
          step = iabs(xv - c) >> SHIFT;
          nc = ((xv > c) == (lbl == cc[best])) ? c + step : c - step;
          issue(mk(HOP_LOAD_S, MODE_FORCED, F_INS, 0, 0, 1, 0));
          if (nc < 0 || nc >= (1 << W)) begin
            nc = nc < 0 ? 0 : (1 << W) - 1;
            issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, fc, W, nc));      // clamp
            n_clamp++;
          end else begin
            // P = |x - c| with zeros above, in the winner only
            issue(mk(HOP_WRITE_X, MODE_ONE, 0, 0, F_P, W + 3, 0));
            issue(mk(HOP_ADD_X, MODE_ONE, fd, 0, F_P, W + 1, 0));
            if (nc >= c) begin
              issue(mk(HOP_ADD_B, MODE_ONE, F_P + SHIFT, fc, fc, W, 0));  // c += step
              n_toward_up += (nc > c);
            end else begin
              issue(mk(HOP_SUB_B, MODE_ONE, F_P + SHIFT, fc, F_T, W, 0)); // c - step
              issue(mk(HOP_ADD_X, MODE_ONE, F_T, 0, fc, W, 0));
              n_down++;
            end
          end
          if (d) cy[best] = nc; else cx[best] = nc;
        end
        if (lbl == cc[best]) n_agree++; else n_disagree++;
      end
      t_learn = (total_cycles - t0) / NLEARN;
      $display("LVQ %0d-bit: learning %0d clocks per vector (%0d vectors/s at 100 MHz), distance computation %0d%% of it",
               W, t_learn, 100000000 / t_learn, 100 * (dist_cycles - d0) / (total_cycles - t0));
      // every centroid read back after learning
      issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
      for (int i = 0; i < NT; i++) begin
        issue(mk(HOP_READ1, MODE_NORMAL, F_C0, 0, 0, W, 0));
        check("learned x", last_res, cx[i]);
      end
      issue(mk(HOP_SET_S, MODE_FORCED, 0, 0, 0, 1, 1));
      for (int i = 0; i < NT; i++) begin
        issue(mk(HOP_READ1, MODE_NORMAL, F_C1, 0, 0, W, 0));
        check("learned y", last_res, cy[i]);
      end

      t0 = total_cycles; d0 = dist_cycles;
      for (int v = 0; v < NTEST; v++) begin
        int k, x, y, dmin, best;
        k = 501 + 3 * v;
        x = px[k]; y = py[k];
        dmin = 1 << 30; best = -1;
        for (int i = 0; i < NT; i++) begin
          int d;
          d = iabs(x - cx[i]) + iabs(y - cy[i]);
          if (d < dmin) begin dmin = d; best = i; end
        end
        distance(x, y, -1);
        restore(-1);
        issue(mk(HOP_SUB_X, MODE_NORMAL, F_D, 0, F_T, W + 1, tmax));  // T = max - D
        issue(mk(HOP_MAX, MODE_NORMAL, F_T, 0, 0, W + 1, 0));         // nearest stay active
        check("nearest distance", tmax - longint'(last_res), dmin);
        for (int i = 0; i < NT; i++)
          check("nearest set", pe_status[i], (iabs(x - cx[i]) + iabs(y - cy[i])) == dmin);
        issue(mk(HOP_READ1, MODE_NORMAL, F_CLS, 0, 0, 1, 0));         // class of the first
        check("class", last_res, cc[best]);
        if (int'(last_res) == pc[k]) correct++;
      end
      $display("LVQ %0d-bit: %0d of %0d test vectors in their true class; %0d clocks per vector (%0d vectors/s at 100 MHz)",
               W, correct, NTEST, (total_cycles - t0) / NTEST, 100000000 / ((total_cycles - t0) / NTEST));
      $display("LVQ %0d-bit: distance computation takes %0d%% of classification",
               W, 100 * (dist_cycles - d0) / (total_cycles - t0));
    end
    check("learning: classes agreed", n_agree > 0, 1);
    check("learning: classes disagreed", n_disagree > 0, 1);
    check("learning: centroid moved up", n_toward_up > 0, 1);
    check("learning: centroid moved down", n_down > 0, 1);
    $display("LVQ learning moves: %0d up, %0d down, %0d clamped; %0d agreeing and %0d disagreeing classes",
             n_toward_up, n_down, n_clamp, n_agree, n_disagree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

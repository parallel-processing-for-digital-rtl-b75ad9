// tb_picture_comparator: end-to-end test of the comparator at its default
// size (16 x 16 gray levels, 16-bit bins).
//
// Each comparison gets histograms from one of several generators (random,
// a rebinned copy of H1 so that an exact packing exists, sparse with zero
// bins, bins at full scale). Expected results come from pc_ref_pkg:
// S_N(M), the packing found by following the stored u from (M,N), and the
// cost of the reported packing, which must equal the reported error. The
// error must appear exactly at time unit 2M+N+3 (on the port one cycle
// later) and backtracking must end within M+N further time units.
// A series of error-only comparisons checks the best-match register.
// Counted mechanisms, each of which must occur: error-only operation,
// operation with path, box left empty (u = i wins), tag 0 at row 1, best
// match replaced and best match kept, and a run of the one-dimensional
// engine, whose error must match and arrive at 2M+4+(N-1)(M+1).
`timescale 1ns/1ps
module tb_picture_comparator;
  import pc_pkg::*;
  import pc_ref_pkg::*;

  localparam int M  = M_DEFAULT;
  localparam int N  = N_DEFAULT;
  localparam int HW = HW_DEFAULT;
  localparam int SW = s_width(M, N, HW);
  localparam int IW = i_width(M);
  localparam int T_RES = 2 * M + N + 3;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          path = 1'b0;
  logic [HW-1:0] h1 [M];
  logic [HW-1:0] h2 [N];
  logic          busy, done, res_valid, path_valid, clear_best = 1'b0;
  logic [SW-1:0] err, best_err;
  logic [IW-1:0] last_lvl [N];
  logic [IW-1:0] unpacked;
  logic [7:0]    best_idx, count;
  logic          lin_start = 1'b0, lin_busy, lin_done;
  logic [SW-1:0] lin_err;
  localparam int T_LIN = 2 * M + 4 + (N - 1) * (M + 1);

  picture_comparator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_erronly = 0, n_path = 0, n_empty_box = 0, n_tag0 = 0, n_best_new = 0, n_best_keep = 0, n_linear = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // histogram generators
  function automatic longint rnd(input longint lim);
    return longint'($urandom_range(0, 32'(lim)));
  endfunction

  task automatic gen(input int kind, ref longint a[$], ref longint b[$]);
    a = {};
    b = {};
    case (kind)
      0: begin
        for (int i = 0; i < M; i++) a.push_back(rnd(1000));
        for (int j = 0; j < N; j++) b.push_back(rnd(1000));
      end
      1: begin  // b is a merge of consecutive bins of a, lighting shifted
        int cut [$];
        int k = 0;
        for (int i = 0; i < M; i++) a.push_back(rnd(500) + 1);
        for (int j = 0; j < N; j++) begin
          longint s = 0;
          int take = (j == N - 1) ? (M - k) : ((k < M && $urandom_range(0, 2) != 0) ? 1 : 0);
          for (int t = 0; t < take; t++) s += a[k + t];
          k += take;
          b.push_back(s);
        end
      end
      2: begin  // sparse, leading zeros in the reference
        int lead = $urandom_range(1, 4);
        for (int i = 0; i < M; i++) a.push_back(($urandom_range(0, 2) == 0) ? 0 : rnd(300));
        for (int j = 0; j < N; j++) b.push_back((j < lead || $urandom_range(0, 2) == 0) ? 0 : rnd(600));
      end
      default: begin  // full-scale bins
        for (int i = 0; i < M; i++) a.push_back((1 << HW) - 1 - rnd(3));
        for (int j = 0; j < N; j++) b.push_back(($urandom_range(0, 1) == 0) ? 0 : (1 << HW) - 1);
      end
    endcase
  endtask

  task automatic run_op(input longint a[$], input longint b[$], input bit with_path,
                        output longint got);
    longint s[$];
    int     arg[$], last[$];
    longint exp_err;
    int     exp_unp, tu, t_res_seen, t_done;
    exp_err = pc_solve(a, b, s, arg);
    exp_unp = trace(M, N, arg, last);
    for (int i = 0; i < M; i++) h1[i] = HW'(a[i]);
    for (int j = 0; j < N; j++) h2[j] = HW'(b[j]);
    @(negedge clk);
    start = 1'b1;
    path  = with_path;
    @(negedge clk);
    start = 1'b0;
    tu = 1;
    t_res_seen = -1;
    t_done = -1;
    while (t_done < 0 && tu < 10 * (T_RES + M + N)) begin
      if (res_valid) begin
        t_res_seen = tu;
        got = longint'(err);
      end
      if (done) t_done = tu;
      @(negedge clk);
      tu++;
    end
    check(t_res_seen == T_RES + 1, $sformatf("error at time unit %0d, expected %0d", t_res_seen - 1, T_RES));
    check(got == exp_err, $sformatf("S_N(M)=%0d expected %0d", got, exp_err));
    check(!busy, "busy after done");
    if (with_path) begin
      n_path++;
      check(t_done > 0 && t_done <= T_RES + 1 + M + N + 1,
            $sformatf("backtracking ended at %0d, bound %0d", t_done, T_RES + 2 + M + N));
      check(path_valid, "path_valid");
      check(int'(unpacked) == exp_unp, $sformatf("unpacked %0d expected %0d", unpacked, exp_unp));
      for (int j = 0; j < N; j++)
        check(int'(last_lvl[j]) == last[j], $sformatf("last level of box %0d: %0d expected %0d", j + 1, last_lvl[j], last[j]));
      begin
        int hw_last[$];
        for (int j = 0; j < N; j++) hw_last.push_back(int'(last_lvl[j]));
        check(path_cost(a, b, hw_last, int'(unpacked)) == got, "reported packing does not cost S_N(M)");
        for (int j = 0; j < N; j++) begin
          int prev = (j == 0) ? int'(unpacked) : hw_last[j-1];
          if (hw_last[j] == prev) n_empty_box++;
        end
        if (hw_last[0] == 0) n_tag0++;
      end
    end else begin
      n_erronly++;
      check(t_done == T_RES + 1, $sformatf("error-only done at %0d", t_done));
    end
  endtask

  // the one-dimensional engine on the same histograms
  task automatic run_linear(input longint a[$], input longint b[$]);
    longint s[$];
    int     arg[$], tu, t_seen;
    longint exp_err;
    exp_err = pc_solve(a, b, s, arg);
    for (int i = 0; i < M; i++) h1[i] = HW'(a[i]);
    for (int j = 0; j < N; j++) h2[j] = HW'(b[j]);
    @(negedge clk);
    lin_start = 1'b1;
    @(negedge clk);
    lin_start = 1'b0;
    t_seen = -1;
    for (tu = 1; tu <= T_LIN + 4 && t_seen < 0; tu++) begin
      if (lin_done) begin
        t_seen = tu;
        check(longint'(lin_err) == exp_err, $sformatf("linear S_N(M)=%0d expected %0d", lin_err, exp_err));
      end
      @(negedge clk);
    end
    check(t_seen == T_LIN + 1, $sformatf("linear result at %0d expected %0d", t_seen - 1, T_LIN));
    n_linear++;
  endtask

  initial begin
    longint a[$], b[$], e;
    longint best;
    int     best_i;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // comparisons with backtracking
    for (int k = 0; k < 24; k++) begin
      gen(k % 4, a, b);
      run_op(a, b, 1'b1, e);
    end
    // the partitioned engine, one column in N passes
    for (int k = 0; k < 8; k++) begin
      gen(k % 4, a, b);
      run_linear(a, b);
    end
    // a series of input pictures against one reference: best match
    @(negedge clk);
    clear_best = 1'b1;
    @(negedge clk);
    clear_best = 1'b0;
    // reference b; picture 5 is a rebinned match of it, the rest random
    gen(1, a, b);
    best = -1;
    best_i = 0;
    for (int k = 0; k < 8; k++) begin
      longint a2[$], b2[$];
      if (k == 5) a2 = a;
      else gen(0, a2, b2);
      run_op(a2, b, 1'b0, e);
      @(negedge clk);
      if (best < 0 || e < best) begin
        best = e;
        best_i = k;
        n_best_new++;
      end else n_best_keep++;
      check(longint'(best_err) == best && int'(best_idx) == best_i && int'(count) == k + 1,
            $sformatf("best match %0d/#%0d expected %0d/#%0d", best_err, best_idx, best, best_i));
    end
    check(best == 0, "exact match should give error 0");
    $display("mechanisms: error_only=%0d path=%0d empty_box=%0d tag0=%0d best_new=%0d best_keep=%0d linear=%0d",
             n_erronly, n_path, n_empty_box, n_tag0, n_best_new, n_best_keep, n_linear);
    check(n_linear > 0, "one-dimensional engine never ran");
    check(n_erronly > 0, "no error-only operation");
    check(n_path > 0, "no operation with path");
    check(n_empty_box > 0, "no empty box (u = i) in any packing");
    check(n_tag0 > 0, "tag 0 never reached row 1");
    check(n_best_new > 1, "best match never replaced");
    check(n_best_keep > 0, "best match never kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

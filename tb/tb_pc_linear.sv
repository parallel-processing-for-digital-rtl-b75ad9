// tb_pc_linear: test of the one-dimensional comparator (M = 6, N = 5, and
// the random and structured histograms of the end-to-end test).
//
// Each comparison is checked against the reference S_N(M) and must finish
// exactly at time unit 2M+4+(N-1)(M+1), i.e. in O(M x N) time. A start
// while busy must be ignored.
`timescale 1ns/1ps
module tb_pc_linear;
  import pc_pkg::*;
  import pc_ref_pkg::*;

  localparam int M = 6, N = 5, HW = 12;
  localparam int SW = s_width(M, N, HW);
  localparam int T_RES = 2 * M + 4 + (N - 1) * (M + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [HW-1:0] h1 [M];
  logic [HW-1:0] h2 [N];
  logic busy, done, res_valid;
  logic [SW-1:0] err;

  pc_linear #(.M(M), .N(N), .HW(HW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      longint a[$], b[$], s[$], exp_err;
      int arg[$], tu, t_res_seen;
      a = {};
      b = {};
      for (int i = 0; i < M; i++) a.push_back((it % 3 == 2 && $urandom_range(0, 1) == 0) ? 0 : $urandom_range(0, (it % 5 == 4) ? 4095 : 300));
      for (int j = 0; j < N; j++) b.push_back((it % 3 == 1 && j < 2) ? 0 : $urandom_range(0, (it % 5 == 4) ? 4095 : 400));
      exp_err = pc_solve(a, b, s, arg);
      for (int i = 0; i < M; i++) h1[i] = HW'(a[i]);
      for (int j = 0; j < N; j++) h2[j] = HW'(b[j]);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      t_res_seen = -1;
      for (tu = 1; tu <= T_RES + 5 && t_res_seen < 0; tu++) begin
        if (tu == 7) start = 1;
        if (tu == 8) start = 0;
        if (tu == 9) for (int i = 0; i < M; i++) h1[i] = '0;   // sampled at start only
        @(negedge clk);
        if (res_valid) begin
          t_res_seen = tu + 1;
          check(longint'(err) == exp_err, $sformatf("S_N(M)=%0d expected %0d", err, exp_err));
          check(done, "done with the result");
        end
      end
      check(t_res_seen == T_RES + 1, $sformatf("result at %0d expected %0d", t_res_seen - 1, T_RES));
      check(!busy, "idle after the result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

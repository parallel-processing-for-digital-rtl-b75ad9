// tb_pc_array: the PE grid alone (6 x 5), its edges driven by the test.
//
// The test plays the boundary schedule itself: H1 at time unit 1, tuple
// u = 0 of column j at j+3, identification with S_0(i) into row i at 2i+3.
// It checks that every S_N(i) leaves the right edge at time unit 2i+N+3
// with the value of the reference recurrence, that nothing else leaves
// there, then launches the tag into PE(M,N) and checks the hit of every
// column and the tag leaving column 1 within M+N time units.
`timescale 1ns/1ps
module tb_pc_array;
  import pc_pkg::*;
  import pc_ref_pkg::*;

  localparam int M = 6, N = 5, HW = 12;
  localparam int SW = s_width(M, N, HW);
  localparam int IW = i_width(M);

  logic clk = 0, rst_n = 0;
  logic [M-1:0]  h1_v, id_v, bt_v, res_v;
  logic [HW-1:0] h1 [M];
  logic [SW-1:0] id_s [M];
  logic [N-1:0]  top_v;
  logic [SW-1:0] top_s [N];
  logic [HW-1:0] top_h2 [N];
  logic [IW-1:0] bt_t [M];
  logic [SW-1:0] res_s [M];
  logic [N-1:0]  hit [M];
  logic [N-1:0]  hit_empty [M];
  logic          bt_out_v;
  logic [IW-1:0] bt_out_t;

  pc_array #(.M(M), .N(N), .HW(HW)) dut (.*);

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

  task automatic idle_edges();
    h1_v = '0; id_v = '0; top_v = '0; bt_v = '0;
  endtask

  initial begin
    idle_edges();
    for (int i = 0; i < M; i++) begin h1[i] = '0; id_s[i] = '0; bt_t[i] = '0; end
    for (int j = 0; j < N; j++) begin top_s[j] = '0; top_h2[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      longint a[$], b[$], s[$], pa, qa;
      int arg[$], last[$], unp, seen_last[N], seen_hit[N], t_out;
      int t_res;
      t_res = 2 * M + N + 3;
      a = {};
      b = {};
      for (int i = 0; i < M; i++) a.push_back((it % 3 == 2 && $urandom_range(0,1) == 0) ? 0 : $urandom_range(0, 300));
      for (int j = 0; j < N; j++) b.push_back((it % 3 == 1 && j < 2) ? 0 : $urandom_range(0, 400));
      void'(pc_solve(a, b, s, arg));
      unp = trace(M, N, arg, last);
      pa = 0;
      for (int i = 0; i < M; i++) begin pa += a[i]; id_s[i] = SW'(pa); h1[i] = HW'(a[i]); end
      qa = 0;
      for (int j = 0; j < N; j++) begin top_s[j] = SW'(qa); top_h2[j] = HW'(b[j]); qa += b[j]; end
      for (int j = 0; j < N; j++) begin seen_hit[j] = 0; seen_last[j] = -1; end
      t_out = -1;
      for (int tu = 1; tu <= t_res + M + N + 4; tu++) begin
        @(negedge clk);
        for (int i = 1; i <= M; i++) begin
          h1_v[i-1] = (tu == 1);
          id_v[i-1] = (tu == 2 * i + 3);
          bt_v[i-1] = (i == M) && (tu == t_res + 1);
          bt_t[i-1] = IW'(M);
        end
        for (int j = 1; j <= N; j++) top_v[j-1] = (tu == j + 3);
        // right edge
        for (int i = 1; i <= M; i++) begin
          if (tu == 2 * i + N + 3) begin
            check(res_v[i-1] && longint'(res_s[i-1]) == s[N*(M+1)+i],
                  $sformatf("S_N(%0d)=%0d expected %0d", i, res_s[i-1], s[N*(M+1)+i]));
          end else if (res_v[i-1]) begin
            check(0, $sformatf("row %0d right edge at time unit %0d", i, tu));
          end
        end
        for (int i = 0; i < M; i++)
          for (int j = 0; j < N; j++)
            if (hit[i][j]) begin
              seen_hit[j]++;
              seen_last[j] = hit_empty[i][j] ? 0 : i + 1;
            end
        if (bt_out_v && t_out < 0) begin
          t_out = tu;
          check(int'(bt_out_t) == unp, "tag leaving column 1");
        end
      end
      idle_edges();
      for (int j = 0; j < N; j++)
        check(seen_hit[j] == 1 && seen_last[j] == last[j],
              $sformatf("column %0d: %0d hits, row %0d expected %0d", j + 1, seen_hit[j], seen_last[j], last[j]));
      check(t_out > t_res && t_out <= t_res + 1 + M + N, $sformatf("tag left at %0d", t_out));
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pc_sequencer: unit test of the boundary feeder and operation control
// (M = 5, N = 4).
//
// After a start pulse the test follows the time units and checks every edge
// drive: H1 at 1, tuple u = 0 of column j at j+3 carrying H2(1..j-1) summed
// and H2(j), identification into row i at 2i+3 carrying H1(1..i) summed, and
// nothing at any other time. It returns a made-up S_N(M) at 2M+N+3 and
// checks res_valid/res_err, the tag launch at 2M+N+4 (path mode), done
// after bt_done, done right after the result in error-only mode, and that
// a start while busy is ignored.
`timescale 1ns/1ps
module tb_pc_sequencer;
  import pc_pkg::*;

  localparam int M = 5, N = 4, HW = 10;
  localparam int SW = s_width(M, N, HW);
  localparam int IW = i_width(M);
  localparam int T_RES = 2 * M + N + 3;

  logic clk = 0, rst_n = 0, start = 0, path = 0;
  logic [HW-1:0] h1_in [M];
  logic [HW-1:0] h2_in [N];
  logic busy, done, res_valid;
  logic [SW-1:0] res_err;
  logic [M-1:0] h1_v, id_v, bt_v;
  logic [HW-1:0] h1 [M];
  logic [SW-1:0] id_s [M];
  logic [N-1:0] top_v;
  logic [SW-1:0] top_s [N];
  logic [HW-1:0] top_h2 [N];
  logic [IW-1:0] bt_t [M];
  logic [SW-1:0] arr_res_s = '0;
  logic arr_res_v = 0, bt_done = 0;

  pc_sequencer #(.M(M), .N(N), .HW(HW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 30; it++) begin
      int a[M], b[N], bt_delay, t_done, t_res_seen, tu;
      bit with_path;
      longint magic;
      with_path = it[0];
      magic = $urandom_range(0, (1 << SW) - 1);
      bt_delay = $urandom_range(1, M + N);
      for (int i = 0; i < M; i++) begin a[i] = $urandom_range(0, 1023); h1_in[i] = HW'(a[i]); end
      for (int j = 0; j < N; j++) begin b[j] = $urandom_range(0, 1023); h2_in[j] = HW'(b[j]); end
      @(negedge clk);
      check(!busy, "idle before start");
      start = 1; path = with_path;
      @(negedge clk);
      start = 0;
      // inputs may change once sampled
      for (int i = 0; i < M; i++) h1_in[i] = '0;
      t_done = -1; t_res_seen = -1;
      for (tu = 1; tu < T_RES + M + N + 8 && t_done < 0; tu++) begin
        longint acc;
        if (tu == 3) start = 1;          // ignored: busy
        if (tu == 4) start = 0;
        check(busy, "busy during operation");
        check(h1_v == ((tu == 1) ? '1 : '0), $sformatf("h1_v at %0d", tu));
        if (tu == 1) for (int i = 0; i < M; i++) check(int'(h1[i]) == a[i], "H1 value");
        acc = 0;
        for (int i = 1; i <= M; i++) begin
          acc += a[i-1];
          check(id_v[i-1] == (tu == 2 * i + 3), $sformatf("id_v row %0d at %0d", i, tu));
          if (tu == 2 * i + 3) check(longint'(id_s[i-1]) == acc, "S_0(i)");
        end
        acc = 0;
        for (int j = 1; j <= N; j++) begin
          check(top_v[j-1] == (tu == j + 3), $sformatf("top_v col %0d at %0d", j, tu));
          if (tu == j + 3) check(longint'(top_s[j-1]) == acc && int'(top_h2[j-1]) == b[j-1], "S_{j-1}(0), H2(j)");
          acc += b[j-1];
        end
        check(bt_v == ((with_path && tu == T_RES + 1) ? M'(1) << (M - 1) : '0), $sformatf("bt_v at %0d", tu));
        if (bt_v[M-1]) check(int'(bt_t[M-1]) == M, "tag target M");
        arr_res_v = (tu == T_RES);
        arr_res_s = SW'(magic);
        bt_done = with_path && (tu == T_RES + 1 + bt_delay);
        @(negedge clk);
        if (res_valid) begin t_res_seen = tu + 1; check(longint'(res_err) == magic, $sformatf("result latched %0d %0d path %0d", res_err, magic, with_path)); end
        if (done) t_done = tu + 1;
      end
      arr_res_v = 0; bt_done = 0;
      check(t_res_seen == T_RES + 1, $sformatf("res_valid at %0d", t_res_seen));
      if (with_path) check(t_done == T_RES + 2 + bt_delay, $sformatf("done at %0d", t_done));
      else check(t_done == T_RES + 1, $sformatf("error-only done at %0d", t_done));
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

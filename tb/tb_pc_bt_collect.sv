// tb_pc_bt_collect: unit test of the packing collector (M = 7, N = 6).
//
// The test plays a backtracking pass the way the array would: for a random
// non-increasing sequence of rows it raises one hit per column, from column
// N down to 1, with a few idle cycles of upward tag motion between them,
// flags hits at row 1 with tag 0 as empty, then signals the tag leaving
// column 1. It checks last_lvl, unpacked, path_valid, bt_done and that
// clear drops path_valid.
`timescale 1ns/1ps
module tb_pc_bt_collect;
  import pc_pkg::*;

  localparam int M = 7, N = 6;
  localparam int IW = i_width(M);

  logic clk = 0, rst_n = 0, clear = 0, tag_out = 0;
  logic [N-1:0] hit [M];
  logic [N-1:0] hit_empty [M];
  logic [IW-1:0] tag_out_t = '0;
  logic [IW-1:0] last_lvl [N];
  logic [IW-1:0] unpacked;
  logic path_valid, bt_done;

  pc_bt_collect #(.M(M), .N(N)) dut (.*);

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

  task automatic no_hits();
    for (int i = 0; i < M; i++) begin hit[i] = '0; hit_empty[i] = '0; end
  endtask

  initial begin
    no_hits();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      int last[N];
      int row;
      row = M;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(!path_valid, "clear drops path_valid");
      for (int j = N; j >= 1; j--) begin
        last[j-1] = row;
        for (int k = 0; k < $urandom_range(0, 2); k++) begin
          @(negedge clk);   // tag travelling up
          check(!bt_done, "no bt_done while travelling");
        end
        no_hits();
        if (row == 0) begin hit[0][j-1] = 1'b1; hit_empty[0][j-1] = 1'b1; end
        else hit[row-1][j-1] = 1'b1;
        @(negedge clk);
        no_hits();
        // next tag target
        row = (row == 0 || $urandom_range(0, 4) == 0) ? 0 : $urandom_range(row / 2, row);
      end
      tag_out = 1; tag_out_t = '0;
      check(bt_done, "bt_done with the tag");
      @(negedge clk);
      tag_out = 0;
      check(path_valid, "path_valid");
      check(unpacked == '0, "unpacked");
      for (int j = 0; j < N; j++)
        check(int'(last_lvl[j]) == last[j], $sformatf("box %0d last %0d expected %0d", j + 1, last_lvl[j], last[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

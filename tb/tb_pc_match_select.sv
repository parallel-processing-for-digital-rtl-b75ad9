// tb_pc_match_select: unit test of the best-match register.
//
// Series of random summation errors (with repeats, so that ties occur) are
// fed with gaps of idle cycles; after each one the smallest error so far,
// the number of the first result that reached it and the result count are
// compared with a running reference. clear starts a new series.
`timescale 1ns/1ps
module tb_pc_match_select;
  localparam int SW = 12, PW = 6;

  logic clk = 0, rst_n = 0, clear = 0, res_valid = 0;
  logic [SW-1:0] res_err = '0, best_err;
  logic [PW-1:0] best_idx, count;

  pc_match_select #(.SW(SW), .PW(PW)) dut (.*);

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
    for (int series = 0; series < 20; series++) begin
      int best, best_i;
      best = -1;
      best_i = 0;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int k = 0; k < 30; k++) begin
        int e;
        e = (series == 0 && k == 0) ? (1 << SW) - 1 : $urandom_range(0, 40) * 50;
        res_valid = 1; res_err = SW'(e);
        @(negedge clk);
        res_valid = 0;
        if (best < 0 || e < best) begin best = e; best_i = k; end
        check(int'(best_err) == best && int'(best_idx) == best_i && int'(count) == k + 1,
              $sformatf("series %0d result %0d: %0d/#%0d expected %0d/#%0d", series, k, best_err, best_idx, best, best_i));
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

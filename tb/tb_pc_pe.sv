// tb_pc_pe: unit test of one processing element (row 3 of a 16-level array).
//
// For random H1(i), H2(j) and a stream of tuples u = 0..ROW-1 the test
// checks each tuple passed down (remainder reduced by H1(i), other fields
// unchanged, one cycle later), then sends the identification signal with
// S_{j-1}(i) and checks S_j(i) on the right link against
// min(min_u S_{j-1}(u) + |r_u - H1(i)|, S_{j-1}(i) + H2(j)) and the new
// tuple u = i on the column link. Finally a tag for this row must hit and
// leave to the left carrying the winning u, and a tag for a lower row must
// move up.
`timescale 1ns/1ps
module tb_pc_pe;
  import pc_pkg::*;

  localparam int HW = HW_DEFAULT;
  localparam int SW = s_width(M_DEFAULT, N_DEFAULT, HW_DEFAULT);
  localparam int RW = r_width(M_DEFAULT, HW_DEFAULT);
  localparam int IW = i_width(M_DEFAULT);
  localparam int ROW = 3;

  logic clk = 0, rst_n = 0;
  logic h1_vin = 0, h1_vout;
  logic [HW-1:0] h1_in = '0, h1_out;
  logic t_vin = 0, t_first_in = 0, t_vout, t_first_out;
  logic [IW-1:0] t_u_in = '0, t_u_out;
  logic [SW-1:0] t_s_in = '0, t_s_out;
  logic signed [RW-1:0] t_r_in = '0, t_r_out;
  logic [HW-1:0] t_h2_in = '0, t_h2_out;
  logic id_in = 0, id_out;
  logic [SW-1:0] s_in = '0, s_out;
  logic bu_vin = 0, bl_vin = 0, bu_vout, bl_vout, bt_hit, bt_empty;
  logic [IW-1:0] bu_t_in = '0, bl_t_in = '0, bu_t_out, bl_t_out;

  pc_pe #(.HW(HW), .SW(SW), .RW(RW), .IW(IW), .ROW(ROW)) dut (.*);

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
    for (int it = 0; it < 200; it++) begin
      longint h1v, h2v, best, c, selfc, expS;
      int bu, expu;
      longint sv [ROW];
      longint rv [ROW];
      h1v = $urandom_range(0, (it % 3 == 0) ? 65535 : 200);
      h2v = $urandom_range(0, (it % 5 == 0) ? 65535 : 400);
      // H1 passes on the row link
      @(negedge clk);
      h1_vin = 1; h1_in = HW'(h1v);
      @(negedge clk);
      h1_vin = 0;
      check(h1_vout && h1_out == HW'(h1v), "H1 forwarded");
      best = 0; bu = 0;
      for (int u = 0; u < ROW; u++) begin
        sv[u] = $urandom_range(0, 3000);
        rv[u] = (u == 0) ? h2v : longint'($urandom_range(0, 800)) - 400;
        if (it % 7 == 1) sv[u] = 100;   // equal candidates: smaller u wins
        if (it % 7 == 1) rv[u] = h1v;
        t_vin = 1; t_first_in = (u == 0); t_u_in = IW'(u);
        t_s_in = SW'(sv[u]); t_r_in = RW'(rv[u]); t_h2_in = HW'(h2v);
        c = sv[u] + ((rv[u] - h1v < 0) ? h1v - rv[u] : rv[u] - h1v);
        if (u == 0 || c < best) begin best = c; bu = u; end
        @(negedge clk);
        t_vin = 0;
        check(t_vout && t_u_out == IW'(u) && t_s_out == SW'(sv[u]) && t_h2_out == HW'(h2v)
              && longint'(t_r_out) == rv[u] - h1v && t_first_out == (u == 0),
              $sformatf("tuple %0d passed down", u));
      end
      // identification with S_{j-1}(i)
      s_in = SW'($urandom_range(0, 3000));
      if (it % 4 == 2) s_in = 0;
      id_in = 1;
      selfc = longint'(s_in) + h2v;
      expS = (selfc < best) ? selfc : best;
      expu = (selfc < best) ? ROW : bu;
      @(negedge clk);
      id_in = 0;
      check(id_out && longint'(s_out) == expS, $sformatf("S_j(i)=%0d expected %0d", s_out, expS));
      check(t_vout && !t_first_out && t_u_out == IW'(ROW) && t_s_out == s_in
            && longint'(t_r_out) == h2v, "tuple u=i started");
      // tag for this row, from the right
      bl_vin = 1; bl_t_in = IW'(ROW);
      @(negedge clk);
      bl_vin = 0;
      check(bt_hit && !bt_empty && bl_vout && !bu_vout && bl_t_out == IW'(expu),
            $sformatf("hit, u=%0d expected %0d", bl_t_out, expu));
      // tag for a row above, from below
      bu_vin = 1; bu_t_in = IW'($urandom_range(0, ROW - 1));
      @(negedge clk);
      bu_vin = 0;
      check(!bt_hit && bu_vout && !bl_vout && bu_t_out == bu_t_in, "tag moves up");
      @(negedge clk);
      check(!t_vout && !id_out && !bl_vout && !bu_vout, "outputs idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

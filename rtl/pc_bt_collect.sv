// pc_bt_collect: gathers the packing found by the backtracking tag.
//
// During backtracking the tag visits one PE per column, from column N down
// to column 1. The PE (i,j) it matches reports a hit: gray levels up to i of
// the input picture are packed into boxes 1..j, so i is the last input
// level mapped onto reference level j (X_j - 1 in the source's notation).
// A hit flagged empty (tag 0 at row 1) means boxes 1..j receive nothing.
// This block decodes the hit matrix column by column into last_lvl[j-1],
// records the tag that leaves column 1 as unpacked (input levels
// 1..unpacked are mapped to no reference level; their count is charged as
// error by the initial condition S_0(i)), and raises path_valid when the tag leaves
// column 1 (bt_done, one cycle, same cycle as the tag leaves).
// clear (at the start of an operation) drops path_valid.
//
// Interface: hit/hit_empty straight from the array, registered outputs.
// The source only says that matched index parts go to an output channel;
// the decoding into per-column boundaries is this design's.
module pc_bt_collect
  import pc_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned N  = N_DEFAULT,
  localparam int unsigned IW = i_width(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [N-1:0]  hit       [M],
  input  logic [N-1:0]  hit_empty [M],
  input  logic          tag_out,
  input  logic [IW-1:0] tag_out_t,
  output logic [IW-1:0] last_lvl  [N],
  output logic [IW-1:0] unpacked,
  output logic          path_valid,
  output logic          bt_done
);

  logic [N-1:0]  col_hit;
  logic [IW-1:0] col_row [N];
  always_comb begin
    for (int j = 0; j < N; j++) begin
      col_hit[j] = 1'b0;
      col_row[j] = '0;
      for (int i = 0; i < M; i++) begin
        if (hit[i][j]) begin
          col_hit[j] = 1'b1;
          if (!hit_empty[i][j]) col_row[j] = col_row[j] | IW'(i + 1);
        end
      end
    end
  end

  assign bt_done = tag_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      path_valid <= 1'b0;
      unpacked   <= '0;
      for (int j = 0; j < N; j++) last_lvl[j] <= '0;
    end else begin
      if (clear) path_valid <= 1'b0;
      else if (tag_out) path_valid <= 1'b1;
      if (tag_out) unpacked <= tag_out_t;
      for (int j = 0; j < N; j++)
        if (col_hit[j]) last_lvl[j] <= col_row[j];
    end
  end

  // the tag is in one PE at a time
  a_one_hit: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col_hit));

endmodule

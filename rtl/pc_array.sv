// pc_array: the M x N systolic array of processing elements.
//
// PE(i,j) sits in row i (gray level i of the input picture, 1..M) and column
// j (gray level j of the reference picture, 1..N). Links are nearest
// neighbour only:
//  * left to right along each row: H1(i) with its valid bit, and the
//    identification signal with S_{j-1}(i) -> S_j(i);
//  * top to bottom along each column: the candidate tuples
//    (S_{j-1}(u), r, u, H2(j));
//  * bottom to top and right to left: the backtracking tag.
// The boundary inputs are the left edge of every row (H1(i), and
// S_0(i) with the identification signal), the top edge of every column
// (tuple u = 0 carrying S_{j-1}(0) and H2(j)) and the right edge of every
// row (the backtracking tag). The right edge delivers S_N(i); S_N(M) is the
// total error. Each PE reports a backtracking hit on its own bit.
//
// Timing: S_j(i) leaves PE(i,j) at time unit 2i+j+3 when the boundary
// follows the schedule of pc_sequencer, so S_N(M) is ready at 2M+N+3.
// The arrangement of the grid follows the source; the edge protocol is this
// design's.
module pc_array
  import pc_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned HW = HW_DEFAULT,
  localparam int unsigned SW = s_width(M, N, HW),
  localparam int unsigned RW = r_width(M, HW),
  localparam int unsigned IW = i_width(M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // left edge, per row
  input  logic [M-1:0]         h1_v,
  input  logic [HW-1:0]        h1     [M],
  input  logic [M-1:0]         id_v,
  input  logic [SW-1:0]        id_s   [M],
  // top edge, per column: tuple u = 0
  input  logic [N-1:0]         top_v,
  input  logic [SW-1:0]        top_s  [N],
  input  logic [HW-1:0]        top_h2 [N],
  // right edge, per row: backtracking tag in, S_N(i) out
  input  logic [M-1:0]         bt_v,
  input  logic [IW-1:0]        bt_t   [M],
  output logic [M-1:0]         res_v,
  output logic [SW-1:0]        res_s  [M],
  // backtracking reports
  output logic [N-1:0]         hit    [M],
  output logic [N-1:0]         hit_empty [M],
  output logic                 bt_out_v,  // tag left column 1
  output logic [IW-1:0]        bt_out_t   // its target: input levels left unpacked
);

  // Link nets indexed [row][col]; row 0 / col 0 are the top / left edges,
  // row M+1 / col N+1 the bottom / right edges.
  logic                 h1v_w [M+1][N+1];
  logic [HW-1:0]        h1_w  [M+1][N+1];
  logic                 idv_w [M+1][N+1];
  logic [SW-1:0]        s_w   [M+1][N+1];
  logic                 tv_w  [M+1][N+1];
  logic                 tf_w  [M+1][N+1];
  logic [IW-1:0]        tu_w  [M+1][N+1];
  logic [SW-1:0]        ts_w  [M+1][N+1];
  logic signed [RW-1:0] tr_w  [M+1][N+1];
  logic [HW-1:0]        th_w  [M+1][N+1];
  logic                 buv_w [M+2][N+1];   // up-going tag leaving row i
  logic [IW-1:0]        but_w [M+2][N+1];
  logic                 blv_w [M+1][N+2];   // left-going tag leaving col j
  logic [IW-1:0]        blt_w [M+1][N+2];
  logic [M-1:0]         left_v;

  for (genvar i = 1; i <= M; i++) begin : g_edge_row
    assign h1v_w[i][0]   = h1_v[i-1];
    assign h1_w[i][0]    = h1[i-1];
    assign idv_w[i][0]   = id_v[i-1];
    assign s_w[i][0]     = id_s[i-1];
    assign blv_w[i][N+1] = bt_v[i-1];
    assign blt_w[i][N+1] = bt_t[i-1];
    assign res_v[i-1]    = idv_w[i][N];
    assign res_s[i-1]    = s_w[i][N];
    assign left_v[i-1]   = blv_w[i][1];
  end
  for (genvar j = 1; j <= N; j++) begin : g_edge_col
    assign tv_w[0][j]      = top_v[j-1];
    assign tf_w[0][j]      = 1'b1;
    assign tu_w[0][j]      = '0;
    assign ts_w[0][j]      = top_s[j-1];
    assign tr_w[0][j]      = $signed({{(RW-HW){1'b0}}, top_h2[j-1]});
    assign th_w[0][j]      = top_h2[j-1];
    assign buv_w[M+1][j]   = 1'b0;
    assign but_w[M+1][j]   = '0;
  end
  assign bt_out_v = |left_v;
  always_comb begin
    bt_out_t = '0;
    for (int i = 1; i <= M; i++)
      if (blv_w[i][1]) bt_out_t = bt_out_t | blt_w[i][1];
  end

  for (genvar i = 1; i <= M; i++) begin : g_row
    for (genvar j = 1; j <= N; j++) begin : g_col
      pc_pe #(.HW(HW), .SW(SW), .RW(RW), .IW(IW), .ROW(i)) u_pe (
        .clk, .rst_n,
        .h1_vin     (h1v_w[i][j-1]), .h1_in   (h1_w[i][j-1]),
        .h1_vout    (h1v_w[i][j]),   .h1_out  (h1_w[i][j]),
        .t_vin      (tv_w[i-1][j]),  .t_first_in (tf_w[i-1][j]),
        .t_u_in     (tu_w[i-1][j]),  .t_s_in  (ts_w[i-1][j]),
        .t_r_in     (tr_w[i-1][j]),  .t_h2_in (th_w[i-1][j]),
        .t_vout     (tv_w[i][j]),    .t_first_out (tf_w[i][j]),
        .t_u_out    (tu_w[i][j]),    .t_s_out (ts_w[i][j]),
        .t_r_out    (tr_w[i][j]),    .t_h2_out (th_w[i][j]),
        .id_in      (idv_w[i][j-1]), .s_in    (s_w[i][j-1]),
        .id_out     (idv_w[i][j]),   .s_out   (s_w[i][j]),
        .bu_vin     (buv_w[i+1][j]), .bu_t_in (but_w[i+1][j]),
        .bl_vin     (blv_w[i][j+1]), .bl_t_in (blt_w[i][j+1]),
        .bu_vout    (buv_w[i][j]),   .bu_t_out (but_w[i][j]),
        .bl_vout    (blv_w[i][j]),   .bl_t_out (blt_w[i][j]),
        .bt_hit     (hit[i-1][j-1]), .bt_empty (hit_empty[i-1][j-1])
      );
    end
  end

endmodule

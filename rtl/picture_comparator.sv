// picture_comparator: histogram-packing comparator for two digital pictures.
//
// Two pictures of one scene taken under different lighting differ mainly in
// their gray-level scales. The comparator finds the monotone rescaling that
// maps the M gray levels of an input picture onto the N levels of a
// reference picture so that the reshaped histogram H1 deviates least from
// H2: input levels X_{j-1} .. X_j - 1 become reference level j, and the sum
// over j of |H2(j) - (count of the input levels packed into j)| is minimal.
// The minimum is the dynamic-programming value S_N(M), computed in
// O(max(M,N)) time units on an M x N systolic array (pc_array of pc_pe),
// fed by pc_sequencer. A backtracking tag then walks from PE(M,N) back to
// column 1 in at most M+N time units and pc_bt_collect reports the packing.
// pc_match_select keeps the smallest error over a series of comparisons and
// the number of the comparison that gave it.
// Beside it, pc_linear computes the same error on a single column of M PEs
// in N passes (O(M x N) time units), the partitioned form for when an
// M x N grid does not fit; it shares the histogram inputs and has its own
// start and status ports.
//
// Interface:
//   start/busy/done   start one comparison with h1/h2 (sampled at start);
//                     path = 1 also returns the packing, path = 0 gives the
//                     error only and finishes sooner.
//   res_valid/err     one-cycle pulse with S_N(M) at time unit 2M+N+3
//                     (time unit 1 is the cycle after start).
//   last_lvl[j-1]     last input level packed onto reference level j
//                     (0: none), valid while path_valid is high;
//                     unpacked: input levels 1..unpacked map to no level.
//   clear_best, best_err, best_idx, count: the best-match register.
//   lin_start/lin_busy/lin_done/lin_err: the one-dimensional engine; its
//                     error is ready 2M+4+(N-1)(M+1) time units after
//                     lin_start, with lin_done.
// Parameters: M, N gray levels (defaults 16 x 16, this design's choice),
// HW bits per histogram bin, PW bits of picture number.
module picture_comparator
  import pc_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned HW = HW_DEFAULT,
  parameter int unsigned PW = 8,
  localparam int unsigned SW = s_width(M, N, HW),
  localparam int unsigned IW = i_width(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          path,
  input  logic [HW-1:0] h1 [M],
  input  logic [HW-1:0] h2 [N],
  output logic          busy,
  output logic          done,
  output logic          res_valid,
  output logic [SW-1:0] err,
  output logic [IW-1:0] last_lvl [N],
  output logic [IW-1:0] unpacked,
  output logic          path_valid,
  input  logic          clear_best,
  output logic [SW-1:0] best_err,
  output logic [PW-1:0] best_idx,
  output logic [PW-1:0] count,
  // one-dimensional engine on the same histograms
  input  logic          lin_start,
  output logic          lin_busy,
  output logic          lin_done,
  output logic [SW-1:0] lin_err
);

  logic [M-1:0]  a_h1_v, a_id_v, a_bt_v, a_res_v;
  logic [HW-1:0] a_h1   [M];
  logic [SW-1:0] a_id_s [M];
  logic [IW-1:0] a_bt_t [M];
  logic [SW-1:0] a_res_s [M];
  logic [N-1:0]  a_top_v;
  logic [SW-1:0] a_top_s  [N];
  logic [HW-1:0] a_top_h2 [N];
  logic [N-1:0]  a_hit [M];
  logic [N-1:0]  a_hit_e [M];
  logic          a_tag_out, bt_done;
  logic [IW-1:0] a_tag_out_t;

  pc_sequencer #(.M(M), .N(N), .HW(HW)) u_seq (
    .clk, .rst_n, .start, .path,
    .h1_in (h1), .h2_in (h2),
    .busy, .done, .res_valid, .res_err (err),
    .h1_v (a_h1_v), .h1 (a_h1), .id_v (a_id_v), .id_s (a_id_s),
    .top_v (a_top_v), .top_s (a_top_s), .top_h2 (a_top_h2),
    .bt_v (a_bt_v), .bt_t (a_bt_t),
    .arr_res_s (a_res_s[M-1]), .arr_res_v (a_res_v[M-1]),
    .bt_done
  );

  pc_array #(.M(M), .N(N), .HW(HW)) u_array (
    .clk, .rst_n,
    .h1_v (a_h1_v), .h1 (a_h1), .id_v (a_id_v), .id_s (a_id_s),
    .top_v (a_top_v), .top_s (a_top_s), .top_h2 (a_top_h2),
    .bt_v (a_bt_v), .bt_t (a_bt_t),
    .res_v (a_res_v), .res_s (a_res_s),
    .hit (a_hit), .hit_empty (a_hit_e), .bt_out_v (a_tag_out),
    .bt_out_t (a_tag_out_t)
  );

  pc_bt_collect #(.M(M), .N(N)) u_bt (
    .clk, .rst_n, .clear (start && !busy),
    .hit (a_hit), .hit_empty (a_hit_e), .tag_out (a_tag_out),
    .tag_out_t (a_tag_out_t), .last_lvl, .unpacked, .path_valid, .bt_done
  );

  pc_match_select #(.SW(SW), .PW(PW)) u_best (
    .clk, .rst_n, .clear (clear_best),
    .res_valid, .res_err (err),
    .best_err, .best_idx, .count
  );

  logic lin_res_valid;
  pc_linear #(.M(M), .N(N), .HW(HW)) u_linear (
    .clk, .rst_n, .start (lin_start), .h1, .h2,
    .busy (lin_busy), .done (lin_done), .res_valid (lin_res_valid),
    .err (lin_err)
  );

endmodule

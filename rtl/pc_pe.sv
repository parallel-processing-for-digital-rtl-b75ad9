// pc_pe: processing element (i,j) of the picture-comparator array.
//
// PE(i,j) computes one entry of the packing recurrence
//   S_j(i) = min over 0 <= u <= i of  S_{j-1}(u) + |H2(j) - sum_{v=u+1..i} H1(v)|
// and remembers the u that gave it (the first half of the index pair
// ((u,j-1),(i,j))) for the backtracking pass.
//
// Dataflow, one PE per clock in every direction:
//  * Row link, left to right: the gray-level count H1(i) (latched when its
//    valid bit passes) and, later, the identification signal together with
//    S_{j-1}(i) from PE(i,j-1).
//  * Column link, top to bottom: a stream of candidate tuples
//    (S_{j-1}(u), r, u, H2(j)), one per u < i, where r is the space still
//    left in box j after packing objects u+1..i-1. Each PE subtracts its own
//    H1(i) from r, forms the candidate S_{j-1}(u) + |r| (the |a-b| unit and
//    adder), compares it with its running minimum (the comparator) and
//    passes the tuple on, one row further down, with the new r.
//  * When the identification signal arrives from the left with S_{j-1}(i),
//    the PE compares its running minimum with S_{j-1}(i) + H2(j) (box j
//    left empty, u = i), sends S_j(i) right, stores the winning u in its
//    index register, and starts tuple u = i down its own column.
// The first tuple of a column (u = 0, flag first) restarts the running
// minimum and brings H2(j). Ties keep the smaller u.
//
// Backtracking: a tag (target row t) travels up a column from below or
// enters from the right. If t equals this row the PE reports a hit and sends
// its stored u left as the new tag; otherwise the tag moves up. Row 1 also
// takes t = 0 (all boxes up to j empty) and passes 0 on to the left.
//
// Timing (time units counted as in the sequencer): tuple u reaches PE(i,j)
// at u+i+j+2, the identification signal at 2i+j+2, S_j(i) leaves on the
// right link at 2i+j+3. All outputs are registered.
//
// Following the source: the PE's operations (|a-b|, accumulation,
// comparison), the row/column directions, the identification signal, the
// index register and the tag-driven backtracking. This design's choice: the
// running remainder r in place of a prefix sum, the tie rule, and the
// valid/first flags that frame the streams.
module pc_pe
  import pc_pkg::*;
#(
  parameter int unsigned HW  = HW_DEFAULT,
  parameter int unsigned SW  = s_width(M_DEFAULT, N_DEFAULT, HW_DEFAULT),
  parameter int unsigned RW  = r_width(M_DEFAULT, HW_DEFAULT),
  parameter int unsigned IW  = i_width(M_DEFAULT),
  parameter int unsigned ROW = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // row link: gray level of the input picture
  input  logic                 h1_vin,
  input  logic [HW-1:0]        h1_in,
  output logic                 h1_vout,
  output logic [HW-1:0]        h1_out,
  // column link: candidate tuples
  input  logic                 t_vin,
  input  logic                 t_first_in,
  input  logic [IW-1:0]        t_u_in,
  input  logic [SW-1:0]        t_s_in,
  input  logic signed [RW-1:0] t_r_in,
  input  logic [HW-1:0]        t_h2_in,
  output logic                 t_vout,
  output logic                 t_first_out,
  output logic [IW-1:0]        t_u_out,
  output logic [SW-1:0]        t_s_out,
  output logic signed [RW-1:0] t_r_out,
  output logic [HW-1:0]        t_h2_out,
  // row link: identification signal with S_{j-1}(i) in, S_j(i) out
  input  logic                 id_in,
  input  logic [SW-1:0]        s_in,
  output logic                 id_out,
  output logic [SW-1:0]        s_out,
  // backtracking tag: from below / to above, from right / to left
  input  logic                 bu_vin,
  input  logic [IW-1:0]        bu_t_in,
  input  logic                 bl_vin,
  input  logic [IW-1:0]        bl_t_in,
  output logic                 bu_vout,
  output logic [IW-1:0]        bu_t_out,
  output logic                 bl_vout,
  output logic [IW-1:0]        bl_t_out,
  output logic                 bt_hit,    // tag matched here (one cycle)
  output logic                 bt_empty   // matched with t = 0 at row 1
);

  localparam logic [IW-1:0] MY_ROW = IW'(ROW);

  logic [HW-1:0]        h1_q;      // H1(i)
  logic [HW-1:0]        h2_q;      // H2(j)
  logic [SW-1:0]        min_q;     // running minimum over u < i
  logic [IW-1:0]        arg_q;     // its u
  logic [IW-1:0]        idx_q;     // index register: u of S_j(i)

  // candidate for the tuple now passing
  logic signed [RW-1:0] r_next;
  logic [RW-1:0]        r_abs;
  logic [SW-1:0]        cand;
  logic                 take;
  // self term u = i
  logic [SW-1:0]        self_cand;
  logic                 self_wins;

  always_comb begin
    r_next    = t_r_in - $signed({{(RW-HW){1'b0}}, h1_q});
    r_abs     = r_next[RW-1] ? RW'(-r_next) : RW'(r_next);
    cand      = t_s_in + SW'(r_abs);
    take      = t_first_in || (cand < min_q);
    self_cand = s_in + SW'(h2_q);
    self_wins = self_cand < min_q;
  end

  // backtracking decision
  logic          tag_v;
  logic [IW-1:0] tag_t;
  logic          tag_hit, tag_empty;
  always_comb begin
    tag_v     = bu_vin || bl_vin;
    tag_t     = bl_vin ? bl_t_in : bu_t_in;
    tag_empty = (ROW == 1) && (tag_t == '0);
    tag_hit   = tag_v && ((tag_t == MY_ROW) || tag_empty);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h1_q        <= '0;
      h2_q        <= '0;
      min_q       <= '0;
      arg_q       <= '0;
      idx_q       <= '0;
      h1_vout     <= 1'b0;
      h1_out      <= '0;
      t_vout      <= 1'b0;
      t_first_out <= 1'b0;
      t_u_out     <= '0;
      t_s_out     <= '0;
      t_r_out     <= '0;
      t_h2_out    <= '0;
      id_out      <= 1'b0;
      s_out       <= '0;
      bu_vout     <= 1'b0;
      bu_t_out    <= '0;
      bl_vout     <= 1'b0;
      bl_t_out    <= '0;
      bt_hit      <= 1'b0;
      bt_empty    <= 1'b0;
    end else begin
      // row link for H1
      h1_vout <= h1_vin;
      if (h1_vin) begin
        h1_q   <= h1_in;
        h1_out <= h1_in;
      end

      // column link: pass a tuple, or start tuple u = i on identification
      t_vout <= t_vin || id_in;
      if (t_vin) begin
        if (t_first_in) h2_q <= t_h2_in;
        if (take) begin
          min_q <= cand;
          arg_q <= t_u_in;
        end
        t_first_out <= t_first_in;
        t_u_out     <= t_u_in;
        t_s_out     <= t_s_in;
        t_r_out     <= r_next;
        t_h2_out    <= t_h2_in;
      end else if (id_in) begin
        t_first_out <= 1'b0;
        t_u_out     <= MY_ROW;
        t_s_out     <= s_in;
        t_r_out     <= $signed({{(RW-HW){1'b0}}, h2_q});
        t_h2_out    <= h2_q;
      end

      // identification: emit S_j(i) to the right, keep the index pair
      id_out <= id_in;
      if (id_in) begin
        s_out <= self_wins ? self_cand : min_q;
        idx_q <= self_wins ? MY_ROW : arg_q;
      end

      // backtracking
      bt_hit   <= tag_hit;
      bt_empty <= tag_hit && tag_empty;
      bu_vout  <= tag_v && !tag_hit;
      bl_vout  <= tag_hit;
      if (tag_v) begin
        bu_t_out <= tag_t;
        bl_t_out <= tag_empty ? '0 : idx_q;
      end
    end
  end

  // A tuple and the identification signal never meet in the same cycle,
  // and a tag never asks for a row below this one.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(t_vin && id_in));
  a_tag_order:    assert property (@(posedge clk) disable iff (!rst_n) !(tag_v && (tag_t > MY_ROW)));
  a_one_tag:      assert property (@(posedge clk) disable iff (!rst_n) !(bu_vin && bl_vin));

endmodule

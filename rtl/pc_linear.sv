// pc_linear: one-dimensional version of the comparator (M PEs, N passes).
//
// When an M x N grid is too large, a single column of M processing
// elements can compute the columns j = 1..N one after another. The column
// is the same pc_pe chain as one column of pc_array; what changes is the
// row link: each row has a feedback register that holds S_0(i) at the
// start and takes S_j(i) from the PE's right output at the end of pass j.
// On pass j+1 the identification signal brings that register's value back
// into the PE as S_j(i). Pass j starts (j-1)*(M+1) time units after pass
// 1: a PE in row i is busy for i+1 time units of each pass, so M+1 is the
// shortest spacing at which the passes do not collide.
//
// Schedule (time unit 1 is the cycle after start; b = (j-1)*(M+1)):
//   t = 1          H1(i) into every row (kept by the PEs for all passes)
//   t = b + 4      tuple u = 0 of pass j: S_{j-1}(0) and H2(j)
//   t = b + 2i + 3 identification with the feedback register into row i;
//                  a shift register carries this control signal down, so
//                  the rows of pass j and pass j+1 overlap freely
// S_N(M) is latched at T_RES = 2M+4+(N-1)(M+1), so one comparison takes
// O(M x N) time units (M >= 2). Only the summation error is produced: the index
// registers of the PEs are overwritten from pass to pass.
//
// Interface: start (when busy is low) samples h1/h2; res_valid pulses with
// err one cycle after T_RES, together with done.
//
// From the source: the single column, the feedback registers loaded with
// the initial values and then with the results under a control signal
// that moves down one PE every two time units, the n repetitions of the
// input and the O(m x n) time. This design's choice: the pass spacing, the
// handshake and the error-only output.
module pc_linear
  import pc_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned HW = HW_DEFAULT,
  localparam int unsigned SW = s_width(M, N, HW),
  localparam int unsigned RW = r_width(M, HW),
  localparam int unsigned IW = i_width(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [HW-1:0] h1 [M],
  input  logic [HW-1:0] h2 [N],
  output logic          busy,
  output logic          done,
  output logic          res_valid,
  output logic [SW-1:0] err
);

  localparam int unsigned D     = M + 1;
  localparam int unsigned T_RES = 2 * M + 4 + (N - 1) * D;
  localparam int unsigned CW    = $clog2(T_RES + 2);
  localparam int unsigned JW    = $clog2(N + 1);

  logic          run_q;
  logic [CW-1:0] t_q;       // time unit
  logic [CW-1:0] b_q;       // start of the current pass, (j-1)*D
  logic [JW-1:0] j_q;       // current pass j, 1..N
  logic [HW-1:0] h1_q [M];
  logic [HW-1:0] h2_q [N];
  logic [SW-1:0] q_q;       // S_{j-1}(0) for the current pass
  logic [SW-1:0] fb_q [M];  // feedback registers
  logic [2*M-2:0] ctl_q;    // control signal, one stage per time unit

  // PE chain nets, index 0 is the top edge
  logic                 tv   [M+1];
  logic                 tf   [M+1];
  logic [IW-1:0]        tu   [M+1];
  logic [SW-1:0]        ts   [M+1];
  logic signed [RW-1:0] tr   [M+1];
  logic [HW-1:0]        th   [M+1];
  logic [M-1:0]         id_v, out_v;
  logic [SW-1:0]        out_s [M];

  logic [SW-1:0] p_d [M];
  always_comb begin
    logic [SW-1:0] acc;
    acc = '0;
    for (int i = 0; i < M; i++) begin
      acc    = acc + SW'(h1[i]);
      p_d[i] = acc;
    end
  end

  logic [HW-1:0] h2_cur;
  assign h2_cur = h2_q[(j_q == '0) ? 0 : (j_q - 1'b1)];

  assign busy  = run_q;
  assign tv[0] = run_q && (t_q == b_q + CW'(4));
  assign tf[0] = 1'b1;
  assign tu[0] = '0;
  assign ts[0] = q_q;
  assign tr[0] = $signed({{(RW-HW){1'b0}}, h2_cur});
  assign th[0] = h2_cur;

  for (genvar i = 1; i <= M; i++) begin : g_row
    assign id_v[i-1] = ctl_q[2*i-2];
    pc_pe #(.HW(HW), .SW(SW), .RW(RW), .IW(IW), .ROW(i)) u_pe (
      .clk, .rst_n,
      .h1_vin  (run_q && t_q == CW'(1)), .h1_in (h1_q[i-1]),
      .h1_vout (), .h1_out (),
      .t_vin   (tv[i-1]), .t_first_in (tf[i-1]), .t_u_in (tu[i-1]),
      .t_s_in  (ts[i-1]), .t_r_in (tr[i-1]), .t_h2_in (th[i-1]),
      .t_vout  (tv[i]), .t_first_out (tf[i]), .t_u_out (tu[i]),
      .t_s_out (ts[i]), .t_r_out (tr[i]), .t_h2_out (th[i]),
      .id_in   (id_v[i-1]), .s_in (fb_q[i-1]),
      .id_out  (out_v[i-1]), .s_out (out_s[i-1]),
      .bu_vin  (1'b0), .bu_t_in ('0), .bl_vin (1'b0), .bl_t_in ('0),
      .bu_vout (), .bu_t_out (), .bl_vout (), .bl_t_out (),
      .bt_hit  (), .bt_empty ()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      ctl_q     <= '0;
      t_q       <= '0;
      b_q       <= '0;
      j_q       <= '0;
      q_q       <= '0;
      done      <= 1'b0;
      res_valid <= 1'b0;
      err       <= '0;
      for (int i = 0; i < M; i++) begin
        h1_q[i] <= '0;
        fb_q[i] <= '0;
      end
      for (int j = 0; j < N; j++) h2_q[j] <= '0;
    end else begin
      done      <= 1'b0;
      res_valid <= 1'b0;
      // the control signal leaves with tuple u = 0 of each pass and
      // reaches row i two time units after row i-1
      ctl_q     <= {ctl_q[2*M-3:0], tv[0]};
      if (!run_q) begin
        if (start) begin
          run_q <= 1'b1;
          t_q   <= CW'(1);
          b_q   <= '0;
          j_q   <= JW'(1);
          q_q   <= '0;
          h1_q  <= h1;
          h2_q  <= h2;
          fb_q  <= p_d;    // S_0(i)
        end
      end else begin
        t_q <= t_q + 1'b1;
        // pass j+1 begins D time units after pass j
        if (t_q == b_q + CW'(D + 3) && j_q != JW'(N)) begin
          b_q <= b_q + CW'(D);
          j_q <= j_q + 1'b1;
          q_q <= q_q + SW'(h2_cur);
        end
        // feedback: S_j(i) replaces S_{j-1}(i)
        for (int i = 0; i < M; i++)
          if (out_v[i]) fb_q[i] <= out_s[i];
        if (t_q == CW'(T_RES)) begin
          run_q     <= 1'b0;
          done      <= 1'b1;
          res_valid <= 1'b1;
          err       <= out_s[M-1];
        end
      end
    end
  end

  a_res_on_time: assert property (@(posedge clk) disable iff (!rst_n)
    (run_q && t_q == CW'(T_RES)) |-> out_v[M-1]);

endmodule

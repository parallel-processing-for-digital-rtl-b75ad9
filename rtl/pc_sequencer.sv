// pc_sequencer: boundary feeder and operation control of the comparator.
//
// The array needs its edge data at fixed time units. This block latches the
// two histograms when an operation starts, forms the initial conditions
//   S_0(i) = H1(1) + ... + H1(i)      (every input level left unpacked)
//   S_j(0) = H2(1) + ... + H2(j)      (every box left empty)
// and, counting time units t = 1, 2, ... after the start pulse, drives:
//   t = 1        H1(i) into the left end of every row
//   t = j + 3    tuple u = 0 (S_{j-1}(0), H2(j)) into the top of column j
//   t = 2i + 3   the identification signal with S_0(i) into row i,
// so the signal reaches PE(i,j) at 2i+j+2 (row to row every two time units,
// column to column every one) and S_N(M) appears at T_RES = 2M+N+3. The
// total error is then latched and flagged on res_valid for one cycle.
// With path = 1 the backtracking tag (target M) enters PE(M,N) from the
// right at T_RES+1 and the operation ends when the tag has left column 1
// (bt_done); with path = 0 only the summation error is produced and the
// operation ends at T_RES. done pulses for one cycle at the end; start is
// accepted only when busy is low. One operation is in the array at a time.
//
// From the source: the initial conditions, the identification signal sent
// at the fifth time unit for PE(1,1), the 2i+j+2 / 2i+j+3 schedule and the
// error-only simplification. This design's choice: the handshake
// (start/busy/done), the register-and-decode implementation of the skew,
// and the time at which H1 is loaded.
module pc_sequencer
  import pc_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned HW = HW_DEFAULT,
  localparam int unsigned SW = s_width(M, N, HW),
  localparam int unsigned IW = i_width(M)
) (
  input  logic           clk,
  input  logic           rst_n,
  // operation request
  input  logic           start,
  input  logic           path,         // 1: also backtrack the packing
  input  logic [HW-1:0]  h1_in [M],
  input  logic [HW-1:0]  h2_in [N],
  output logic           busy,
  output logic           done,
  output logic           res_valid,
  output logic [SW-1:0]  res_err,
  // array edges
  output logic [M-1:0]   h1_v,
  output logic [HW-1:0]  h1     [M],
  output logic [M-1:0]   id_v,
  output logic [SW-1:0]  id_s   [M],
  output logic [N-1:0]   top_v,
  output logic [SW-1:0]  top_s  [N],
  output logic [HW-1:0]  top_h2 [N],
  output logic [M-1:0]   bt_v,
  output logic [IW-1:0]  bt_t   [M],
  input  logic [SW-1:0]  arr_res_s,    // S_N(M) from the array
  input  logic           arr_res_v,
  input  logic           bt_done
);

  localparam int unsigned T_RES = 2 * M + N + 3;
  localparam int unsigned CW    = $clog2(T_RES + 2);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_TRACE} state_e;

  state_e          state_q;
  logic [CW-1:0]   t_q;
  logic            path_q;
  logic [HW-1:0]   h1_q  [M];
  logic [HW-1:0]   h2_q  [N];
  logic [SW-1:0]   p_q   [M];   // S_0(i), i = 1..M
  logic [SW-1:0]   q_q   [N];   // S_{j-1}(0), j = 1..N

  // prefix sums of the histograms being loaded
  logic [SW-1:0]   p_d   [M];
  logic [SW-1:0]   q_d   [N];
  always_comb begin
    logic [SW-1:0] acc;
    acc = '0;
    for (int i = 0; i < M; i++) begin
      acc    = acc + SW'(h1_in[i]);
      p_d[i] = acc;
    end
    acc = '0;
    for (int j = 0; j < N; j++) begin
      q_d[j] = acc;
      acc    = acc + SW'(h2_in[j]);
    end
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      t_q       <= '0;
      path_q    <= 1'b0;
      done      <= 1'b0;
      res_valid <= 1'b0;
      res_err   <= '0;
      for (int i = 0; i < M; i++) begin
        h1_q[i] <= '0;
        p_q[i]  <= '0;
      end
      for (int j = 0; j < N; j++) begin
        h2_q[j] <= '0;
        q_q[j]  <= '0;
      end
    end else begin
      done      <= 1'b0;
      res_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_RUN;
          t_q     <= CW'(1);
          path_q  <= path;
          h1_q    <= h1_in;
          h2_q    <= h2_in;
          p_q     <= p_d;
          q_q     <= q_d;
        end
        S_RUN: begin
          t_q <= t_q + 1'b1;
          if (t_q == CW'(T_RES)) begin
            res_valid <= 1'b1;
            res_err   <= arr_res_s;
            if (path_q) begin
              state_q <= S_TRACE;
            end else begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end
          end
        end
        S_TRACE: begin
          if (t_q != '1) t_q <= t_q + 1'b1;
          if (bt_done) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // edge drive, decoded from the time unit
  logic running;
  assign running = (state_q == S_RUN);
  always_comb begin
    for (int i = 1; i <= M; i++) begin
      h1_v[i-1] = running && (t_q == CW'(1));
      h1[i-1]   = h1_q[i-1];
      id_v[i-1] = running && (t_q == CW'(2 * i + 3));
      id_s[i-1] = p_q[i-1];
      bt_v[i-1] = (i == M) && (state_q == S_TRACE) && (t_q == CW'(T_RES + 1));
      bt_t[i-1] = IW'(M);
    end
    for (int j = 1; j <= N; j++) begin
      top_v[j-1]  = running && (t_q == CW'(j + 3));
      top_s[j-1]  = q_q[j-1];
      top_h2[j-1] = h2_q[j-1];
    end
  end

  // S_N(M) must be on the array's output exactly at T_RES
  a_res_on_time: assert property (@(posedge clk) disable iff (!rst_n)
    (running && t_q == CW'(T_RES)) |-> arr_res_v);

endmodule

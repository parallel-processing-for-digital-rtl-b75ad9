// pc_match_select: best match over a series of compared pictures.
//
// When several pictures are compared one after another with the same
// reference (or one picture with several references), each comparison
// yields a summation error. This block numbers the results with a counter
// that starts at zero and keeps, in a two-part register, the smallest error
// seen so far and the number of the comparison that produced it. A later
// result replaces the stored one only if it is strictly smaller, so the
// first of equal errors wins.
//
// Interface: clear restarts the series (counter to 0, error register to its
// maximum so that the first result is always taken). res_valid/res_err is
// one result per pulse. best_err/best_idx/count are registered and valid
// the cycle after the pulse.
//
// The two-part register, the counter and the compare-and-replace rule come
// from the source. It shows the error register cleared to 0 before the
// compare, which would never be replaced; this design starts it at the
// largest value instead.
module pc_match_select #(
  parameter int unsigned SW = 23,
  parameter int unsigned PW = 8    // width of the picture number
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          res_valid,
  input  logic [SW-1:0] res_err,
  output logic [SW-1:0] best_err,
  output logic [PW-1:0] best_idx,
  output logic [PW-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_err <= '1;
      best_idx <= '0;
      count    <= '0;
    end else if (clear) begin
      best_err <= '1;
      best_idx <= '0;
      count    <= '0;
    end else if (res_valid) begin
      count <= count + 1'b1;
      if (res_err < best_err || count == '0) begin
        best_err <= res_err;
        best_idx <= count;
      end
    end
  end

endmodule

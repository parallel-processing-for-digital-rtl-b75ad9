// pc_pkg: shared constants and width rules for the histogram-packing
// picture comparator.
//
// The comparator reshapes the gray-level histogram H1 of an input picture
// (M levels) onto the histogram H2 of a reference picture (N levels) by
// dynamic programming on an M x N systolic array. The array size (M, N) and
// the histogram count width are parameters of the modules; the defaults
// below are this design's choice, the source algorithm leaves them open.
// The width functions size every adder and register so that no result can
// overflow for any histogram whose bins fit in HW bits.
package pc_pkg;

  // Default number of gray levels of the input picture (rows, m).
  localparam int unsigned M_DEFAULT  = 16;
  // Default number of gray levels of the reference picture (columns, n).
  localparam int unsigned N_DEFAULT  = 16;
  // Default width of one histogram bin (pixel count).
  localparam int unsigned HW_DEFAULT = 16;

  // Width of an accumulated error S_j(i) and of every candidate cost:
  // S <= sum(H1) + sum(H2) and a candidate adds at most sum(H1) more,
  // so (2M+N) * 2^HW bounds both.
  function automatic int unsigned s_width(int unsigned m, int unsigned n, int unsigned hw);
    return hw + $clog2(2 * m + n) + 1;
  endfunction

  // Width of the signed remainder r = H2(j) - sum H1(u+1..i), which lies in
  // [-M * 2^HW, 2^HW).
  function automatic int unsigned r_width(int unsigned m, int unsigned hw);
    return hw + $clog2(m + 1) + 2;
  endfunction

  // Width of a row index 0..M.
  function automatic int unsigned i_width(int unsigned m);
    return $clog2(m + 1);
  endfunction

endpackage

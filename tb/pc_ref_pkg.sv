// pc_ref_pkg: software reference for the histogram-packing recurrence,
// used by the testbenches to work out expected results independently of
// the RTL.
//
//   S_0(i) = H1(1)+...+H1(i),  S_j(0) = H2(1)+...+H2(j)
//   S_j(i) = min over u = 0..i of S_{j-1}(u) + |H2(j) - (P(i) - P(u))|
// with P the prefix sum of H1. Ties keep the smaller u (the RTL's rule).
// Tables are flat queues indexed [j*(m+1)+i]. h1/h2 are 0-based (level 1
// at index 0).
package pc_ref_pkg;

  function automatic longint labs(longint x);
    return (x < 0) ? -x : x;
  endfunction

  // fills s and arg (arg = u that gave S_j(i)); returns S_n(m)
  function automatic longint pc_solve(input longint h1[$], input longint h2[$],
                                   ref longint s[$], ref int arg[$]);
    int m = h1.size();
    int n = h2.size();
    longint p[$];
    longint acc;
    s = {};
    arg = {};
    for (int k = 0; k < (m + 1) * (n + 1); k++) begin
      s.push_back(0);
      arg.push_back(0);
    end
    acc = 0;
    p.push_back(0);
    for (int i = 1; i <= m; i++) begin
      acc += h1[i-1];
      p.push_back(acc);
      s[i] = acc;
    end
    acc = 0;
    for (int j = 1; j <= n; j++) begin
      acc += h2[j-1];
      s[j*(m+1)] = acc;
    end
    for (int j = 1; j <= n; j++) begin
      for (int i = 1; i <= m; i++) begin
        longint best;
        int     bu;
        best = s[(j-1)*(m+1)] + labs(h2[j-1] - p[i]);
        bu   = 0;
        for (int u = 1; u <= i; u++) begin
          longint c;
          c = s[(j-1)*(m+1)+u] + labs(h2[j-1] - (p[i] - p[u]));
          if (c < best) begin
            best = c;
            bu   = u;
          end
        end
        s[j*(m+1)+i]   = best;
        arg[j*(m+1)+i] = bu;
      end
    end
    return s[n*(m+1)+m];
  endfunction

  // follows arg back from (m,n): last[j-1] = last input level of box j,
  // returns the number of input levels left unpacked
  function automatic int trace(input int m, input int n, input int arg[$], ref int last[$]);
    int i = m;
    last = {};
    for (int j = 0; j < n; j++) last.push_back(0);
    for (int j = n; j >= 1; j--) begin
      last[j-1] = i;
      if (i > 0) i = arg[j*(m+1)+i];
    end
    return i;
  endfunction

  // cost of a packing given by last[] and the unpacked count
  function automatic longint path_cost(input longint h1[$], input longint h2[$],
                                       input int last[$], input int unpacked);
    longint c = 0;
    int prev = unpacked;
    for (int k = 0; k < unpacked; k++) c += h1[k];
    for (int j = 0; j < h2.size(); j++) begin
      longint sum = 0;
      for (int k = prev; k < last[j]; k++) sum += h1[k];
      c += labs(h2[j] - sum);
      prev = last[j];
    end
    for (int k = prev; k < h1.size(); k++) c += h1[k];
    return c;
  endfunction

endpackage

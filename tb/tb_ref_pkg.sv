// tb_ref_pkg: reference arithmetic for the solver's testbenches.
//
// The solver adds in a fixed order: the tree adds lane 2j to lane 2j+1 level
// by level, and the reduce unit does the same with a row's partial sums in
// time, adding a left-over odd value to zero. pair_sum reproduces that order
// with the simulator's own IEEE-754 doubles, so the expected results are
// bit-exact without using any of the design's arithmetic. jacobi_row gives one
// element of x^(d+1) from a row given as k-groups (value, column, used), and
// rnd_val draws random doubles well away from overflow and subnormals.
package tb_ref_pkg;

  // pairwise sum, odd leftovers added to +0.0, until one value is left
  function automatic real pair_sum(real v[$]);
    real nxt[$];
    if (v.size() == 0) return 0.0;
    while (v.size() > 1) begin
      nxt.delete();
      for (int i = 0; i < v.size(); i += 2)
        nxt.push_back((i + 1 < v.size()) ? v[i] + v[i+1] : v[i] + 0.0);
      v = nxt;
    end
    return v[0];
  endfunction

  // a row as k-groups: a[g][h] value, c[g][h] column, u[g][h] lane used.
  // Lanes not used or on the diagonal contribute 0.0 * x[c].
  function automatic real jacobi_row(int row, int k, real a[$], int c[$], bit u[$],
                                     real x[], real b_i, real a_ii);
    real part[$], prod[$];
    int ng;
    ng = a.size() / k;
    for (int g = 0; g < ng; g++) begin
      prod.delete();
      for (int h = 0; h < k; h++) begin
        int e;
        e = g * k + h;
        if (!u[e] || c[e] == row) prod.push_back(0.0 * x[c[e]]);
        else                      prod.push_back(a[e] * x[c[e]]);
      end
      part.push_back(pair_sum(prod));
    end
    return (b_i - pair_sum(part)) * (1.0 / a_ii);
  endfunction

  // random double with magnitude in [lo, 2*hi), random sign if sgn
  function automatic real rnd_val(real lo, real hi, bit sgn);
    real r;
    r = lo + (hi - lo) * (real'($urandom) / 4294967296.0);
    r = r + r * (real'($urandom % 1000) / 1000.0);
    if (sgn && ($urandom % 2 == 1)) r = -r;
    return r;
  endfunction

endpackage

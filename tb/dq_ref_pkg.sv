// dq_ref_pkg: reference models for the testbenches of the dual-quality
// multiplier. They work on integers and column counts, not on the gate
// netlist, and rebuild the reduction schedule from scratch:
//   exact 5:2 column: t = x1+..+x5+cin1+cin2; cout1 = (x1+x2+x3 >= 2);
//     cout2 = ((x1+x2+x3) mod 2 + x4 + cin1 >= 2); sum = t mod 2;
//     carry = (t - sum)/2 - cout1 - cout2
//   approximate column: sum = [x1+x2+x3 odd] or [x4 != x5] or [cin1 != cin2];
//     carry = [x1+x2+x3 >= 2] or [x4 and x5] or [cin1 and cin2]; no couts
// Widths up to 64 bits (multipliers up to 32 x 32).
package dq_ref_pkg;

  typedef logic [63:0] u64;

  function automatic u64 wmask(int w);
    if (w >= 64) return '1;
    return (u64'(1) << w) - u64'(1);
  endfunction

  function automatic void comp(input logic [4:0] x, input logic ci1, input logic ci2,
                               input logic ex, output logic s, output logic c,
                               output logic o1, output logic o2);
    int n123, t;
    n123 = int'(x[0]) + int'(x[1]) + int'(x[2]);
    if (ex) begin
      t  = n123 + int'(x[3]) + int'(x[4]) + int'(ci1) + int'(ci2);
      o1 = (n123 >= 2);
      o2 = ((n123 % 2) + int'(x[3]) + int'(ci1)) >= 2;
      s  = logic'(t % 2);
      c  = logic'((t - (t % 2)) / 2 - int'(o1) - int'(o2));
    end else begin
      s  = (n123 % 2 == 1) || (x[3] != x[4]) || (ci1 != ci2);
      c  = (n123 >= 2) || (x[3] && x[4]) || (ci1 && ci2);
      o1 = 1'b0;
      o2 = 1'b0;
    end
  endfunction

  // One row of compressors over w columns; columns >= ac are always exact.
  function automatic void row(input u64 r [5], input int w, input logic ex,
                              input int ac, output u64 srow, output u64 crow);
    logic ci1, ci2, s, c, o1, o2;
    logic [4:0] x;
    ci1 = 0; ci2 = 0; srow = '0; crow = '0;
    for (int j = 0; j < w; j++) begin
      for (int k = 0; k < 5; k++) x[k] = r[k][j];
      comp(x, ci1, ci2, ex || (j >= ac), s, c, o1, o2);
      srow[j] = s;
      if (j + 1 < 64) crow[j+1] = c;
      ci1 = o1; ci2 = o2;
    end
    srow &= wmask(w);
    crow &= wmask(w);
  endfunction

  // Product of the n x n dual-quality multiplier with approximate columns < ac.
  function automatic u64 mult(input u64 a, input u64 b, input int n,
                              input logic ex, input int ac);
    u64 rows [$];
    u64 nrows [$];
    u64 grp [5];
    u64 s, c;
    int w = 2 * n;
    for (int i = 0; i < n; i++) rows.push_back(b[i] ? ((a << i) & wmask(w)) : '0);
    while (rows.size() > 2) begin
      nrows.delete();
      if (rows.size() <= 5) begin
        for (int k = 0; k < 5; k++) grp[k] = (k < rows.size()) ? rows[k] : '0;
        row(grp, w, ex, ac, s, c);
        nrows.push_back(s); nrows.push_back(c);
      end else begin
        int g = rows.size() / 5;
        for (int q = 0; q < g; q++) begin
          for (int k = 0; k < 5; k++) grp[k] = rows[5*q+k];
          row(grp, w, ex, ac, s, c);
          nrows.push_back(s); nrows.push_back(c);
        end
        for (int q = 5 * g; q < rows.size(); q++) nrows.push_back(rows[q]);
      end
      rows = nrows;
    end
    if (rows.size() == 2) return (rows[0] + rows[1]) & wmask(w);
    return rows[0];
  endfunction

endpackage

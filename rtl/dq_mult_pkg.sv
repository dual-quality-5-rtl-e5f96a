// dq_mult_pkg: elaboration-time helpers shared by the reduction tree and its
// testbenches.
//
// The reduction schedule: a level with r rows takes them five at a time into
// rows of 5:2 compressors (each group of five becomes two rows) and passes
// the r mod 5 left-over rows to the next level unchanged. When five or fewer
// rows (but more than two) remain, they are compressed together in one
// zero-padded group. Reduction stops at two rows. For 8 rows: 8 -> 5 -> 2.
package dq_mult_pkg;

  // Rows left after one reduction level that starts with r rows.
  function automatic int unsigned next_rows(int unsigned r);
    if (r <= 2) return r;
    if (r <= 5) return 2;
    return 2 * (r / 5) + (r % 5);
  endfunction

  // Rows present at the input of level lvl, starting from n rows.
  function automatic int unsigned rows_at(int unsigned n, int unsigned lvl);
    int unsigned r = n;
    for (int unsigned i = 0; i < lvl; i++) r = next_rows(r);
    return r;
  endfunction

  // Number of compressor levels needed to bring n rows down to two.
  function automatic int unsigned num_levels(int unsigned n);
    int unsigned r = n;
    int unsigned l = 0;
    while (r > 2) begin
      r = next_rows(r);
      l++;
    end
    return l;
  endfunction

  // Compressor groups in a level that starts with r rows.
  function automatic int unsigned groups_of(int unsigned r);
    if (r <= 2) return 0;
    if (r <= 5) return 1;
    return r / 5;
  endfunction

endpackage

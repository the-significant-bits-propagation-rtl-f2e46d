// pdt_bpa_pkg -- significance model of the partial-defect-tolerant bit-plane array.
//
// The array is described by its error-propagation graph: every basic cell is a vertex,
// a sum edge keeps the number of significant bits of an error (weight 0) and a carry
// edge raises it by one (weight 1).  The min-plus closure of that graph, restricted to
// the output, is the Euclidean matrix D: a cell in graph column g (counted from the left,
// the most significant end, after the bit-planes are aligned by dummy cells) differs from
// the output by d = g significant bits.  A cell whose d is below the threshold ALPHA can
// drive the output below ALPHA significant bits and therefore belongs to the critical
// partition, which is built from TMR cells.
//
// Bit-plane k (k = 0 .. M-1, least significant coefficient bits first) is drawn shifted
// M-1-k columns to the right of the last plane, so its column col (0 = leftmost) lies in
// graph column col + (M-1-k).  The final adder is not part of the partition: it is not
// counted in the cell budgets this rule reproduces.
//
// Everything here is evaluated at elaboration time; no logic comes from this package.
package pdt_bpa_pkg;

  // Difference in significant bits between the output and the cell in bit-plane `plane`,
  // column `col` (0 = most significant column), for an array of `m` bit-planes.
  function automatic int unsigned euclid_d(int unsigned plane, int unsigned col,
                                           int unsigned m);
    return col + (m - 1 - plane);
  endfunction

  // A cell is critical when an error in it can leave fewer than `alpha` significant bits.
  function automatic bit is_critical(int unsigned plane, int unsigned col,
                                     int unsigned m, int unsigned alpha);
    return euclid_d(plane, col, m) < alpha;
  endfunction

  // Number of critical cells in an array of kc rows per plane, m planes, l0 columns.
  function automatic int unsigned critical_cells(int unsigned kc, int unsigned m,
                                                 int unsigned l0, int unsigned alpha);
    int unsigned n = 0;
    for (int unsigned k = 0; k < m; k++)
      for (int unsigned c = 0; c < l0; c++)
        if (is_critical(k, c, m, alpha)) n += kc;
    return n;
  endfunction

  // Basic cells needed when every critical cell is triplicated (voters not counted).
  function automatic int unsigned total_cells(int unsigned kc, int unsigned m,
                                              int unsigned l0, int unsigned alpha);
    return kc * m * l0 + 2 * critical_cells(kc, m, l0, alpha);
  endfunction

endpackage

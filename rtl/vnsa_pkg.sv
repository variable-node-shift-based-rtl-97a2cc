// vnsa_pkg: constants and elaboration-time functions shared by the VNSA
// (variable-node-shift architecture) PGDBF decoder.
//
// The decoder works on a regular quasi-cyclic LDPC code whose base matrix has
// NR rows and NC columns; every base column holds DV circulants of size Z and
// every base row DC = DV*NC/NR. The default sizes are those of the
// (dv,dc) = (3,6), N = 1296, Z = 54 rate-1/2 code the decoder is evaluated on.
// That code's base matrix is not published, so this package builds a
// substitute of the same shape from closed formulas (base_row, base_shift).
// For the default sizes, and for (dv,dc) = (4,8) at the same length, the
// formulas give a base graph free of 4-cycles.
//
// The package also decides where the flipping VNUs (type 1) sit inside each
// base column: a permutation of the Z positions per column, so that every
// column holds exactly n_type1 type-1 units, placed differently in each
// column. All functions are evaluated only at elaboration.
package vnsa_pkg;

  // Base row of the e-th circulant (0 <= e < DV) of base column i.
  // Columns are handled in blocks of NR; block b steps through rows with a
  // stride of 1 + 4*b, so the rows of one column are distinct and every row
  // receives exactly DV*NC/NR circulants when NC is a multiple of NR.
  function automatic int base_row(int i, int e, int nr);
    int g;
    g = 1 + 4 * (i / nr);
    return (i + e * g) % nr;
  endfunction

  // Circulant shift of the e-th circulant of base column i:
  // s = (e*i^2 + 2^e*i + 3e) mod Z. Row b of that circulant has its one in
  // column (b + s) mod Z.
  function automatic int base_shift(int i, int e, int z);
    return (e * i * i + (1 << e) * i + 3 * e) % z;
  endfunction

  // Base column of the d-th circulant of base row a (columns in increasing
  // order, and for one column in increasing e). Returns -1 if there is none.
  function automatic int row_col(int a, int d, int nc, int nr, int dv);
    int cnt;
    cnt = 0;
    for (int i = 0; i < nc; i++)
      for (int e = 0; e < dv; e++)
        if (base_row(i, e, nr) == a) begin
          if (cnt == d) return i;
          cnt++;
        end
    return -1;
  endfunction

  // Circulant index e (within its column) of the d-th circulant of base row a.
  function automatic int row_edge(int a, int d, int nc, int nr, int dv);
    int cnt;
    cnt = 0;
    for (int i = 0; i < nc; i++)
      for (int e = 0; e < dv; e++)
        if (base_row(i, e, nr) == a) begin
          if (cnt == d) return e;
          cnt++;
        end
    return -1;
  endfunction

  // Number of type-1 (flipping) VNUs per base column: p0*Z rounded to the
  // nearest integer, with p0 given in percent.
  function automatic int n_type1(int z, int p0_pct);
    return (p0_pct * z + 50) / 100;
  endfunction

  function automatic int gcd(int a, int b);
    int t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Multiplier of the position permutation of base column i: the
  // (i mod 8)-th integer >= 1 that is coprime with Z.
  function automatic int perm_mult(int i, int z);
    int m, k;
    m = 1;
    k = 0;
    for (int c = 1; c < 4 * z + 8; c++)
      if (gcd(c, z) == 1) begin
        if (k == i % 8) begin
          m = c;
          break;
        end
        k++;
      end
    return m;
  endfunction

  // 1 when the VNU at position j (0-based) of base column i is of type 1.
  // Position j maps to rank (m_i*j + 7i + 3) mod Z, a permutation of 0..Z-1;
  // ranks below n_type1 are type 1.
  function automatic bit is_type1(int i, int j, int z, int p0_pct);
    int r;
    r = (perm_mult(i, z) * j + 7 * i + 3) % z;
    return r < n_type1(z, p0_pct);
  endfunction

  // Index of type-1 position j among the type-1 positions of base column i
  // (0 .. n_type1-1): the number of type-1 positions below j.
  function automatic int type1_rank(int i, int j, int z, int p0_pct);
    int r;
    r = 0;
    for (int q = 0; q < j; q++)
      if (is_type1(i, q, z, p0_pct)) r++;
    return r;
  endfunction

  // Width of an energy value: E = (v xor y) + sum of DV check values, 0..DV+1.
  function automatic int energy_width(int dv);
    return $clog2(dv + 2);
  endfunction

endpackage

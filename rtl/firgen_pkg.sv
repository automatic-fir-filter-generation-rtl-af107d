// firgen_pkg: types and schedule arithmetic shared by the co-partitioned FIR filter.
//
// The filter computes y(i) = sum_{j=0}^{N-1} a(j) * u(i-j). Its iteration space (i, j) is
// co-partitioned: i = j1 + J1*k1 + J1*K1*l1 and j = j2 + J2*k2 + J2*K2*l2, where (j1, j2) is the
// point inside a local-sequential (LS) tile, (k1, k2) is the processor that owns the tile and
// (l1, l2) numbers the global-sequential (GS) tiles. Processor (k1, k2) executes iteration
// (j1, j2, l1, l2) at time t = lamJ1*j1 + lamJ2*j2 + lamK1*k1 + lamK2*k2 + lamL1*l1 + lamL2*l2.
//
// The functions below compute that schedule vector and the number of delay registers on each
// data dependency, n = lambda . d. The dependency vectors follow the localized recurrences
// a[i,j] = a[i-1,j], u[i,j] = u[i-1,j-1], y[i,j] = y[i,j-1] + a*u. A dependency that crosses a
// tile border in dimension 1 is classified by a "case" ci (and likewise cj in dimension 2):
//   0 = stays inside the LS tile, 1 = comes from the neighbouring processor,
//   2 = wraps around from the last processor of the previous GS tile.
// The schedule chosen is the smallest that makes every delay at least one register; for the
// 2x2 array with 2x3 tiles and 12 taps it is (1, 2, 2, 5, 16, 10) when every dependency is
// localized, the schedule of the worked example of the method.
//
// With partial localization only the dependencies inside an LS tile (and u, a between rows)
// are localized. Each tile computes its own partial sum over its J2 taps, one extra point per
// tile row (j2 = J2) adds it to the running sum handed from partial-sum point to partial-sum
// point across the tiles, and the first tap column of each tile takes its sample directly from
// the processor that read it from the input. For the same sizes the schedule becomes
// (1, 2, 2, 1, 16, 8) and the latency drops from 19 to 15 cycles. The LS tile is scanned in column-major order
// (j1 fastest) as in that example, or in row-major order (j2 fastest) when ROW_MAJOR is set;
// this choice is a generic parameter of the generator.
package firgen_pkg;

  // Width of every iteration counter field.
  localparam int unsigned CNT_W = 8;

  // Iteration counter bundle that the counter unit produces and the array propagates.
  // l1 grows without bound for a streaming filter; it saturates at its maximum, which is far
  // beyond the few GS rows at the start of a stream where it matters (samples i < j are zero).
  typedef struct packed {
    logic             valid;  // an iteration point is executed in this cycle
    logic [CNT_W-1:0] j1;
    logic [CNT_W-1:0] j2;
    logic [CNT_W-1:0] l2;
    logic [CNT_W-1:0] l1;
  } cnt_t;

  // Points per LS-tile row: J2 taps, plus one partial-sum point with partial localization.
  function automatic int pts_j2(int J2, bit partial);
    return J2 + (partial ? 1 : 0);
  endfunction

  function automatic int lam_j1(int J2, bit row_major, bit partial);
    return row_major ? pts_j2(J2, partial) : 1;
  endfunction

  function automatic int lam_j2(int J1, bit row_major);
    return row_major ? 1 : J1;
  endfunction

  // a[i,j] = a[i-1,j] across a k1 border needs  -(J1-1)*lamJ1 + lamK1 >= 1.
  function automatic int lam_k1(int J1, int J2, bit row_major, bit partial);
    return (J1 - 1) * lam_j1(J2, row_major, partial) + 1;
  endfunction

  // Fully localized: y[i,j] = y[i,j-1] across a k2 border needs -(J2-1)*lamJ2 + lamK2 >= 1.
  // Partially localized: only the partial-sum points are chained across k2, one cycle apart.
  function automatic int lam_k2(int J1, int J2, bit row_major, bit partial);
    return partial ? 1 : (J2 - 1) * lam_j2(J1, row_major) + 1;
  endfunction

  // y wrap-around from column K2-1 to column 0 (next l2), and room for one LS tile.
  function automatic int lam_l2(int J1, int J2, int K2, bit row_major, bit partial);
    int v;
    if (partial) v = (K2 - 1) * lam_k2(J1, J2, row_major, partial) + 1;
    else v = (J2 - 1) * lam_j2(J1, row_major) + (K2 - 1) * lam_k2(J1, J2, row_major, partial) + 1;
    if (v < J1 * pts_j2(J2, partial)) v = J1 * pts_j2(J2, partial);
    return v;
  endfunction

  // All L2 tiles of one GS row must fit, and the u wrap-around from row K1-1 must not be
  // negative in dimension 1.
  function automatic int lam_l1(int J1, int J2, int K1, int K2, int L2, bit row_major,
                                bit partial);
    int v, w;
    v = (L2 - 1) * lam_l2(J1, J2, K2, row_major, partial) + J1 * pts_j2(J2, partial);
    w = (J1 - 1) * lam_j1(J2, row_major, partial) + (K1 - 1) * lam_k1(J1, J2, row_major, partial);
    return (v > w) ? v : w;
  endfunction

  // Delay contribution of dimension 1 for case ci (source point i-1).
  function automatic int dly_i(int ci, int J1, int K1, int lj1, int lk1, int ll1);
    case (ci)
      0:       return lj1;
      1:       return lk1 - (J1 - 1) * lj1;
      default: return ll1 - (J1 - 1) * lj1 - (K1 - 1) * lk1;
    endcase
  endfunction

  // Delay contribution of dimension 2 for case cj (source point j-1).
  function automatic int dly_j(int cj, int J2, int K2, int lj2, int lk2, int ll2);
    case (cj)
      0:       return lj2;
      1:       return lk2 - (J2 - 1) * lj2;
      default: return ll2 - (J2 - 1) * lj2 - (K2 - 1) * lk2;
    endcase
  endfunction

  // Partial localization: delay of the partial-sum chain between the partial-sum points of
  // consecutive tiles, from the left processor (cj = 1) or from the last column (cj = 2).
  function automatic int dly_ps(int cj, int K2, int lk2, int ll2);
    return (cj == 1) ? lk2 : ll2 - (K2 - 1) * lk2;
  endfunction

  // Partial localization: the first tap column of tile (k2, l2) takes u(i - jb), jb = J2*k2 +
  // J2*K2*l2, straight from the processor of column 0 that read sample i - jb. For the point
  // (j1, k1 = r) these give that processor's row and the distance in cycles.
  function automatic int bsrc_x(int j1, int r, int c, int l2, int J1, int J2, int K2);
    return j1 + J1 * r - (J2 * c + J2 * K2 * l2);
  endfunction

  function automatic int floordiv(int x, int b);
    return (x >= 0) ? x / b : -((-x + b - 1) / b);
  endfunction

  function automatic int bsrc_row(int j1, int r, int c, int l2, int J1, int J2, int K1, int K2);
    int x, m, rem;
    x   = bsrc_x(j1, r, c, l2, J1, J2, K2);
    m   = floordiv(x, J1 * K1);
    rem = x - m * J1 * K1;
    return rem / J1;
  endfunction

  function automatic int bsrc_dly(int j1, int r, int c, int l2, int J1, int J2, int K1, int K2,
                                  int lj1, int lk1, int lk2, int ll2, int ll1);
    int x, m, rem, td, ts;
    x   = bsrc_x(j1, r, c, l2, J1, J2, K2);
    m   = floordiv(x, J1 * K1);
    rem = x - m * J1 * K1;
    td  = j1 * lj1 + r * lk1 + c * lk2 + l2 * ll2;
    ts  = (rem % J1) * lj1 + (rem / J1) * lk1 + m * ll1;
    return td - ts;
  endfunction

  function automatic int bsrc_max(int J1, int J2, int K1, int K2, int L2,
                                  int lj1, int lk1, int lk2, int ll2, int ll1);
    int mx = 1;
    for (int j1 = 0; j1 < J1; j1++)
      for (int r = 0; r < K1; r++)
        for (int c = 0; c < K2; c++)
          for (int l2 = 0; l2 < L2; l2++)
            if (c != 0 || l2 != 0) begin
              int d;
              d = bsrc_dly(j1, r, c, l2, J1, J2, K1, K2, lj1, lk1, lk2, ll2, ll1);
              if (d > mx) mx = d;
            end
    return mx;
  endfunction

  function automatic int bsrc_min(int J1, int J2, int K1, int K2, int L2,
                                  int lj1, int lk1, int lk2, int ll2, int ll1);
    int mn = 1 << 30;
    for (int j1 = 0; j1 < J1; j1++)
      for (int r = 0; r < K1; r++)
        for (int c = 0; c < K2; c++)
          for (int l2 = 0; l2 < L2; l2++)
            if (c != 0 || l2 != 0) begin
              int d;
              d = bsrc_dly(j1, r, c, l2, J1, J2, K1, K2, lj1, lk1, lk2, ll2, ll1);
              if (d < mn) mn = d;
            end
    return mn;
  endfunction

endpackage

// dadda_pkg: shared types and elaboration-time functions of the Dadda multiplier.
//
// A Dadda reduction turns a matrix of bits, stacked in columns of equal weight,
// into two rows while keeping the weighted sum of all bits unchanged. The column
// heights allowed after each stage follow Dadda's sequence d(1)=2,
// d(j+1)=floor(1.5*d(j)) (2, 3, 4, 6, 9, 13, 19, 28, 42, ...): the first stage
// targets the largest d(j) below the tallest column, and each later stage the
// next smaller one, ending at two rows. In every stage the columns are visited
// from the least significant one upwards; a column that is still taller than the
// target (counting the carries it receives from the column below) gets a full
// adder, a (3,2) counter, which lowers it by two, or a half adder, a (2,2)
// counter, when it is exactly one bit over.
//
// schedule() runs that bookkeeping at elaboration time and returns, for every
// stage and column, the column height and the number of full and half adders.
// Two matrix shapes occur in this design:
//   PROF_PP   the N x N partial-product parallelogram of a flat multiplier;
//             column c holds min(c+1, 2N-1-c) bits.
//   PROF_JOIN the sum and carry rows of four (N/2) x (N/2) sub-products placed
//             at offsets 0, N/2, N/2 and N, as used to build an N x N product
//             from four half-size ones.
// The reduction rule and the counters follow the source description; the
// table encoding is this design's own.
package dadda_pkg;

  typedef enum logic [0:0] {
    PROF_PP   = 1'b0,
    PROF_JOIN = 1'b1
  } profile_e;

  localparam int MAX_STAGES = 10;   // enough for a tallest column of up to 63 bits
  localparam int MAX_COLS   = 64;   // enough for a 32 x 32 product

  typedef logic [MAX_STAGES:0][MAX_COLS-1:0][7:0] table_t;

  localparam int TAB_HEIGHT = 0;    // column height at the input of a stage
  localparam int TAB_FA     = 1;    // full adders placed in a column by a stage
  localparam int TAB_HA     = 2;    // half adders placed in a column by a stage

  // Number of bits in column c of the initial matrix.
  function automatic int init_height(profile_e p, int n, int c);
    int m;
    int h;
    m = n / 2;
    h = 0;
    if (p == PROF_PP) begin
      if (c < 2*n - 1) h = (c + 1 < 2*n - 1 - c) ? c + 1 : 2*n - 1 - c;
    end else begin
      if (c < n)              h += 2;   // low quarter product: sum and carry rows
      if (c >= m && c < 3*m)  h += 4;   // the two cross products
      if (c >= n && c < 2*n)  h += 2;   // high quarter product
    end
    return h;
  endfunction

  function automatic int max_height(profile_e p, int n);
    int hm;
    hm = 0;
    for (int c = 0; c < 2*n; c++)
      if (init_height(p, n, c) > hm) hm = init_height(p, n, c);
    return hm;
  endfunction

  // Number of reduction stages: how many terms of Dadda's sequence lie below hm.
  function automatic int num_stages(int hm);
    int d;
    int s;
    d = 2;
    s = 0;
    while (d < hm) begin
      s++;
      d = (d * 3) / 2;
    end
    return s;
  endfunction

  // Height target of stage s (s = 0 is the first stage, with the largest target).
  function automatic int stage_target(int hm, int s);
    int d;
    d = 2;
    for (int j = 0; j < num_stages(hm) - 1 - s; j++) d = (d * 3) / 2;
    return d;
  endfunction

  // Column heights and counter counts of every stage, see the package comment.
  function automatic table_t schedule(profile_e p, int n, int what);
    table_t ht;
    table_t fa;
    table_t ha;
    int hm;
    int ns;
    int t;
    int cin;
    int h;
    int f;
    int a;
    ht = '0;
    fa = '0;
    ha = '0;
    hm = max_height(p, n);
    ns = num_stages(hm);
    for (int c = 0; c < 2*n; c++) ht[0][c] = 8'(init_height(p, n, c));
    for (int s = 0; s < ns; s++) begin
      t   = stage_target(hm, s);
      cin = 0;
      for (int c = 0; c < 2*n; c++) begin
        h = int'(ht[s][c]);
        f = 0;
        a = 0;
        while (h - 2*f - a + cin > t) begin
          if (h - 2*f - a + cin == t + 1) a++;
          else                            f++;
        end
        fa[s][c]   = 8'(f);
        ha[s][c]   = 8'(a);
        ht[s+1][c] = 8'(h - 2*f - a + cin);
        cin        = f + a;
      end
    end
    if (what == TAB_FA) return fa;
    if (what == TAB_HA) return ha;
    return ht;
  endfunction

  // Total number of counters of one kind (TAB_FA or TAB_HA) over all stages.
  function automatic int count_total(profile_e p, int n, int what);
    table_t tab;
    int total;
    tab = schedule(p, n, what);
    total = 0;
    for (int s = 0; s < MAX_STAGES; s++)
      for (int c = 0; c < 2*n; c++) total += int'(tab[s][c]);
    return total;
  endfunction

endpackage

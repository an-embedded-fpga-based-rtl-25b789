// ga_ref_pkg: independent reference model of 4D Euclidean geometric algebra
// used by the testbenches.
//
// A multivector is 16 coefficients indexed by the blade bit mask (bit 0 =
// e1). The sign of a blade product is found by writing out both blades as
// lists of basis-vector indices and bubble-sorting the concatenation,
// counting swaps and cancelling equal neighbours; this is a different
// procedure from the transposition count used in the design. Fixed-point
// products use 64-bit integers shifted right by FRAC and truncated to 32
// bits, the same arithmetic as the design, so integer results can be
// compared exactly. Real-valued products are provided for rotations.
package ga_ref_pkg;
  import cliffosor_pkg::*;

  localparam int FRAC = 16;

  typedef int        mv_t   [16];
  typedef real       rmv_t  [16];

  // Blade masks per tag and field, written out from the element format table.
  function automatic int ref_mask(input tag_t t, input int k);
    int vt [4] = '{1, 2, 4, 8};
    int bt [6] = '{3, 5, 9, 6, 10, 12};  // 0011 0101 1001 0110 1010 1100
    int tt [4] = '{14, 13, 11, 7};       // 1110 1101 1011 0111
    case (t)
      TAG_SCALAR:    return (k == 0) ? 0 : -1;
      TAG_VECTOR:    return (k < 4) ? vt[k] : -1;
      TAG_BIVECTOR:  return bt[k];
      TAG_TRIVECTOR: return (k < 4) ? tt[k] : -1;
      TAG_PSEUDO:    return (k == 0) ? 15 : -1;
      default:       return -1;
    endcase
  endfunction

  function automatic int ref_nfields(input tag_t t);
    int n = 0;
    for (int k = 0; k < 6; k++) if (ref_mask(t, k) >= 0) n++;
    return n;
  endfunction

  function automatic int popc(input int m);
    int n = 0;
    for (int i = 0; i < 4; i++) if (m[i]) n++;
    return n;
  endfunction

  // Sign (+1/-1) of blade ma times blade mb by sorting the index list.
  function automatic int ref_sign(input int ma, input int mb);
    int lst [8];
    int n = 0, s = 1, tmp;
    for (int i = 0; i < 4; i++) if (ma[i]) begin lst[n] = i; n++; end
    for (int i = 0; i < 4; i++) if (mb[i]) begin lst[n] = i; n++; end
    for (int p = 0; p < n; p++)
      for (int q = 0; q + 1 < n - p; q++)
        if (lst[q] > lst[q+1]) begin
          tmp = lst[q]; lst[q] = lst[q+1]; lst[q+1] = tmp; s = -s;
        end
    return s;
  endfunction

  function automatic int fx(input int a, input int b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> FRAC);
  endfunction

  function automatic mv_t to_mv(input homog_t h);
    mv_t r;
    int m;
    foreach (r[i]) r[i] = 0;
    for (int k = 0; k < 6; k++) begin
      m = ref_mask(h.tag, k);
      if (m >= 0) r[m] = r[m] + int'(h.f[k]);
    end
    return r;
  endfunction

  function automatic mv_t result_mv(input result_t r);
    mv_t x, y;
    x = to_mv(r.p1);
    y = to_mv(r.p2);
    if (r.nparts == 0) foreach (x[i]) x[i] = 0;
    if (r.nparts == 2) foreach (x[i]) x[i] = x[i] + y[i];
    return x;
  endfunction

  // Geometric product of two homogeneous elements, product by product.
  function automatic mv_t ref_gp(input homog_t a, input homog_t b);
    mv_t r;
    int ma, mb;
    foreach (r[i]) r[i] = 0;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) begin
        ma = ref_mask(a.tag, i);
        mb = ref_mask(b.tag, j);
        if (ma >= 0 && mb >= 0)
          r[ma ^ mb] = r[ma ^ mb] + ref_sign(ma, mb) * fx(int'(a.f[i]), int'(b.f[j]));
      end
    return r;
  endfunction

  // Keep only blades of grade g (g < 0 or > 4: nothing).
  function automatic mv_t grade_sel(input mv_t x, input int g);
    mv_t r;
    foreach (r[i]) r[i] = (popc(i) == g) ? x[i] : 0;
    return r;
  endfunction

  function automatic bit mv_eq(input mv_t x, input mv_t y);
    foreach (x[i]) if (x[i] != y[i]) return 0;
    return 1;
  endfunction

  function automatic int tgrade(input tag_t t);
    case (t)
      TAG_SCALAR: return 0;
      TAG_VECTOR: return 1;
      TAG_BIVECTOR: return 2;
      TAG_TRIVECTOR: return 3;
      default: return 4;
    endcase
  endfunction

  function automatic tag_t tag_of(input int n);
    case (n % 5)
      0: return TAG_SCALAR;
      1: return TAG_VECTOR;
      2: return TAG_BIVECTOR;
      3: return TAG_TRIVECTOR;
      default: return TAG_PSEUDO;
    endcase
  endfunction

  // Random element: coefficients in about +-16.0, unused fields zero.
  function automatic homog_t rand_homog(input tag_t t);
    homog_t h;
    h = '0;
    h.tag = t;
    h.id  = 8'($urandom);
    for (int k = 0; k < ref_nfields(t); k++)
      h.f[k] = 32'(int'($urandom_range(0, 2 * (1 << 20))) - (1 << 20));
    return h;
  endfunction

  // Expected multivector of a product-type opcode.
  function automatic mv_t ref_product(input opcode_t op, input homog_t a, input homog_t b);
    mv_t g;
    int ga, gb;
    g  = ref_gp(a, b);
    ga = tgrade(a.tag);
    gb = tgrade(b.tag);
    case (op)
      OP_OUTER: return grade_sel(g, ga + gb);
      OP_LCONT: return grade_sel(g, gb - ga);
      OP_RCONT: return grade_sel(g, ga - gb);
      default:  return g;
    endcase
  endfunction

  // Expected multivector of a sum or difference.
  function automatic mv_t ref_sum(input bit sub, input homog_t a, input homog_t b);
    mv_t x, y;
    x = to_mv(a);
    y = to_mv(b);
    foreach (x[i]) x[i] = sub ? x[i] - y[i] : x[i] + y[i];
    return x;
  endfunction

  // Real-valued rotation v' = R v R~ through two real geometric products.
  function automatic void ref_rotate(input real q[4], input real v[3], output real o[3]);
    rmv_t r, rr, vv, t1, t2;
    foreach (r[i]) begin r[i] = 0.0; rr[i] = 0.0; vv[i] = 0.0; t1[i] = 0.0; t2[i] = 0.0; end
    r[0] = q[0];  r[3] = q[1];  r[5] = q[2];  r[6] = q[3];
    rr[0] = q[0]; rr[3] = -q[1]; rr[5] = -q[2]; rr[6] = -q[3];
    vv[1] = v[0]; vv[2] = v[1]; vv[4] = v[2];
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++)
      t1[i ^ j] = t1[i ^ j] + ref_sign(i, j) * r[i] * vv[j];
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++)
      t2[i ^ j] = t2[i ^ j] + ref_sign(i, j) * t1[i] * rr[j];
    o[0] = t2[1]; o[1] = t2[2]; o[2] = t2[4];
  endfunction

endpackage

// tb_kkt.svh: reference model of one interior-point KKT system for the
// testbenches, in real arithmetic and written from the problem definition
// (not from the RTL's row tables).
//
// Problem data (horizon n, 6 states, 6 inputs): time-varying A_i and
// B_i = A_i [0 0; I -I]; one G = [0 -I; 0 I] and one H shared by all stages
// (stored once, as for a time-invariant part); terminal H_N and F_N = I;
// weights w > 0, vector m_k and right-hand side [-h; f]. All values are
// rounded to single precision first so the hardware sees the same inputs.
//
// KKT vector order: x_0 u_0 x_1 u_1 ... x_n | lambda_0 lambda_1 .. lambda_n
// lambda_T | third part of m_k (2*NU per stage). The matrix is
//   [Phi  E'; E 0],  Phi = blockdiag(H + G' diag(w_i) G, H_N),
//   E rows: -x_0;  A_i x_i + B_i u_i - x_i+1;  F_N x_N,
// and b = rhs - [Phi E' G'; E 0 0] m.
//
// Data RAM image: m at 0, w at 640, rhs at 896, G at 1280, H at 1424,
// H_N at 1568, F_N at 1604, then A_i, B_i (72 words per stage) from 1640.
`ifndef TB_KKT_SVH
`define TB_KKT_SVH
class kkt_model;
  int    n;          // horizon
  int    nk;         // KKT rows
  int    npri, nm;   // primal size, length of m
  real   a[], bm[];  // A_i, B_i row-major, 36 per stage
  real   g[144], h[144], hn[36], fn[36];
  real   w[], m[], rhs[];
  real   phi[];      // n*144 + 36, row-major stage blocks
  real   k[];        // dense extended matrix, nk x nm
  real   b[];

  localparam int M_BASE = 0, W_BASE = 640, RHS_BASE = 896;
  localparam int G_ADDR = 1280, H_ADDR = 1424, HN_ADDR = 1568, FN_ADDR = 1604, AB_ADDR = 1640;

  function new(int horizon);
    n    = horizon;
    npri = n * 12 + 6;
    nk   = npri + (n + 2) * 6;
    nm   = nk + n * 12;
    a = new[n * 36]; bm = new[n * 36];
    w = new[n * 12]; m = new[nm]; rhs = new[nk];
    phi = new[n * 144 + 36];
    k = new[nk * nm]; b = new[nk];
  endfunction

  static function real fr(real x);
    return f2r(r2f(x));
  endfunction

  static function real urand(real lo, real hi);
    return lo + (hi - lo) * $itor($urandom_range(0, 1000000)) / 1.0e6;
  endfunction

  function void randomize_data(bit with_h);
    for (int i = 0; i < n; i++) begin
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++)
          a[i*36 + r*6 + c] = fr(((r == c) ? 1.0 : 0.0) + urand(-0.2, 0.2));
      // B_i = A_i [0 0; I -I]: column c<3 is A_i col 3+c, column c>=3 is -A_i col c
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++)
          bm[i*36 + r*6 + c] = (c < 3) ? a[i*36 + r*6 + 3 + c] : -a[i*36 + r*6 + c];
    end
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < 12; c++) begin
        g[r*12 + c] = 0.0;
        if (r < 6 && c == 6 + r) g[r*12 + c] = -1.0;
        if (r >= 6 && c == r) g[r*12 + c] = 1.0;
        h[r*12 + c] = (with_h && r == c) ? fr(urand(0.5, 2.0)) : 0.0;
      end
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) begin
        hn[r*6 + c] = (with_h && r == c) ? fr(urand(0.5, 2.0)) : 0.0;
        fn[r*6 + c] = (r == c) ? 1.0 : 0.0;
      end
    foreach (w[i]) w[i] = fr(urand(0.2, 5.0));
    foreach (m[i]) m[i] = fr(urand(-1.0, 1.0));
    foreach (rhs[i]) rhs[i] = fr(urand(-2.0, 2.0));
  endfunction

  function int xi(int i);   return i * 12;          endfunction
  function int ui(int i);   return i * 12 + 6;      endfunction
  function int li(int j);   return npri + j * 6;    endfunction   // lambda_j, j = 0..n+1 (n+1 = T)

  function void build();
    foreach (k[i]) k[i] = 0.0;
    // Phi
    for (int i = 0; i < n; i++)
      for (int p = 0; p < 12; p++)
        for (int q = 0; q < 12; q++) begin
          real s;
          s = h[p*12 + q];
          for (int c = 0; c < 12; c++) s += w[i*12 + c] * g[c*12 + p] * g[c*12 + q];
          phi[i*144 + p*12 + q] = s;
          k[(xi(i) + p) * nm + xi(i) + q] = s;
        end
    for (int p = 0; p < 6; p++)
      for (int q = 0; q < 6; q++) begin
        phi[n*144 + p*6 + q] = hn[p*6 + q];
        k[(xi(n) + p) * nm + xi(n) + q] = hn[p*6 + q];
      end
    // equality rows E and E'
    for (int r = 0; r < 6; r++) begin
      set_e(li(0) + r, xi(0) + r, -1.0);
      for (int c = 0; c < 6; c++) set_e(li(n + 1) + r, xi(n) + c, fn[r*6 + c]);
    end
    for (int i = 0; i < n; i++)
      for (int r = 0; r < 6; r++) begin
        for (int c = 0; c < 6; c++) begin
          set_e(li(i + 1) + r, xi(i) + c, a[i*36 + r*6 + c]);
          set_e(li(i + 1) + r, ui(i) + c, bm[i*36 + r*6 + c]);
        end
        set_e(li(i + 1) + r, xi(i + 1) + r, -1.0);
      end
    // G' block for the right-hand side
    for (int i = 0; i < n; i++)
      for (int p = 0; p < 12; p++)
        for (int c = 0; c < 12; c++)
          k[(xi(i) + p) * nm + nk + i*12 + c] = g[c*12 + p];
    for (int r = 0; r < nk; r++) begin
      real s;
      s = 0.0;
      for (int c = 0; c < nm; c++) s += k[r*nm + c] * m[c];
      b[r] = rhs[r] - s;
    end
  endfunction

  function real kv(int row, int col);
    return k[row * nm + col];
  endfunction

  function void set_e(int row, int col, real v);
    k[row * nm + col] = v;
    k[col * nm + row] = v;
  endfunction

  // data RAM image: returns value at word address, and index RAM contents
  function void image(ref real mem[4096]);
    foreach (mem[i]) mem[i] = 0.0;
    for (int i = 0; i < nm; i++) mem[M_BASE + i] = m[i];
    for (int i = 0; i < n * 12; i++) mem[W_BASE + i] = w[i];
    for (int i = 0; i < nk; i++) mem[RHS_BASE + i] = rhs[i];
    for (int i = 0; i < 144; i++) begin mem[G_ADDR + i] = g[i]; mem[H_ADDR + i] = h[i]; end
    for (int i = 0; i < 36; i++) begin mem[HN_ADDR + i] = hn[i]; mem[FN_ADDR + i] = fn[i]; end
    for (int i = 0; i < n; i++)
      for (int e = 0; e < 36; e++) begin
        mem[AB_ADDR + i*72 + e]      = a[i*36 + e];
        mem[AB_ADDR + i*72 + 36 + e] = bm[i*36 + e];
      end
  endfunction

  // index RAM word for matrix sel (0 A, 1 B, 2 G, 3 F, 4 H) at stage i
  function int index_of(int sel, int i);
    case (sel)
      0: return AB_ADDR + i*72;
      1: return AB_ADDR + i*72 + 36;
      2: return G_ADDR;
      3: return FN_ADDR;
      default: return (i == n) ? HN_ADDR : H_ADDR;
    endcase
  endfunction


  // KKT vector index multiplied by slot c (0..23) of row r of the 24-column
  // compact form, -1 for a slot that is always zero. Segments of 6 slots:
  //   stage rows  x_i  u_i  lambda_i    lambda_i+1
  //   terminal    x_N  -    lambda_N    lambda_T
  //   lambda_0    x_0  -    -           -
  //   lambda_i+1  x_i  u_i  x_i+1       -
  //   lambda_T    x_N  -    -           -
  function int compact_vidx(int r, int c);
    int seg, kk, npx, i;
    seg = c / 6; kk = c % 6;
    npx = n * 12;
    if (r < npx) begin
      i = r / 12;
      case (seg)
        0: return xi(i) + kk;
        1: return ui(i) + kk;
        2: return li(i) + kk;
        default: return li(i + 1) + kk;
      endcase
    end else if (r < npx + 6) begin
      case (seg)
        0: return xi(n) + kk;
        1: return -1;
        2: return li(n) + kk;
        default: return li(n + 1) + kk;
      endcase
    end else if (r < npx + 12) begin
      return (seg == 0) ? xi(0) + kk : -1;
    end else if (r < npx + 12 + n * 6) begin
      i = (r - npx - 12) / 6;
      case (seg)
        0: return xi(i) + kk;
        1: return ui(i) + kk;
        2: return xi(i + 1) + kk;
        default: return -1;
      endcase
    end
    return (seg == 0) ? xi(n) + kk : -1;
  endfunction

  // residual ||K c - b||_inf / ||b||_inf of a candidate solution (first nk columns)
  function real residual(real c[]);
    real rmax, bmax;
    rmax = 0.0; bmax = 0.0;
    for (int r = 0; r < nk; r++) begin
      real s;
      s = 0.0;
      for (int j = 0; j < nk; j++) s += k[r*nm + j] * c[j];
      if (rabs(s - b[r]) > rmax) rmax = rabs(s - b[r]);
      if (rabs(b[r]) > bmax) bmax = rabs(b[r]);
    end
    return rmax / bmax;
  endfunction
endclass
`endif

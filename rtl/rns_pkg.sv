// rns_pkg: shared types, moduli and precomputed constants of the RNS NTT
// polynomial multiplier.
//
// The residue number system has nine 32-bit channels. Channels 0..3 form
// base 1 (dynamic range D), channels 4..7 form base 2 (dynamic range D2) and
// channel 8 is the redundant modulus m_r used by the exact (Shenoy) base
// extension. The nine moduli are the primes 2^32-k chosen for the main
// (FHE) configuration. The system modulus M is this design's own choice:
// the largest 120-bit prime with M = 1 mod 8192, so that a primitive
// 2n-th root of unity exists for every n up to 4096 and the Montgomery
// bound 36*M < D holds with headroom for value growth across the NTT.
//
// All base-extension and Montgomery constants are derived here from the
// moduli and M by constant functions, so no table has to be loaded for them.
package rns_pkg;

  localparam int WCH   = 32;          // channel width w_ch
  localparam int KB    = 4;           // channels per base (k)
  localparam int NCH   = 2 * KB + 1;  // all channels: base 1, base 2, m_r
  localparam int RCH   = 8;           // index of the redundant channel
  localparam int WCOEF = 128;         // binary coefficient width w

  typedef logic [WCH-1:0]           ch_t;
  typedef logic [NCH-1:0][WCH-1:0]  rns_t;    // value in both bases + m_r
  typedef logic [KB-1:0][WCH-1:0]   rns1_t;   // base 1 only
  typedef logic [KB:0][WCH-1:0]     rns2_t;   // base 2 (0..3) + m_r (4)
  typedef logic [WCOEF-1:0]         coef_t;

  // steps of the negative wrapped convolution, in execution order
  typedef enum logic [3:0] {
    ST_IDLE, ST_HAD_A_PHI, ST_HAD_B_PHI, ST_NTT_A, ST_NTT_B, ST_HAD_AB,
    ST_INTT_A, ST_HAD_NINV, ST_HAD_PHIINV, ST_REV
  } nwc_step_e;

  // table selector of the top-level table load port
  typedef enum logic [2:0] {
    TBL_TW_FWD, TBL_TW_INV, TBL_PHI, TBL_PHIINV, TBL_NINV
  } tbl_e;

  localparam rns_t MODS = {
    32'd4294967087,  // m_r
    32'd4294967111, 32'd4294967143, 32'd4294967161, 32'd4294967189,  // base 2
    32'd4294967197, 32'd4294967231, 32'd4294967279, 32'd4294967291   // base 1
  };

  // System modulus M (120 bits) and a primitive 8192-th root of unity mod M.
  localparam logic [127:0] SYS_M   = 128'h00fffffffffffffffffffffffff66001;
  localparam logic [127:0] PSI8192 = 128'h00105ba0f4943270b5cc9099e5416de7;

  // Montgomery output bound: a product result is below SUBK*M, so the
  // butterfly subtractor adds SUBK*M to stay non-negative.
  localparam int SUBK = 6;

  // ---------------- pipeline latencies (cycles) -------------------------
  localparam int LAT_MAC  = 2;   // mod_mac: product register, reduce register
  localparam int LAT_BAJ  = 1 + LAT_MAC;           // sigma, MACs
  localparam int LAT_SHE  = 1 + LAT_MAC + 3;       // E, MACs, beta, beta*D2, sub
  localparam int LAT_MONT = 1 + 2 + LAT_BAJ + 3 + LAT_SHE;
  localparam int LAT_BF   = 1 + LAT_MONT + 1 + 1;  // in reg, montmul, reg, add/sub reg

  // ---------------- constant arithmetic helpers -------------------------
  function automatic logic [31:0] mulmod(input logic [31:0] a, input logic [31:0] b,
                                         input logic [31:0] m);
    logic [63:0] p;
    p = 64'(a) * 64'(b);
    return 32'(p % 64'(m));
  endfunction

  function automatic logic [31:0] powmod(input logic [31:0] a, input logic [31:0] e,
                                         input logic [31:0] m);
    logic [31:0] r, b;
    r = 32'd1;
    b = a % m;
    for (int i = 0; i < 32; i++) begin
      if (e[i]) r = mulmod(r, b, m);
      b = mulmod(b, b, m);
    end
    return r;
  endfunction

  // Inverse modulo a prime channel modulus (Fermat).
  function automatic logic [31:0] invmod(input logic [31:0] a, input logic [31:0] m);
    return powmod(a, m - 32'd2, m);
  endfunction

  // Product of the moduli with indices in [lo, hi], skipping 'skip', reduced mod m.
  function automatic logic [31:0] prod_mod(input int lo, input int hi, input int skip,
                                           input logic [31:0] m);
    logic [31:0] r;
    r = 32'd1 % m;
    for (int c = lo; c <= hi; c++)
      if (c != skip) r = mulmod(r, MODS[c] % m, m);
    return r;
  endfunction

  // Barrett constant L = floor(2^K / m) for a K-bit input.
  function automatic logic [127:0] barrett_l(input int k, input logic [31:0] m);
    logic [127:0] one;
    one = 128'd1 << k;
    return one / 128'(m);
  endfunction

  // ---------------- Bajard constants (base 1 -> base 2 + m_r) ------------
  // |D_i^-1|_i
  function automatic rns1_t f_d1_i_inv_i();
    rns1_t r;
    for (int i = 0; i < KB; i++) r[i] = invmod(prod_mod(0, KB-1, i, MODS[i]), MODS[i]);
    return r;
  endfunction
  // |D_i|_j, row j = 0..4 (base 2 channels then m_r), column i
  function automatic logic [KB:0][KB-1:0][31:0] f_d1_i_red_j();
    logic [KB:0][KB-1:0][31:0] r;
    for (int j = 0; j <= KB; j++)
      for (int i = 0; i < KB; i++) r[j][i] = prod_mod(0, KB-1, i, MODS[KB+j]);
    return r;
  endfunction

  // ---------------- Shenoy constants (base 2 -> base 1) -------------------
  // |D2_j^-1|_j
  function automatic logic [KB-1:0][31:0] f_d2_j_inv_j();
    logic [KB-1:0][31:0] r;
    for (int j = 0; j < KB; j++)
      r[j] = invmod(prod_mod(KB, 2*KB-1, KB+j, MODS[KB+j]), MODS[KB+j]);
    return r;
  endfunction
  // |D2_j|_i, row i (base 1), column j; row KB is the m_r channel
  function automatic logic [KB:0][KB-1:0][31:0] f_d2_j_red_i();
    logic [KB:0][KB-1:0][31:0] r;
    for (int i = 0; i <= KB; i++) begin
      int c;
      c = (i == KB) ? RCH : i;
      for (int j = 0; j < KB; j++) r[i][j] = prod_mod(KB, 2*KB-1, KB+j, MODS[c]);
    end
    return r;
  endfunction
  // |D2|_i for base 1
  function automatic rns1_t f_d2_red_i();
    rns1_t r;
    for (int i = 0; i < KB; i++) r[i] = prod_mod(KB, 2*KB-1, -1, MODS[i]);
    return r;
  endfunction
  // |D2^-1|_r
  function automatic logic [31:0] f_d2_inv_r();
    return invmod(prod_mod(KB, 2*KB-1, -1, MODS[RCH]), MODS[RCH]);
  endfunction

  // ---------------- Montgomery constants -----------------------------------
  function automatic logic [31:0] big_mod(input logic [127:0] x, input logic [31:0] m);
    return 32'(x % 128'(m));
  endfunction
  // |M^-1|_i (base 1)
  function automatic rns1_t f_m_inv_red_i(input logic [127:0] mm);
    rns1_t r;
    for (int i = 0; i < KB; i++) r[i] = invmod(big_mod(mm, MODS[i]), MODS[i]);
    return r;
  endfunction
  // |M|_j (base 2 + m_r)
  function automatic rns2_t f_m_red_j(input logic [127:0] mm);
    rns2_t r;
    for (int j = 0; j <= KB; j++) r[j] = big_mod(mm, MODS[KB+j]);
    return r;
  endfunction
  // |D^-1|_j (base 2 + m_r)
  function automatic rns2_t f_d1_inv_red_j();
    rns2_t r;
    for (int j = 0; j <= KB; j++) r[j] = invmod(prod_mod(0, KB-1, -1, MODS[KB+j]), MODS[KB+j]);
    return r;
  endfunction
  // SUBK*M in every channel (butterfly subtraction offset)
  function automatic rns_t f_sub_off(input logic [127:0] mm);
    rns_t r;
    logic [135:0] km;
    km = 136'(mm) * 136'(SUBK);
    for (int c = 0; c < NCH; c++) r[c] = 32'(km % 136'(MODS[c]));
    return r;
  endfunction

  // ---------------- conversion constants -----------------------------------
  // D (base-1 dynamic range) and D_i = D / m_i
  function automatic logic [127:0] f_dyn_range();
    logic [127:0] d;
    d = 128'd1;
    for (int i = 0; i < KB; i++) d = d * 128'(MODS[i]);
    return d;
  endfunction
  function automatic logic [KB-1:0][127:0] f_d_i();
    logic [KB-1:0][127:0] r;
    for (int i = 0; i < KB; i++) begin
      r[i] = 128'd1;
      for (int c = 0; c < KB; c++) if (c != i) r[i] = r[i] * 128'(MODS[c]);
    end
    return r;
  endfunction
  // |2^(32w)|_c for the forward converter, w = 0..3, all channels
  function automatic logic [NCH-1:0][3:0][31:0] f_pow2_red();
    logic [NCH-1:0][3:0][31:0] r;
    for (int c = 0; c < NCH; c++)
      for (int w = 0; w < 4; w++)
        r[c][w] = powmod(32'd2, 32'(32 * w), MODS[c]);
    return r;
  endfunction

endpackage

// rns_rev_conv: reverse RNS converter, X = CRT(x_1..x_4) mod M.
//
// Uses the base-1 residues only:
//   sigma_i = |x_i * D_i^-1|_i                  (channel multipliers)
//   S       = sum_i sigma_i * D_i   (< 4D)        (four 32x128 products)
//   X       = S mod D               (subtract D up to three times)
//   Y       = X mod M               (nine shift-and-subtract steps, X < 2^9 M)
// This is the CRT sum of the document with the per-channel weight product
// reduced in its channel first, so only k <= 4 multiples of D remain to be
// removed. The final mod M returns the canonical coefficient, because the
// RNS values inside the multiplier are only bounded, not fully reduced.
// One value per cycle, latency LAT_REV = 4 cycles; the tag travels along.
module rns_rev_conv
  import rns_pkg::*;
#(
  parameter int          TW   = 13,
  parameter logic [127:0] SYSM = rns_pkg::SYS_M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_valid,
  input  logic [TW-1:0] i_tag,
  input  rns_t          i_r,
  output logic          o_valid,
  output logic [TW-1:0] o_tag,
  output coef_t         o_x
);
  localparam int LAT_REV = 4;
  localparam rns1_t                D1_I_INV_I = f_d1_i_inv_i();
  localparam logic [KB-1:0][127:0] DI         = f_d_i();
  localparam logic [127:0]         DR         = f_dyn_range();
  localparam logic [KB-1:0][31:0]  MODS1      = MODS[KB-1:0];

  rns1_t        sig, sig_q;
  logic [161:0] s, s_q;
  logic [127:0] xd, xd_q, xm;
  logic [LAT_REV-1:0]         v_d;
  logic [LAT_REV-1:0][TW-1:0] t_d;

  rns_mul #(.NC(KB), .MODS(MODS1)) u_sig (.a(i_r[KB-1:0]), .b(D1_I_INV_I), .z(sig));

  always_comb begin
    s = '0;
    for (int i = 0; i < KB; i++) s = s + 162'(sig_q[i]) * 162'(DI[i]);
  end

  always_comb begin
    logic [161:0] t;
    t = s_q;
    for (int k = 2; k >= 0; k--)
      if (t >= (162'(DR) << k)) t = t - (162'(DR) << k);
    xd = 128'(t);
  end

  always_comb begin
    logic [136:0] t;
    t = 137'(xd_q);
    for (int k = 8; k >= 0; k--)
      if (t >= (137'(SYSM) << k)) t = t - (137'(SYSM) << k);
    xm = 128'(t);
  end

  always_ff @(posedge clk) begin
    sig_q <= sig;
    s_q   <= s;
    xd_q  <= xd;
    o_x   <= xm;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[LAT_REV-2:0], i_valid};
    t_d <= {t_d[LAT_REV-2:0], i_tag};
  end
  assign o_valid = v_d[LAT_REV-1];
  assign o_tag   = t_d[LAT_REV-1];
endmodule

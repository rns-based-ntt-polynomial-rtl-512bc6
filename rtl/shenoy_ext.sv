// shenoy_ext: exact base extension from base 2 (with m_r) to base 1.
//
//   E_j   = |a_j * D2_j^-1|_j                        (base 2)
//   t_i   = | sum_j E_j * |D2_j|_i |_i               (MAC per base-1 channel)
//   t_r   = | sum_j E_j * |D2_j|_r |_r               (MAC in m_r)
//   beta  = | D2^-1 * (t_r - a_r) |_r                (correction factor)
//   z_i   = | t_i - beta * |D2|_i |_i
// Because the redundant residue a_r is exact, beta is the exact multiple of
// D2 that the plain CRT sum overshoots by, so z_i is the exact residue of the
// input value (which must be below D2). The beta formula follows the
// document's algorithm (subtract a_r before multiplying by D2^-1); its
// block diagram draws the multiplication first, which would not give the
// CRT overflow count, so the algorithm is used.
// Timing: fully pipelined, latency LAT_SHE = 6: E register, two MAC
// registers, beta register, beta*|D2|_i register, output register. The t_i
// values wait in a two-stage delay while beta is formed. No reset.
module shenoy_ext
  import rns_pkg::*;
(
  input  logic  clk,
  input  rns2_t a,      // base-2 residues [0..3], m_r residue [4]
  output rns1_t z       // base-1 residues
);
  localparam logic [KB-1:0][31:0]       D2_J_INV_J = f_d2_j_inv_j();
  localparam logic [KB:0][KB-1:0][31:0] D2_J_RED_I = f_d2_j_red_i();  // row KB: m_r
  localparam rns1_t                     D2_RED_I   = f_d2_red_i();
  localparam logic [31:0]               D2_INV_R   = f_d2_inv_r();
  localparam logic [KB-1:0][31:0]       MODS1      = MODS[KB-1:0];
  localparam logic [KB-1:0][31:0]       MODS2      = MODS[2*KB-1:KB];
  localparam logic [31:0]               MR         = MODS[RCH];

  logic [KB-1:0][31:0] e, e_q;
  logic [2:0][31:0]    ar_d;          // a_r delay to meet t_r
  rns1_t               t;             // MAC outputs (base 1)
  logic [31:0]         tr;            // MAC output (m_r)
  logic [31:0]         tr_sub, beta, beta_q;
  rns1_t               t_d1, t_d2;
  rns1_t               bd, bd_q;
  rns1_t               zz;

  rns_mul #(.NC(KB), .MODS(MODS2)) u_e (.a(a[KB-1:0]), .b(D2_J_INV_J), .z(e));

  always_ff @(posedge clk) begin
    e_q     <= e;
    ar_d[0] <= a[KB];
    ar_d[1] <= ar_d[0];
    ar_d[2] <= ar_d[1];
  end

  for (genvar i = 0; i < KB; i++) begin : g_mac_i
    mod_mac #(.W(WCH), .NT(KB), .M(MODS1[i])) u_mac (
      .clk(clk), .a(e_q), .b(D2_J_RED_I[i]), .z(t[i]));
  end
  mod_mac #(.W(WCH), .NT(KB), .M(MR)) u_mac_r (
    .clk(clk), .a(e_q), .b(D2_J_RED_I[KB]), .z(tr));

  // correction factor beta on the single redundant channel
  mod_sub         #(.W(WCH), .M(MR)) u_bsub (.a(tr), .b(ar_d[2]), .z(tr_sub));
  mod_mul_barrett #(.W(WCH), .M(MR)) u_bmul (.a(tr_sub), .b(D2_INV_R), .z(beta));

  always_ff @(posedge clk) begin
    beta_q <= beta;
    t_d1   <= t;
    t_d2   <= t_d1;
    bd_q   <= bd;
    z      <= zz;
  end

  // beta < k+1 < m_i, so it is a valid operand in every base-1 channel
  for (genvar i = 0; i < KB; i++) begin : g_fix
    mod_mul_barrett #(.W(WCH), .M(MODS1[i])) u_bd  (.a(beta_q), .b(D2_RED_I[i]), .z(bd[i]));
    mod_sub         #(.W(WCH), .M(MODS1[i])) u_sub (.a(t_d2[i]), .b(bd_q[i]),   .z(zz[i]));
  end
endmodule

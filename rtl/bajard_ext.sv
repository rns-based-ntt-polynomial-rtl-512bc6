// bajard_ext: approximate base extension from base 1 to base 2 plus m_r.
//
//   sigma_i = |q_i * D_i^-1|_i                 (one RNS_mult over base 1)
//   q^_j    = | sum_i sigma_i * |D_i|_j |_j     (one unrolled MAC per output
//                                                channel, 4 + 1 of them)
// The result represents Q + alpha*D with 0 <= alpha < k, which the RNS
// Montgomery multiplier turns into an offset of alpha*M (Bajard's method).
// Structure follows the document's base extension unit: a constant multiply
// on the input residues, then one MAC per outbound channel, with the MAC for
// the redundant modulus appended. Constants come from rns_pkg.
// Timing: fully pipelined, one extension per cycle, latency LAT_BAJ = 3
// (sigma register, then the two MAC registers). No reset (data only).
module bajard_ext
  import rns_pkg::*;
(
  input  logic  clk,
  input  rns1_t q,       // base-1 residues
  output rns2_t q_ext    // base-2 residues [0..3] and m_r residue [4]
);
  localparam rns1_t                     D1_I_INV_I = f_d1_i_inv_i();
  localparam logic [KB:0][KB-1:0][31:0] D1_I_RED_J = f_d1_i_red_j();
  localparam logic [KB-1:0][31:0]       MODS1      = MODS[KB-1:0];
  localparam logic [KB:0][31:0]         MODS2      = MODS[NCH-1:KB];

  rns1_t sigma, sigma_q;

  rns_mul #(.NC(KB), .MODS(MODS1)) u_sigma (.a(q), .b(D1_I_INV_I), .z(sigma));

  always_ff @(posedge clk) sigma_q <= sigma;

  for (genvar j = 0; j <= KB; j++) begin : g_mac
    mod_mac #(.W(WCH), .NT(KB), .M(MODS2[j])) u_mac (
      .clk(clk), .a(sigma_q), .b(D1_I_RED_J[j]), .z(q_ext[j]));
  end
endmodule

// rns_montmul: RNS Montgomery multiplication, Z = A*B*D^-1 (mod M), with
// A, B and Z held in both bases and the redundant channel (rns_t).
//
//   X  = A*B                        all 9 channels         (RNS_mult)
//   Q  = |-X * M^-1|_i              base 1 (multiply by |M^-1|_i, then
//                                   subtract from the base-1 moduli)
//   Q^ = Bajard(Q)                  base 1 -> base 2 + m_r (Q + alpha*D)
//   Z^ = (X^ + Q^*M) * D^-1         base 2 + m_r
//   Z  = Shenoy(Z^)                 base 2 + m_r -> base 1 (exact)
// The output is an integer Z < (k+1)*M + X/D that is congruent to A*B*D^-1
// mod M; it is not fully reduced, and both bases hold the same integer.
// The order of blocks and the constant names (M_INV_RED_I, M_RED_J,
// D1_INV_RED_J) follow the document's Montgomery unit; M is this design's
// system modulus rns_pkg::SYS_M (a parameter).
// Timing: registers between every functional block, shift registers carry
// X^ and Z^ past the extensions. Latency LAT_MONT = 15, one product per
// cycle, no stall, no reset (data only).
module rns_montmul
  import rns_pkg::*;
#(
  parameter logic [127:0] SYSM = rns_pkg::SYS_M
) (
  input  logic clk,
  input  rns_t a,
  input  rns_t b,
  output rns_t z
);
  localparam rns1_t               M_INV_RED_I  = f_m_inv_red_i(SYSM);
  localparam rns2_t               M_RED_J      = f_m_red_j(SYSM);
  localparam rns2_t               D1_INV_RED_J = f_d1_inv_red_j();
  localparam logic [KB-1:0][31:0] MODS1        = MODS[KB-1:0];
  localparam logic [KB:0][31:0]   MODS2        = MODS[NCH-1:KB];
  localparam int                  XD           = 2 + LAT_BAJ + 1;  // X^ wait

  rns_t  x, x_q;
  rns1_t y, y_q, q, q_q;
  rns2_t qe;
  rns2_t qm, qm_q, s, s_q, zh, zh_q;
  rns2_t x2_d [XD];
  rns2_t zh_d [LAT_SHE];
  rns1_t zi;

  // 1: X = A*B
  rns_mul #(.NC(NCH), .MODS(MODS)) u_x (.a(a), .b(b), .z(x));
  always_ff @(posedge clk) x_q <= x;

  // 2: X_i * |M^-1|_i ; 3: Q_i = m_i - that (mod m_i)
  rns_mul #(.NC(KB), .MODS(MODS1)) u_y (.a(x_q[KB-1:0]), .b(M_INV_RED_I), .z(y));
  always_ff @(posedge clk) y_q <= y;
  rns_sub #(.NC(KB), .MODS(MODS1)) u_q (.a('0), .b(y_q), .z(q));
  always_ff @(posedge clk) q_q <= q;

  // 4..6: Bajard extension
  bajard_ext u_baj (.clk(clk), .q(q_q), .q_ext(qe));

  // X^ waits for Q^
  always_ff @(posedge clk) begin
    x2_d[0] <= x_q[NCH-1:KB];
    for (int i = 1; i < XD; i++) x2_d[i] <= x2_d[i-1];
  end

  // 7: Q^*M ; 8: + X^ ; 9: * D^-1
  rns_mul #(.NC(KB+1), .MODS(MODS2)) u_qm (.a(qe), .b(M_RED_J), .z(qm));
  always_ff @(posedge clk) qm_q <= qm;
  rns_add #(.NC(KB+1), .MODS(MODS2)) u_s (.a(qm_q), .b(x2_d[XD-1]), .z(s));
  always_ff @(posedge clk) s_q <= s;
  rns_mul #(.NC(KB+1), .MODS(MODS2)) u_zh (.a(s_q), .b(D1_INV_RED_J), .z(zh));
  always_ff @(posedge clk) zh_q <= zh;

  // 10..15: Shenoy extension back to base 1; Z^ waits alongside
  shenoy_ext u_she (.clk(clk), .a(zh_q), .z(zi));
  always_ff @(posedge clk) begin
    zh_d[0] <= zh_q;
    for (int i = 1; i < LAT_SHE; i++) zh_d[i] <= zh_d[i-1];
  end

  assign z = {zh_d[LAT_SHE-1], zi};
endmodule

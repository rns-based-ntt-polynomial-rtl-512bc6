// rns_mul: RNS_mult, NC independent Barrett channel multipliers
// (mod_mul_barrett), Z = A*B mod m_c in every channel. Combinational.
// Ports a, b, z: NC packed 32-bit residues. Follows the document's RNS_mult;
// the moduli must fill the 32-bit width (checked in barrett_reduce).
module rns_mul #(
  parameter int                       NC   = rns_pkg::NCH,
  parameter logic [NC-1:0][31:0]      MODS = rns_pkg::MODS
) (
  input  logic [NC-1:0][31:0] a,
  input  logic [NC-1:0][31:0] b,
  output logic [NC-1:0][31:0] z
);
  for (genvar c = 0; c < NC; c++) begin : g_ch
    mod_mul_barrett #(.W(32), .M(MODS[c])) u_mul (.a(a[c]), .b(b[c]), .z(z[c]));
  end
endmodule

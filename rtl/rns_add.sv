// rns_add: Add_RNS, NC independent channel modular adders (mod_add), one per
// modulus of MODS. Used with NC = 9 (both bases and m_r). Combinational.
// Ports a, b, z: NC packed 32-bit residues. Follows the document's Add_RNS;
// the parameterised channel count is this design's.
module rns_add #(
  parameter int                       NC   = rns_pkg::NCH,
  parameter logic [NC-1:0][31:0]      MODS = rns_pkg::MODS
) (
  input  logic [NC-1:0][31:0] a,
  input  logic [NC-1:0][31:0] b,
  output logic [NC-1:0][31:0] z
);
  for (genvar c = 0; c < NC; c++) begin : g_ch
    mod_add #(.W(32), .M(MODS[c])) u_add (.a(a[c]), .b(b[c]), .z(z[c]));
  end
endmodule

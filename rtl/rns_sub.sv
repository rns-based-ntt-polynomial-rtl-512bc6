// rns_sub: Sub_RNS, NC independent channel modular subtractors (mod_sub),
// Z = (A - B) mod m_c in every channel. Combinational.
// Ports a, b, z: NC packed 32-bit residues. The document's Sub_RNS adds the
// channel moduli first; the butterfly adds SUBK*M to its minuend instead,
// and this block is the plain per-channel subtractor underneath.
module rns_sub #(
  parameter int                       NC   = rns_pkg::NCH,
  parameter logic [NC-1:0][31:0]      MODS = rns_pkg::MODS
) (
  input  logic [NC-1:0][31:0] a,
  input  logic [NC-1:0][31:0] b,
  output logic [NC-1:0][31:0] z
);
  for (genvar c = 0; c < NC; c++) begin : g_ch
    mod_sub #(.W(32), .M(MODS[c])) u_sub (.a(a[c]), .b(b[c]), .z(z[c]));
  end
endmodule

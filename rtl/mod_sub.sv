// mod_sub: channel modular subtractor, Z = (A - B) mod M for A, B < M.
//
// A-B is formed once; its borrow bit selects between A-B and A-B+M, so a
// single select line decides the result. Purely combinational.
// Follows the document's subtractor select-bit method; widths are parameters.
module mod_sub #(
  parameter int          W = 32,
  parameter logic [W-1:0] M = 32'd4294967291
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] z
);
  logic [W:0] dif;
  logic [W-1:0] cor;
  always_comb begin
    dif = {1'b0, a} - {1'b0, b};
    cor = dif[W-1:0] + M;
    z   = dif[W] ? cor : dif[W-1:0];
  end
endmodule

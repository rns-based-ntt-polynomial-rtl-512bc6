// mod_mul_barrett: channel modular multiplier Z = A*B mod M via Barrett.
//
// The 2w-bit product is reduced by barrett_reduce with K = 2w, following the
// document's hardware choice K = 2*ceil(log2 M) that holds for any modulus
// of the channel width. Purely combinational; callers register the result.
// Ports: a, b (W bits), z = a*b mod M. Requires 2^(W-1) <= M < 2^W.
module mod_mul_barrett #(
  parameter int          W = 32,
  parameter logic [W-1:0] M = 32'd4294967291
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] z
);
  logic [2*W-1:0] p;
  assign p = (2*W)'(a) * (2*W)'(b);
  barrett_reduce #(.W(W), .IW(2*W), .M(M)) u_red (.x(p), .z(z));
endmodule

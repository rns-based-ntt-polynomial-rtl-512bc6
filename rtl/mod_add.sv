// mod_add: channel modular adder, Z = (A + B) mod M for A, B < M.
//
// The sum A+B (w+1 bits) and the difference A+B-M are formed side by side;
// the borrow of the difference, together with the carry of the sum, picks
// which one is the reduced result. This is the carry-select adder the
// design uses for every RNS channel (one adder, one subtractor, one mux),
// in place of an inferred modulo operator. Purely combinational.
// Follows the document's carry-select choice; widths are parameters.
module mod_add #(
  parameter int          W = 32,
  parameter logic [W-1:0] M = 32'd4294967291
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] z
);
  logic [W:0]   sum;
  logic [W+1:0] dif;
  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    dif = {1'b0, sum} - {2'b00, M};
    // dif[W+1] is the borrow: sum < M keeps the plain sum
    z = dif[W+1] ? sum[W-1:0] : dif[W-1:0];
  end
endmodule

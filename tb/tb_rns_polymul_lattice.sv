// tb_rns_polymul_lattice: runs the lattice-size workload on the default
// (N = 4096) multiplier: a product of two polynomials of the ring
// Z_q[x]/(x^1024 + 1) with a 32-bit q (q = 2^32 - 5). Each small-ring
// operand a(x) is loaded as a(x^4), so the 4096-point negacyclic product
// returns c(x^4). The exact integer coefficients of c stay below
// 1024 * q^2 < 2^74, far below M (120 bits), so lifting a result
// coefficient to (-M/2, M/2) and reducing it mod q gives the small-ring
// result. The shared body (tb_polymul_common.svh) checks 24 coefficients:
// against the product mod M, against a direct small-ring product mod q,
// and that the coefficients between the embedded positions are zero; it
// also checks the cycle count and the mechanism counters as in the full
// test.
module tb_rns_polymul_lattice;
  localparam int N      = 4096;
  localparam int NCHECK = 24;
  localparam int WDOG   = 3000000;
  localparam int NBF_T  = 4;
  localparam int LOGN_T = 12;
  localparam int NPASS_T = 3;
  localparam int EMBED  = 4;                       // 1024-point ring inside 4096
  localparam longint unsigned QS = 64'd4294967291; // 32-bit small-ring modulus
  localparam bit EXPECT_WIRE  = 1'b0;

  `include "tb_polymul_common.svh"

  // watchdog
  initial begin
    repeat (WDOG) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rns_polymul_top dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_sel(coef_sel), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .tbl_we(tbl_we), .tbl_sel(tbl_sel), .tbl_addr(tbl_addr), .tbl_wdata(tbl_wdata),
    .start(start), .busy(busy), .done(done),
    .res_re(res_re), .res_addr(res_addr), .res_rdata(res_rdata));
endmodule

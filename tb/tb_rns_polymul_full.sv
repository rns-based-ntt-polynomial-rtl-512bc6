// tb_rns_polymul_full: end-to-end test of the polynomial multiplier at its
// default (full) size, N = 4096 with 128-bit coefficients, no parameter
// override on the top. It loads two random polynomials and all tables,
// runs one negacyclic multiplication (three passes per transform) and
// compares a spread sample of the result coefficients with a schoolbook
// negacyclic product computed in the testbench. It also checks the cycle
// budget and counts every datapath mechanism (butterflies, bypass, stalls,
// passes, forward and inverse transforms).
module tb_rns_polymul_full;
  localparam int N      = 4096;
  localparam int NCHECK = 24;
  localparam int WDOG   = 3000000;
  localparam int NBF_T  = 4;
  localparam int LOGN_T = 12;
  localparam int NPASS_T = 3;
  localparam int EMBED  = 1;             // operands random below M
  localparam longint unsigned QS = 1;
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

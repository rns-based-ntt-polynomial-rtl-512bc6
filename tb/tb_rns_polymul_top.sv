// tb_rns_polymul_top: end-to-end test of the polynomial multiplier at a
// reduced size, N = 32 (five NTT stages: two passes through the four
// butterflies, the second with three stages switched to bypass). All 32
// result coefficients are compared with a schoolbook negacyclic product,
// and the testbench counts butterflies, bypass operations, stalls, passes,
// wire-through stages and transforms, failing on any that never happen.
module tb_rns_polymul_top;
  localparam int N      = 32;
  localparam int NCHECK = 32;
  localparam int WDOG   = 200000;
  localparam int NBF_T  = 4;
  localparam int LOGN_T = 5;
  localparam int NPASS_T = 2;
  localparam int EMBED  = 1;             // operands random below M
  localparam longint unsigned QS = 1;
  localparam bit EXPECT_WIRE  = 1'b1;

  `include "tb_polymul_common.svh"

  // watchdog
  initial begin
    repeat (WDOG) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rns_polymul_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_sel(coef_sel), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .tbl_we(tbl_we), .tbl_sel(tbl_sel), .tbl_addr(tbl_addr), .tbl_wdata(tbl_wdata),
    .start(start), .busy(busy), .done(done),
    .res_re(res_re), .res_addr(res_addr), .res_rdata(res_rdata));
endmodule

// tb_rns_rev_conv: checks the reverse converter: for integers X of the
// sizes the multiplier can hold (random below D, the base-1 range, random
// below M, and the edges 0, M-1, M, D-1), the residue vector is applied and the output,
// LAT_REV cycles later, must be X mod M; o_valid and the tag must follow
// i_valid and i_tag. Random valid gaps.
module tb_rns_rev_conv;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  localparam int LAT_REV = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, o_valid;
  logic [12:0] i_tag = '0, o_tag;
  rns_t i_r = '0;
  coef_t o_x;
  typedef struct { bit v; logic [12:0] tag; logic [255:0] x; } in_t;
  in_t hist [$];

  always #5 clk = ~clk;

  rns_rev_conv dut (.clk(clk), .rst_n(rst_n), .i_valid(i_valid), .i_tag(i_tag), .i_r(i_r),
                    .o_valid(o_valid), .o_tag(o_tag), .o_x(o_x));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      in_t e;
      @(negedge clk);
      if (hist.size() == LAT_REV) begin
        e = hist.pop_front();
        checks++;
        if (o_valid !== e.v || (e.v && (o_tag != e.tag || 256'(o_x) != e.x % 256'(SYS_M)))) begin
          failures++; if (failures < 5) $display("mismatch at %0d: got %h for %h", i, o_x, e.x);
        end
      end
      e.v = ($urandom % 5) != 0;
      e.tag = 13'($urandom);
      case (i % 100)
        0: e.x = 0;
        1: e.x = SYS_M - 1;
        2: e.x = SYS_M;
        3: e.x = u_d1() - 1;
        default: e.x = (i % 2) ? {rnd128(), rnd128()} % u_d1() : rnd128() % SYS_M;
      endcase
      i_valid = e.v; i_tag = e.tag; i_r = to_rns(e.x);
      hist.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

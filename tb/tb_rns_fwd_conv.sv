// tb_rns_fwd_conv: checks the forward converter: for 128-bit inputs (random,
// random below M, 0, M-1 and all-ones) every output channel must equal
// x mod m_c (the % operator), with o_valid and the tag delayed by LAT_MAC
// cycles; inputs are applied every cycle with random valid gaps.
module tb_rns_fwd_conv;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, o_valid;
  logic [12:0] i_tag = '0, o_tag;
  coef_t i_x = '0;
  rns_t o_r;
  typedef struct { bit v; logic [12:0] tag; coef_t x; } in_t;
  in_t hist [$];

  always #5 clk = ~clk;

  rns_fwd_conv dut (.clk(clk), .rst_n(rst_n), .i_valid(i_valid), .i_tag(i_tag), .i_x(i_x),
                    .o_valid(o_valid), .o_tag(o_tag), .o_r(o_r));

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
      if (hist.size() == LAT_MAC) begin
        e = hist.pop_front();
        checks++;
        if (o_valid !== e.v || (e.v && (o_tag != e.tag || o_r != to_rns(256'(e.x))))) begin
          failures++; if (failures < 5) $display("mismatch at %0d", i);
        end
      end
      e.v = ($urandom % 5) != 0;
      e.tag = 13'($urandom);
      case (i % 100)
        0: e.x = '0;
        1: e.x = SYS_M - 1;
        2: e.x = '1;
        default: e.x = (i % 2) ? rnd128() : rnd128() % SYS_M;
      endcase
      i_valid = e.v; i_tag = e.tag; i_x = e.x;
      hist.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

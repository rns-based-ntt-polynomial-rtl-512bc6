// tb_bajard_ext: checks the approximate base extension from base 1 to
// base 2 plus m_r. For random base-1 residue vectors (and the vectors of 0,
// 1 and D-1) the integer Q < D is rebuilt by the testbench's own CRT; the
// five outputs must be the residues of Q + alpha*D for one common
// alpha in [0, k). A new input is applied every cycle and checked
// LAT_BAJ cycles later. The testbench also requires that alpha = 0 and
// alpha > 0 both occur.
module tb_bajard_ext;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  int checks = 0, failures = 0;
  int n_alpha0 = 0, n_alpha_pos = 0;
  logic clk = 1'b0;
  rns1_t q;
  rns2_t q_ext;
  logic [255:0] exp_q [$];

  always #5 clk = ~clk;

  bajard_ext dut (.clk(clk), .q(q), .q_ext(q_ext));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000 + LAT_BAJ; i++) begin
      logic [255:0] v;
      rns_t full;
      @(negedge clk);
      if (i >= LAT_BAJ) begin
        logic [255:0] qv;
        int alpha;
        qv = exp_q.pop_front();
        alpha = -1;
        for (int al = 0; al < KB; al++) begin
          rns_t r;
          r = to_rns(qv + 256'(al) * u_d1());
          if (q_ext == {r[RCH], r[2*KB-1:KB]}) alpha = al;
        end
        checks++;
        if (alpha < 0) begin
          failures++;
          if (failures < 5) $display("extension of %h is not Q + alpha*D", qv);
        end else if (alpha == 0) n_alpha0++;
        else n_alpha_pos++;
      end
      case (i)
        0: v = 0;
        1: v = 1;
        2: v = u_d1() - 1;
        default: v = {rnd128(), rnd128()} % u_d1();
      endcase
      full = to_rns(v);
      q = full[KB-1:0];
      exp_q.push_back(from_rns1(full));
    end
    checks++;
    if (n_alpha0 == 0 || n_alpha_pos == 0) begin
      failures++; $display("alpha range not exercised: %0d zero, %0d positive", n_alpha0, n_alpha_pos);
    end
    $display("alpha = 0: %0d times, alpha > 0: %0d times", n_alpha0, n_alpha_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

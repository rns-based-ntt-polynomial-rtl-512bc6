// tb_shenoy_ext: checks the exact base extension from base 2 (with the
// redundant residue) to base 1. For random integers X below D2 (the base-2
// dynamic range), and for 0, 1 and D2-1, the base-2 and m_r residues are
// applied and the four base-1 outputs must equal X mod m_i exactly,
// LAT_SHE cycles later; one input per cycle.
module tb_shenoy_ext;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  rns2_t a;
  rns1_t z;
  rns1_t exp_z [$];

  always #5 clk = ~clk;

  shenoy_ext dut (.clk(clk), .a(a), .z(z));

  function automatic logic [255:0] d2();
    logic [255:0] d;
    d = 256'd1;
    for (int j = KB; j < 2 * KB; j++) d = d * 256'(MODS[j]);
    return d;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000 + LAT_SHE; i++) begin
      logic [255:0] v;
      rns_t r;
      @(negedge clk);
      if (i >= LAT_SHE) begin
        rns1_t e;
        e = exp_z.pop_front();
        checks++;
        if (z != e) begin
          failures++;
          if (failures < 5) $display("input %0d: got %h expected %h", i - LAT_SHE, z, e);
        end
      end
      case (i)
        0: v = 0;
        1: v = 1;
        2: v = d2() - 1;
        default: v = {rnd128(), rnd128()} % d2();
      endcase
      r = to_rns(v);
      a = {r[RCH], r[2*KB-1:KB]};
      exp_z.push_back(r[KB-1:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

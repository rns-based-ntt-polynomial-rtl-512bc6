// tb_rns_montmul: checks the RNS Montgomery multiplier. A new pair (A, B)
// is applied every cycle: random A < 16M with B < M (the butterfly's use,
// B a pre-scaled twiddle), random A, B < 8M, and the edge pairs (0, 0),
// (M-1, M-1), (16M-1, M-1). LAT_MONT cycles later the output must
//   - hold the same integer Z in all nine channels (exact extensions),
//   - satisfy Z = A*B*D^-1 (mod M), D the base-1 dynamic range,
//   - stay below (k+1)*M + A*B/D + 1 (the bound of the method).
// The integer Z is rebuilt by the testbench's own CRT.
module tb_rns_montmul;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  rns_t a, b, z;
  logic [255:0] ea [$];
  logic [255:0] eb [$];
  logic [127:0] dinv;

  always #5 clk = ~clk;

  rns_montmul dut (.clk(clk), .a(a), .b(b), .z(z));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dinv = u_powm(128'(u_d1() % 256'(SYS_M)), SYS_M - 128'd2, SYS_M);
    for (int i = 0; i < 3000 + LAT_MONT; i++) begin
      logic [255:0] av, bv;
      @(negedge clk);
      if (i >= LAT_MONT) begin
        logic [255:0] xa, xb, zv;
        xa = ea.pop_front(); xb = eb.pop_front();
        zv = from_rns1(z);
        checks += 3;
        if (!rns_consistent(z)) begin
          failures++; if (failures < 5) $display("channels disagree for input %0d", i - LAT_MONT);
        end
        if (zv % 256'(SYS_M) != 256'(mm(mm(128'(xa % 256'(SYS_M)), 128'(xb % 256'(SYS_M))), dinv))) begin
          failures++; if (failures < 5) $display("wrong residue class for input %0d", i - LAT_MONT);
        end
        if (zv >= 256'(KB + 1) * 256'(SYS_M) + (xa * xb) / u_d1() + 1) begin
          failures++; if (failures < 5) $display("result above bound for input %0d", i - LAT_MONT);
        end
      end
      case (i)
        0: begin av = 0; bv = 0; end
        1: begin av = SYS_M - 1; bv = SYS_M - 1; end
        2: begin av = 16 * SYS_M - 1; bv = SYS_M - 1; end
        default:
          if (i % 2) begin av = {rnd128(), rnd128()} % (16 * SYS_M); bv = rnd128() % SYS_M; end
          else       begin av = {rnd128(), rnd128()} % (8 * SYS_M);  bv = {rnd128(), rnd128()} % (8 * SYS_M); end
      endcase
      a = to_rns(av); b = to_rns(bv);
      ea.push_back(av); eb.push_back(bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rns_butterfly: checks the RNS butterfly in both modes with a random
// mix of compute operations, bypass operations and idle cycles.
//   compute: Y = B + w*A, Z = B - w*A (mod M), where the twiddle input T
//            holds w*D, so w*A = A*T*D^-1; both outputs must be the same
//            integer in all nine channels and stay below B + SUBK*M;
//   bypass:  Y = B and Z = A exactly (residue for residue).
// o_valid and o_byp must appear exactly LAT_BF cycles after the operation,
// and never otherwise; a reset in the middle must clear the valid pipeline.
// Operands: A, B < 64M (values grow across the transform), T < M.
module tb_rns_butterfly;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  int checks = 0, failures = 0;
  int n_comp = 0, n_byp = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, i_byp = 1'b0, o_valid, o_byp;
  rns_t i_a, i_b, i_tw, o_y, o_z;
  typedef struct { bit v; bit byp; logic [255:0] a, b, t; } op_t;
  op_t hist [$];
  logic [127:0] dinv;

  always #5 clk = ~clk;

  rns_butterfly dut (.clk(clk), .rst_n(rst_n), .i_valid(i_valid), .i_byp(i_byp),
                     .i_a(i_a), .i_b(i_b), .i_tw(i_tw),
                     .o_valid(o_valid), .o_byp(o_byp), .o_y(o_y), .o_z(o_z));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input op_t e);
    checks++;
    if (o_valid !== e.v || (e.v && o_byp !== e.byp)) begin
      failures++; if (failures < 5) $display("valid/bypass timing wrong");
      return;
    end
    if (!e.v) return;
    checks++;
    if (e.byp) begin
      n_byp++;
      if (o_y != to_rns(e.b) || o_z != to_rns(e.a)) begin
        failures++; if (failures < 5) $display("bypass did not pass A and B through");
      end
    end else begin
      logic [255:0] yv, zv;
      logic [127:0] wa, bm;
      n_comp++;
      yv = from_rns1(o_y); zv = from_rns1(o_z);
      wa = mm(mm(128'(e.a % 256'(SYS_M)), 128'(e.t)), dinv);
      bm = 128'(e.b % 256'(SYS_M));
      if (!rns_consistent(o_y) || !rns_consistent(o_z)
          || yv % 256'(SYS_M) != 256'((256'(bm) + 256'(wa)) % 256'(SYS_M))
          || zv % 256'(SYS_M) != 256'((256'(bm) + 256'(SYS_M) - 256'(wa)) % 256'(SYS_M))
          || yv >= e.b + 256'(SUBK) * 256'(SYS_M) || zv >= e.b + 256'(SUBK) * 256'(SYS_M)) begin
        failures++; if (failures < 5) $display("compute result wrong");
      end
    end
  endtask

  initial begin
    op_t o, none;
    none.v = 0; none.byp = 0; none.a = 0; none.b = 0; none.t = 0;
    dinv = u_powm(128'(u_d1() % 256'(SYS_M)), SYS_M - 128'd2, SYS_M);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (hist.size() == LAT_BF) check_out(hist.pop_front());
      if (i == 2000) begin
        // reset with operations in flight: nothing may come out afterwards
        rst_n = 1'b0; i_valid = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        hist.delete();
        for (int k = 0; k < LAT_BF + 2; k++) begin
          checks++;
          if (o_valid) begin failures++; $display("valid survived reset"); end
          @(negedge clk);
        end
      end
      o.v   = ($urandom % 8) != 0;
      o.byp = ($urandom % 3) == 0;
      o.a   = {rnd128(), rnd128()} % (64 * SYS_M);
      o.b   = {rnd128(), rnd128()} % (64 * SYS_M);
      o.t   = rnd128() % SYS_M;
      if (i == 5) begin o.v = 1; o.byp = 0; o.a = 64 * SYS_M - 1; o.b = 64 * SYS_M - 1; o.t = SYS_M - 1; end
      i_valid = o.v; i_byp = o.byp;
      i_a = to_rns(o.a); i_b = to_rns(o.b); i_tw = to_rns(o.t);
      hist.push_back(o.v ? o : none);
    end
    checks += 2;
    if (n_comp == 0) begin failures++; $display("no compute operation checked"); end
    if (n_byp == 0)  begin failures++; $display("no bypass operation checked"); end
    $display("compute %0d, bypass %0d", n_comp, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

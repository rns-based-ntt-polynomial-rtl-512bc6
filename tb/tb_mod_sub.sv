// tb_mod_sub: checks the channel modular subtractor, z = (a - b) mod M, for the
// default 32-bit modulus and for a 16-bit instance (M = 65521), with edge
// operands (0, 1, M-1) and random operands below M; the reference is the
// % operator on 64-bit integers. Combinational: inputs applied, 1 ns wait.
module tb_mod_sub;
  localparam logic [31:0] M1 = 32'd4294967291;
  localparam logic [15:0] M2 = 16'd65521;
  int checks = 0, failures = 0;
  logic [31:0] a1, b1, z1;
  logic [15:0] a2, b2, z2;

  mod_sub dut1 (.a(a1), .b(b1), .z(z1));
  mod_sub #(.W(16), .M(M2)) dut2 (.a(a2), .b(b2), .z(z2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t1(input logic [31:0] a, input logic [31:0] b);
    a1 = a; b1 = b; #1;
    checks++;
    if (64'(z1) != (64'(a) + 64'(M1) - 64'(b)) % 64'(M1)) begin
      failures++; $display("32-bit: %0d - %0d gave %0d", a, b, z1);
    end
  endtask
  task automatic t2(input logic [15:0] a, input logic [15:0] b);
    a2 = a; b2 = b; #1;
    checks++;
    if (32'(z2) != (32'(a) + 32'(M2) - 32'(b)) % 32'(M2)) begin
      failures++; $display("16-bit: %0d - %0d gave %0d", a, b, z2);
    end
  endtask

  initial begin
    t1(0, 0); t1(M1 - 1, M1 - 1); t1(M1 - 1, 1); t1(1, M1 - 2); t1(M1 - 1, 0);
    t2(0, 0); t2(M2 - 1, M2 - 1); t2(M2 - 1, 1); t2(1, M2 - 2);
    for (int i = 0; i < 4000; i++) begin
      t1($urandom % M1, $urandom % M1);
      t2(16'($urandom % 32'(M2)), 16'($urandom % 32'(M2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

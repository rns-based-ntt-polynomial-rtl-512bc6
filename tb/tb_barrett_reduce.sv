// tb_barrett_reduce: checks the Barrett reducer, z = x mod M, for three
// sizes: a 64-bit input with the default 32-bit modulus, a 66-bit input (the
// width used inside the MAC) with another channel modulus, and a 32-bit
// input with a 16-bit modulus. Operands are random, plus the all-ones input
// and multiples of M around which the quotient estimate is off by one.
// Reference: the % operator on wide integers. Combinational, 1 ns wait.
module tb_barrett_reduce;
  localparam logic [31:0] MA = 32'd4294967291;
  localparam logic [31:0] MB = 32'd4294967087;
  localparam logic [15:0] MC = 16'd65521;
  int checks = 0, failures = 0;
  logic [63:0] xa; logic [31:0] za;
  logic [65:0] xb; logic [31:0] zb;
  logic [31:0] xc; logic [15:0] zc;

  barrett_reduce dut_a (.x(xa), .z(za));
  barrett_reduce #(.W(32), .IW(66), .M(MB)) dut_b (.x(xb), .z(zb));
  barrett_reduce #(.W(16), .IW(32), .M(MC)) dut_c (.x(xc), .z(zc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ta(input logic [63:0] x);
    xa = x; #1; checks++;
    if (za != 32'(x % 64'(MA))) begin failures++; $display("64-bit %h gave %h", x, za); end
  endtask
  task automatic tb(input logic [65:0] x);
    xb = x; #1; checks++;
    if (zb != 32'(x % 66'(MB))) begin failures++; $display("66-bit %h gave %h", x, zb); end
  endtask
  task automatic tc(input logic [31:0] x);
    xc = x; #1; checks++;
    if (zc != 16'(x % 32'(MC))) begin failures++; $display("32-bit %h gave %h", x, zc); end
  endtask

  initial begin
    ta('1); ta('0); tb('1); tb('0); tc('1); tc('0);
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] q;
      q = {$urandom, $urandom} >> 32;
      ta({$urandom, $urandom});
      ta(q * 64'(MA) + 64'($urandom % 3) - 64'd1);
      tb({2'($urandom), $urandom, $urandom});
      tb(66'(q) * 66'(MB) + 66'($urandom % 3) - 66'd1);
      tc($urandom);
      tc(32'($urandom % 65536) * 32'(MC) + 32'($urandom % 3) - 32'd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

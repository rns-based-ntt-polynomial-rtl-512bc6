// tb_mod_mac: checks the pipelined modular multiply-accumulate,
// z = (sum a_t*b_t) mod M, two cycles after the operands are applied. A new
// random operand set (any 32-bit values, also all-ones) is applied every
// cycle to the default 4-term instance and to a 5-term instance with another
// channel modulus; results are compared with a 128-bit reference sum.
module tb_mod_mac;
  import rns_pkg::*;
  localparam logic [31:0] MA = 32'd4294967291;
  localparam logic [31:0] MB = 32'd4294967087;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [3:0][31:0] a4, b4;
  logic [4:0][31:0] a5, b5;
  logic [31:0] z4, z5;
  logic [31:0] e4 [$];
  logic [31:0] e5 [$];

  always #5 clk = ~clk;

  mod_mac dut4 (.clk(clk), .a(a4), .b(b4), .z(z4));
  mod_mac #(.W(32), .NT(5), .M(MB)) dut5 (.clk(clk), .a(a5), .b(b5), .z(z5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000 + LAT_MAC; i++) begin
      logic [127:0] s4, s5;
      @(negedge clk);
      if (i >= LAT_MAC) begin
        checks += 2;
        if (z4 != e4.pop_front()) begin failures++; $display("4-term mismatch at %0d", i); end
        if (z5 != e5.pop_front()) begin failures++; $display("5-term mismatch at %0d", i); end
      end
      for (int t = 0; t < 5; t++) begin
        if (t < 4) begin
          a4[t] = (i % 50 == 0) ? '1 : $urandom;
          b4[t] = (i % 50 == 0) ? '1 : $urandom;
        end
        a5[t] = (i % 50 == 1) ? '1 : $urandom;
        b5[t] = (i % 50 == 1) ? '1 : $urandom;
      end
      s4 = '0; s5 = '0;
      for (int t = 0; t < 4; t++) s4 += 128'(a4[t]) * 128'(b4[t]);
      for (int t = 0; t < 5; t++) s5 += 128'(a5[t]) * 128'(b5[t]);
      e4.push_back(32'(s4 % 128'(MA)));
      e5.push_back(32'(s5 % 128'(MB)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

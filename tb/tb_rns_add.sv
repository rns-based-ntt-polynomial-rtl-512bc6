// tb_rns_add: checks the channel-wise RNS addition over all nine channels
// (both bases and the redundant modulus) with random residues and with the
// edge residues 0 and m_c - 1; each channel is compared with the % operator
// on 64-bit integers. A three-channel instance with other moduli checks the
// parameters. Combinational: inputs applied, 1 ns wait.
module tb_rns_add;
  import rns_pkg::*;
  localparam logic [2:0][31:0] M3 = {32'd65521, 32'd251, 32'd4294967291};
  int checks = 0, failures = 0;
  rns_t a, b, z;
  logic [2:0][31:0] a3, b3, z3;

  rns_add dut (.a(a), .b(b), .z(z));
  rns_add #(.NC(3), .MODS(M3)) dut3 (.a(a3), .b(b3), .z(z3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int c = 0; c < NCH; c++) begin
        case (i)
          0: begin a[c] = MODS[c] - 1; b[c] = MODS[c] - 1; end
          1: begin a[c] = 0;           b[c] = MODS[c] - 1; end
          2: begin a[c] = MODS[c] - 1; b[c] = 0;           end
          default: begin a[c] = $urandom % MODS[c]; b[c] = $urandom % MODS[c]; end
        endcase
      end
      for (int c = 0; c < 3; c++) begin
        a3[c] = (i == 0) ? M3[c] - 1 : $urandom % M3[c];
        b3[c] = (i == 0) ? M3[c] - 1 : $urandom % M3[c];
      end
      #1;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (64'(z[c]) != (64'(a[c]) + 64'(b[c])) % 64'(MODS[c])) begin
          failures++;
          if (failures < 5) $display("channel %0d: %0d, %0d gave %0d", c, a[c], b[c], z[c]);
        end
      end
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (64'(z3[c]) != (64'(a3[c]) + 64'(b3[c])) % 64'(M3[c])) begin
          failures++; $display("3-channel instance, channel %0d wrong", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

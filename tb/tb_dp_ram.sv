// tb_dp_ram: checks the simple dual-port RAM against an array model: random
// writes and reads each cycle (same-address read and write included, which
// returns the old word), read data checked one cycle after the read, and a
// held output while re is low. Default size (288 x 4096) plus a 16 x 8
// instance.
module tb_dp_ram;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic we, re, we2, re2;
  logic [11:0] wa, ra;
  logic [2:0]  wa2, ra2;
  logic [287:0] wd, rd, expd;
  logic [15:0]  wd2, rd2, expd2;
  logic [287:0] model [4096];
  logic [15:0]  model2 [8];
  bit           chk, chk2;

  always #5 clk = ~clk;

  dp_ram dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd), .re(re), .raddr(ra), .rdata(rd));
  dp_ram #(.WIDTH(16), .DEPTH(8)) dut2 (.clk(clk), .we(we2), .waddr(wa2), .wdata(wd2),
                                       .re(re2), .raddr(ra2), .rdata(rd2));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; we2 = 0; re2 = 0; chk = 0; chk2 = 0;
    // initialise both memories
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      we = 1; wa = 12'(i); wd = {9{$urandom}}; model[i] = wd;
      if (i < 8) begin we2 = 1; wa2 = 3'(i); wd2 = 16'($urandom); model2[i] = wd2; end
      else we2 = 0;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (chk)  begin checks++; if (rd  !== expd)  begin failures++; if (failures < 5) $display("ram read mismatch at %0d", i); end end
      if (chk2) begin checks++; if (rd2 !== expd2) begin failures++; if (failures < 5) $display("small ram mismatch at %0d", i); end end
      we = 1'($urandom % 2); re = ($urandom % 4) != 0;
      wa = 12'($urandom); ra = (i % 7 == 0) ? wa : 12'($urandom);
      wd = {9{$urandom}};
      we2 = 1'($urandom % 2); re2 = 1'($urandom % 2);
      wa2 = 3'($urandom); ra2 = 3'($urandom); wd2 = 16'($urandom);
      if (re)  expd  = model[ra];
      if (re2) expd2 = model2[ra2];
      // the held output is defined only after a port's first read
      chk = chk || re; chk2 = chk2 || re2;
      if (we)  model[wa]   = wd;
      if (we2) model2[wa2] = wd2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

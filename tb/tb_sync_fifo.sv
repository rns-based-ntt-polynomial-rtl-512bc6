// tb_sync_fifo: checks the fall-through FIFO against a queue model. Two
// instances: the default (288-bit, 16 deep) and a 12-bit, 5-deep one (depth
// not a power of two, so the pointer wrap is exercised). Each cycle a random
// push and/or pop is requested and suppressed when the FIFO is full/empty;
// count and the head word (rd_data) are compared with the model every
// cycle, and a reset in the middle of the run must empty both.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we1, re1, we2, re2;
  logic [287:0] wd1, rd1;
  logic [11:0]  wd2, rd2;
  logic [4:0]   c1;
  logic [2:0]   c2;
  logic [287:0] q1 [$];
  logic [11:0]  q2 [$];
  int n_full = 0, n_wrap = 0;

  always #5 clk = ~clk;

  sync_fifo dut1 (.clk(clk), .rst_n(rst_n), .wr_en(we1), .wr_data(wd1), .rd_en(re1),
                  .rd_data(rd1), .count(c1));
  sync_fifo #(.WIDTH(12), .DEPTH(5)) dut2 (.clk(clk), .rst_n(rst_n), .wr_en(we2), .wr_data(wd2),
                  .rd_en(re2), .rd_data(rd2), .count(c2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we1 = 0; re1 = 0; we2 = 0; re2 = 0; wd1 = '0; wd2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // compare state after the previous edge
      checks += 2;
      if (int'(c1) != q1.size() || (q1.size() > 0 && rd1 != q1[0])) begin
        failures++; if (failures < 5) $display("fifo1 mismatch at %0d", i);
      end
      if (int'(c2) != q2.size() || (q2.size() > 0 && rd2 != q2[0])) begin
        failures++; if (failures < 5) $display("fifo2 mismatch at %0d", i);
      end
      if (q1.size() == 16) n_full++;
      if (i == 3000) begin
        rst_n = 1'b0; we1 = 0; re1 = 0; we2 = 0; re2 = 0;
        @(negedge clk);
        rst_n = 1'b1;
        q1.delete(); q2.delete();
        checks++;
        if (c1 != 0 || c2 != 0) begin failures++; $display("reset did not empty"); end
        continue;
      end
      // bias towards filling in the first part of each 1000-cycle window
      we1 = ($urandom % 100) < ((i % 1000 < 500) ? 70 : 35) && q1.size() < 16;
      re1 = ($urandom % 100) < ((i % 1000 < 500) ? 35 : 70) && q1.size() > 0;
      we2 = ($urandom % 2) && q2.size() < 5;
      re2 = ($urandom % 2) && q2.size() > 0;
      wd1 = {9{$urandom}};
      wd2 = 12'($urandom);
      if (re1) void'(q1.pop_front());
      if (re2) void'(q2.pop_front());
      if (we1) q1.push_back(wd1);
      if (we2) q2.push_back(wd2);
      if (we2 && dut2.wp == 3'd4) n_wrap++;
    end
    checks += 2;
    if (n_full == 0) begin failures++; $display("FIFO never filled"); end
    if (n_wrap == 0) begin failures++; $display("pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

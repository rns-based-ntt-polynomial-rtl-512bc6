// tb_rns_hadamard: checks the Hadamard unit at its default size
// (N = 4096). Two model memories with a one-cycle read latency feed X and
// Y; the unit's writes go back to X. Values: X < 64M (results of a
// transform), Y < M (a table entry). After 'done' every X[i] must be the
// same integer in all channels, congruent to X[i]*Y[i]*D^-1 mod M, and
// written exactly once; the pass must take at most N + LAT_MONT + 4 cycles.
// Two passes run back to back (the second on the first one's results).
module tb_rns_hadamard;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  localparam int N = 4096;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done, rd_en, wr_en;
  logic [11:0] rd_addr, wr_addr;
  rns_t x_rdata, y_rdata, wr_data;
  rns_t xm [N];
  rns_t ym [N];
  int   nwr [N];
  logic [127:0] xv [N];
  logic [127:0] dinv;

  always #5 clk = ~clk;

  rns_hadamard dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
                    .rd_en(rd_en), .rd_addr(rd_addr), .x_rdata(x_rdata), .y_rdata(y_rdata),
                    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always @(posedge clk) begin
    if (rd_en) begin x_rdata <= xm[rd_addr]; y_rdata <= ym[rd_addr]; end
    if (wr_en) begin xm[wr_addr] <= wr_data; nwr[wr_addr]++; end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dinv = u_powm(128'(u_d1() % 256'(SYS_M)), SYS_M - 128'd2, SYS_M);
    for (int i = 0; i < N; i++) begin
      logic [255:0] x;
      x = (i == 0) ? 64 * SYS_M - 1 : {rnd128(), rnd128()} % (64 * SYS_M);
      xm[i] = to_rns(x);
      xv[i] = 128'(x % 256'(SYS_M));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      int cyc;
      for (int i = 0; i < N; i++) begin
        logic [127:0] y;
        y = (i == 1) ? SYS_M - 1 : rnd128() % SYS_M;
        ym[i] = to_rns(y);
        xv[i] = mm(mm(xv[i], y), dinv);
        nwr[i] = 0;
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc > N + LAT_MONT + 4) begin failures++; $display("pass took %0d cycles", cyc); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (nwr[i] != 1 || !rns_consistent(xm[i]) || 128'(from_rns1(xm[i]) % 256'(SYS_M)) != xv[i]) begin
          failures++; if (failures < 5) $display("pass %0d: X[%0d] wrong", pass, i);
        end
      end
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

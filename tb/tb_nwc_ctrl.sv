// tb_nwc_ctrl: checks the sequencer of the negative wrapped convolution.
// A model engine answers every 'go' with a one-cycle 'eng_done' after a
// random delay. For three runs the testbench checks that the steps appear
// in the order HAD_A_PHI, HAD_B_PHI, NTT_A, NTT_B, HAD_AB, INTT_A,
// HAD_NINV, HAD_PHIINV, REV, that each step gets exactly one 'go' (in its
// first cycle), that busy is high throughout, that 'done' pulses once after
// REV, and that 'eng_done' while idle and 'start' while busy are ignored.
module tb_nwc_ctrl;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, eng_done = 1'b0, go, busy, done;
  nwc_step_e step;
  nwc_step_e seen [$];
  int n_go = 0, n_done = 0;

  always #5 clk = ~clk;

  nwc_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .eng_done(eng_done),
                .step(step), .go(go), .busy(busy), .done(done));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model engine: one eng_done per go, after 1..20 cycles
  initial begin
    forever begin
      @(posedge clk);
      if (go) begin
        seen.push_back(step);
        n_go++;
        repeat ($urandom % 20) @(negedge clk);
        @(negedge clk);
        eng_done = 1'b1;
        // a start while busy must be ignored
        start = 1'b1;
        @(negedge clk);
        eng_done = 1'b0;
        start = 1'b0;
      end
    end
  end

  always @(posedge clk) if (done) n_done++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // eng_done while idle: nothing may happen
    eng_done = 1'b1;
    @(negedge clk);
    eng_done = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || step != ST_IDLE) begin failures++; $display("left idle without start"); end
    for (int run = 0; run < 3; run++) begin
      seen.delete();
      n_go = 0; n_done = 0;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) begin
        checks++;
        if (!busy) begin failures++; $display("busy dropped during run"); break; end
        @(negedge clk);
      end
      @(negedge clk);
      checks += 4;
      if (seen.size() != 9) begin failures++; $display("%0d steps instead of 9", seen.size()); end
      else for (int k = 0; k < 9; k++)
        if (seen[k] != nwc_step_e'(k + 1)) begin failures++; $display("step %0d out of order", k); break; end
      if (n_go != 9) begin failures++; $display("go count %0d", n_go); end
      if (n_done != 1) begin failures++; $display("done count %0d", n_done); end
      if (busy) begin failures++; $display("still busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

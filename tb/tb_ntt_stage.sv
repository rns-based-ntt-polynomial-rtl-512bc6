// tb_ntt_stage: checks one chained NTT stage at its default size (N = 4096,
// sample FIFO 2048) against a software model of the stage. Six passes run
// back to back with pair distances L = 2048, 1024, 16, 2, 1 and one pass
// with the stage disabled (wire-through). Input values are random below
// 16M; the twiddle table holds random values T (standing for w^e*D). For
// every block of 2L inputs x the model expects the L sums
// x[i] + x[i+L]*T*D^-1 followed by the L differences x[i] - x[i+L]*T*D^-1
// (mod M), with T = table[bitrev(block)]. The input has random valid gaps
// and the output random back-pressure (plus one long hold), so the credit
// logic must stall the input without losing data. The testbench counts
// compute, bypass and stall events and checks that each occurs.
module tb_ntt_stage;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  localparam int N = 4096;
  localparam int LOGN = 12;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, en = 1'b1;
  logic [LOGN-1:0] logl = '0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  rns_t in_data = '0, out_data, tw_data;
  logic [LOGN-2:0] tw_addr;
  rns_t tbl [N/2];
  logic [127:0] tblv [N/2];
  logic [255:0] xin [N];
  rns_t got [$];
  int sent = 0;
  longint n_comp = 0, n_byp = 0, n_stall = 0;
  logic [127:0] dinv;
  bit hold = 1'b0, active = 1'b0;

  always #5 clk = ~clk;

  ntt_stage dut (.clk(clk), .rst_n(rst_n), .start(start), .en(en), .logl(logl),
                 .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
                 .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
                 .tw_addr(tw_addr), .tw_data(tw_data),
                 .ev_compute(), .ev_bypass(), .ev_stall());

  assign tw_data = tbl[tw_addr];

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent++;
    if (out_valid && out_ready) got.push_back(out_data);
    n_comp  += dut.ev_compute;
    n_byp   += dut.ev_bypass;
    n_stall += dut.ev_stall;
  end

  always @(negedge clk) begin
    in_valid  <= active && (sent < N) && (($urandom % 10) < 8);
    in_data   <= (sent < N) ? to_rns(xin[sent]) : '0;
    out_ready <= !hold && (($urandom % 10) < 7);
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev(input int v, input int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic run_pass(input int ll, input bit enable);
    int l, mism;
    l = 1 << ll;
    for (int i = 0; i < N; i++) xin[i] = {rnd128(), rnd128()} % (16 * SYS_M);
    got.delete();
    @(negedge clk);
    en = enable; logl = LOGN'(ll);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sent = 0;
    active = 1'b1;
    if (ll == 10) begin
      // hold the output for a while in the middle of the pass
      repeat (600) @(negedge clk);
      hold = 1'b1;
      repeat (300) @(negedge clk);
      hold = 1'b0;
    end
    while (got.size() < N) @(negedge clk);
    active = 1'b0;
    repeat (30) @(negedge clk);
    checks++;
    if (got.size() != N) begin failures++; $display("L=%0d: %0d outputs", l, got.size()); end
    mism = 0;
    for (int k = 0; k < N; k++) begin
      logic [127:0] e;
      if (!enable) e = 128'(xin[k] % 256'(SYS_M));
      else begin
        int blk, pos, i;
        logic [127:0] b, wa;
        blk = k / (2 * l); pos = k % (2 * l); i = pos % l;
        b  = 128'(xin[blk * 2 * l + i] % 256'(SYS_M));
        wa = mm(mm(128'(xin[blk * 2 * l + i + l] % 256'(SYS_M)), tblv[bitrev(blk, LOGN - 1)]), dinv);
        e  = (pos < l) ? 128'((256'(b) + 256'(wa)) % 256'(SYS_M))
                       : 128'((256'(b) + 256'(SYS_M) - 256'(wa)) % 256'(SYS_M));
      end
      checks++;
      if (k >= got.size() || !rns_consistent(got[k]) || 128'(from_rns1(got[k]) % 256'(SYS_M)) != e) begin
        failures++; mism++;
        if (mism < 4) $display("L=%0d en=%0d: output %0d wrong", l, enable, k);
      end
    end
  endtask

  initial begin
    dinv = u_powm(128'(u_d1() % 256'(SYS_M)), SYS_M - 128'd2, SYS_M);
    for (int e = 0; e < N / 2; e++) begin
      tblv[e] = rnd128() % SYS_M;
      tbl[e]  = to_rns(tblv[e]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_pass(11, 1'b1);
    run_pass(10, 1'b1);
    run_pass(4, 1'b1);
    run_pass(1, 1'b1);
    run_pass(0, 1'b1);
    run_pass(3, 1'b0);
    $display("events: compute=%0d bypass=%0d stall=%0d", n_comp, n_byp, n_stall);
    checks += 3;
    if (n_comp != 5 * N / 2) begin failures++; $display("compute count %0d", n_comp); end
    // fills and difference outputs share one strobe and may coincide
    if (n_byp < 5 * N / 2 || n_byp > 5 * N) begin failures++; $display("bypass count %0d", n_byp); end
    if (n_stall == 0)        begin failures++; $display("input never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

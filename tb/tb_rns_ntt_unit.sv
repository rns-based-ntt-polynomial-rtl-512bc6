// tb_rns_ntt_unit: checks the NTT unit at its default size (N = 4096, four
// chained butterflies, three passes). The testbench loads the forward and
// inverse twiddle tables (w^e*D and w^-e*D mod M, w a primitive N-th root),
// fills a model polynomial memory (one-cycle read latency) with random
// coefficients below M, and runs
//   1. a forward transform: 48 sampled outputs X[k] must equal the direct
//      sum  sum_j x_j w^(jk)  mod M (natural order in memory);
//   2. an inverse transform of that result: every coefficient must equal
//      N*x_j mod M (the unit leaves the 1/N scaling to the Hadamard unit).
// Every stored word must hold one integer in all nine channels. It also
// checks the butterfly count (N/2*log2 N per transform), the pass count
// (three per transform), that no stage stalls, that bypass operations occur,
// and the cycle count against the chained-transform budget
// (per pass: N + sum of L + pipeline latency).
module tb_rns_ntt_unit;
  import rns_pkg::*;
  `include "tb_rns_util.svh"
  localparam int N = 4096, LOGN = 12, NBF = 4, NPASS = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, inverse = 1'b0, busy, done;
  logic mem_re, mem_we;
  logic [LOGN-1:0] mem_raddr, mem_waddr;
  rns_t mem_rdata, mem_wdata;
  logic tw_we = 1'b0, tw_inv = 1'b0;
  logic [LOGN-2:0] tw_waddr = '0;
  rns_t tw_wdata = '0;
  logic [NBF-1:0] ev_c, ev_b, ev_s;
  logic ev_pe;
  rns_t mem [N];
  logic [127:0] x [N];
  longint n_comp = 0, n_byp = 0, n_stall = 0, n_pass = 0;

  always #5 clk = ~clk;

  rns_ntt_unit dut (.clk(clk), .rst_n(rst_n), .start(start), .inverse(inverse),
                    .busy(busy), .done(done),
                    .mem_re(mem_re), .mem_raddr(mem_raddr), .mem_rdata(mem_rdata),
                    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata),
                    .tw_we(tw_we), .tw_inv(tw_inv), .tw_waddr(tw_waddr), .tw_wdata(tw_wdata),
                    .ev_compute(ev_c), .ev_bypass(ev_b), .ev_stall(ev_s), .ev_pass_end(ev_pe));

  always @(posedge clk) begin
    if (mem_re) mem_rdata <= mem[mem_raddr];
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (rst_n) begin
      n_comp  += $countones(ev_c);
      n_byp   += $countones(ev_b);
      n_stall += $countones(ev_s);
      n_pass  += ev_pe;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint budget();
    longint t;
    t = 0;
    for (int p = 0; p < NPASS; p++) begin
      t += N + 16;
      for (int s = 0; s < NBF; s++)
        if (p * NBF + s < LOGN) t += (N >> (p * NBF + s + 1)) + LAT_BF + 4;
    end
    return t;
  endfunction

  task automatic run(input bit inv);
    int cyc;
    @(negedge clk);
    inverse = inv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("%s transform: %0d cycles (budget %0d)", inv ? "inverse" : "forward", cyc, budget());
    checks++;
    if (cyc > budget()) begin failures++; $display("above cycle budget"); end
  endtask

  initial begin
    logic [127:0] w, winv, dd, t;
    dd   = 128'(u_d1() % 256'(SYS_M));
    w    = u_powm(PSI8192, 128'(2 * 8192 / (2 * N)), SYS_M);
    winv = u_powm(w, 128'(N - 1), SYS_M);
    checks++;
    if (u_powm(w, 128'(N / 2), SYS_M) != SYS_M - 1) begin failures++; $display("w is not a primitive root"); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      t = dd;
      for (int e = 0; e < N / 2; e++) begin
        @(negedge clk);
        tw_we = 1'b1; tw_inv = s[0]; tw_waddr = (LOGN-1)'(e); tw_wdata = to_rns(t);
        t = mm(t, s ? winv : w);
      end
    end
    @(negedge clk);
    tw_we = 1'b0;
    for (int j = 0; j < N; j++) begin
      x[j] = (j == 0) ? SYS_M - 1 : rnd128() % SYS_M;
      mem[j] = to_rns(x[j]);
    end

    run(1'b0);
    for (int s = 0; s < 48; s++) begin
      int k;
      logic [127:0] acc, wk, p;
      k = (s < 2) ? s * (N - 1) : (s * 331 + 7) % N;
      wk = u_powm(w, 128'(k), SYS_M);
      acc = 0; p = 1;
      for (int j = 0; j < N; j++) begin
        acc = 128'((256'(acc) + 256'(mm(x[j], p))) % 256'(SYS_M));
        p = mm(p, wk);
      end
      checks++;
      if (!rns_consistent(mem[k]) || 128'(from_rns1(mem[k]) % 256'(SYS_M)) != acc) begin
        failures++; if (failures < 5) $display("forward X[%0d] wrong", k);
      end
    end

    run(1'b1);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (!rns_consistent(mem[j]) || 128'(from_rns1(mem[j]) % 256'(SYS_M)) != mm(x[j], 128'(N))) begin
        failures++; if (failures < 5) $display("round trip x[%0d] wrong", j);
      end
    end

    $display("events: compute=%0d bypass=%0d stall=%0d passes=%0d", n_comp, n_byp, n_stall, n_pass);
    checks += 4;
    if (n_comp != 2 * (N / 2) * LOGN) begin failures++; $display("butterfly count"); end
    if (n_pass != 2 * NPASS)          begin failures++; $display("pass count"); end
    if (n_stall != 0)                 begin failures++; $display("a stage stalled"); end
    if (n_byp == 0)                   begin failures++; $display("no bypass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

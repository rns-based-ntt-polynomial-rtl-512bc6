// Shared body of the end-to-end testbenches of rns_polymul_top. The including
// module defines localparams N (points), NCHECK (coefficients compared with
// the schoolbook reference) and WDOG (cycles of its own watchdog), and
// instantiates 'dut' with the signals declared below. It also defines
// EMBED and QS: with
// EMBED = 1 the operands are random below M; with EMBED = E > 1 they are
// small-ring polynomials of N/E coefficients below the modulus QS, placed at
// every E-th position (a(x) -> a(x^E)), and the checked coefficients are
// additionally lifted to signed integers and compared mod QS with a direct
// negacyclic product in the small ring; all other coefficients must be 0.
//
// The testbench plays the part of the host: it computes the roots of unity
// from the package's primitive 8192-th root, builds the twiddle, phi and
// n^-1 tables (each value times the needed power of D, mod M, split into
// residues), loads them, loads two random polynomials, runs the multiplier
// and compares the result with a negacyclic schoolbook product mod M
// computed here with wide integer arithmetic.

  import rns_pkg::*;

  localparam int AW = $clog2(N);

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         coef_we = 1'b0, coef_sel = 1'b0;
  logic [AW-1:0] coef_addr = '0, tbl_addr = '0, res_addr = '0;
  coef_t        coef_wdata = '0;
  logic         tbl_we = 1'b0;
  tbl_e         tbl_sel = TBL_TW_FWD;
  rns_t         tbl_wdata = '0;
  logic         start = 1'b0, busy, done, res_re = 1'b0;
  coef_t        res_rdata;

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [127:0] mm(input logic [127:0] a, input logic [127:0] b);
    logic [255:0] p;
    p = 256'(a) * 256'(b);
    return 128'(p % 256'(SYS_M));
  endfunction
  function automatic logic [127:0] mpow(input logic [127:0] a, input int e);
    logic [127:0] r, x;
    r = 128'd1; x = a;
    for (int i = 0; i < 32; i++) begin
      if (e[i]) r = mm(r, x);
      x = mm(x, x);
    end
    return r;
  endfunction
  function automatic rns_t to_rns(input logic [127:0] x);
    rns_t r;
    for (int c = 0; c < NCH; c++) r[c] = 32'(x % 128'(MODS[c]));
    return r;
  endfunction

  // Cycle budget of one transform: per pass N streamed values plus, per
  // active stage, its fill of L values and the butterfly latency (the
  // n + sum of L count of a chained transform, plus pipeline overhead).
  function automatic longint ntt_budget();
    longint t;
    t = 0;
    for (int p = 0; p < NPASS_T; p++) begin
      t += N + 16;
      for (int s = 0; s < NBF_T; s++) begin
        int gs, l;
        gs = p * NBF_T + s;
        if (gs < LOGN_T) begin
          l = N >> (gs + 1);
          t += l + LAT_BF + 4;
        end
      end
    end
    return t;
  endfunction

  task automatic load_tbl(input tbl_e sel, input int addr, input logic [127:0] v);
    @(negedge clk);
    tbl_we = 1'b1; tbl_sel = sel; tbl_addr = AW'(addr); tbl_wdata = to_rns(v);
    @(negedge clk);
    tbl_we = 1'b0;
  endtask

  logic [127:0] a [N];
  logic [127:0] b [N];
  logic [127:0] ref_c;
  // mechanism counters
  longint n_comp = 0, n_byp = 0, n_stall = 0, n_pass = 0, n_wire = 0, n_ntt = 0, n_intt = 0;
  longint t_start, t_end;
  int n_embed_pos = 0, n_embed_gap = 0;

  always @(posedge clk) if (rst_n) begin
    n_comp  += $countones(dut.ev_c);
    n_byp   += $countones(dut.ev_b);
    n_stall += $countones(dut.ev_s);
    if (dut.ev_pe) n_pass++;
    if (dut.u_ntt.busy && !dut.u_ntt.g_st[NBF_T-1].en) n_wire++;
    if (dut.ntt_start && (dut.step == ST_NTT_A || dut.step == ST_NTT_B)) n_ntt++;
    if (dut.ntt_start && dut.step == ST_INTT_A) n_intt++;
  end

  initial begin
    logic [127:0] phi, w, dd, d2, ninv, x;
    dd   = f_dyn_range() % SYS_M;
    d2   = mm(dd, dd);
    phi  = mpow(PSI8192, 8192 / (2 * N));
    w    = mm(phi, phi);
    ninv = SYS_M - (SYS_M - 128'd1) / 128'(N);
    if (mm(ninv, 128'(N)) != 128'd1) $display("bad n^-1");
    if (mpow(phi, N) != SYS_M - 1) $display("phi is not a 2N-th root");

    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // tables: twiddles w^e*D, w^-e*D; phi^i*D, phi^-i*D; n^-1*D^2
    x = dd;
    for (int e = 0; e < N / 2; e++) begin load_tbl(TBL_TW_FWD, e, x); x = mm(x, w); end
    x = dd;
    for (int e = 0; e < N / 2; e++) begin load_tbl(TBL_TW_INV, e, x); x = mm(x, mpow(w, N - 1)); end
    x = dd;
    for (int i = 0; i < N; i++) begin load_tbl(TBL_PHI, i, x); x = mm(x, phi); end
    x = dd;
    for (int i = 0; i < N; i++) begin load_tbl(TBL_PHIINV, i, x); x = mm(x, mpow(phi, 2 * N - 1)); end
    load_tbl(TBL_NINV, 0, mm(ninv, d2));

    // operands; coefficient 0 of A is M-1 to exercise the largest value
    for (int i = 0; i < N; i++) begin
      if (EMBED == 1) begin
        a[i] = {$urandom, $urandom, $urandom, $urandom} % SYS_M;
        b[i] = {$urandom, $urandom, $urandom, $urandom} % SYS_M;
      end else if (i % EMBED == 0) begin
        a[i] = 128'($urandom % QS);
        b[i] = 128'($urandom % QS);
      end else begin
        a[i] = '0;
        b[i] = '0;
      end
    end
    if (EMBED == 1) a[0] = SYS_M - 1;
    else begin a[0] = 128'(QS - 1); b[N-EMBED] = 128'(QS - 1); end
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        coef_we = 1'b1; coef_sel = s[0]; coef_addr = AW'(i);
        coef_wdata = (s == 0) ? a[i] : b[i];
      end
    @(negedge clk);
    coef_we = 1'b0;
    repeat (4) @(negedge clk);

    // check the forward conversion of one coefficient of each bank
    checks++;
    if (dut.u_bank_a.mem[1] != to_rns(a[1]) || dut.u_bank_b.mem[N-1] != to_rns(b[N-1])) begin
      failures++; $display("forward conversion mismatch");
    end

    start = 1'b1;
    t_start = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t_end = cycle;
    $display("multiplication took %0d cycles (N=%0d)", t_end - t_start, N);

    // compare NCHECK coefficients with the schoolbook negacyclic product
    for (int k0 = 0; k0 < NCHECK; k0++) begin
      int k;
      logic [127:0] acc;
      k = (NCHECK == N) ? k0 : (k0 * 97 + 3) % N;
      // in the embedded case check the small-ring positions and one gap each
      if (EMBED > 1) k = (k0 % 2 == 0) ? EMBED * ((k0 * 97 + 3) % (N / EMBED)) : EMBED * k0 + 1;
      acc = '0;
      for (int i = 0; i < N; i++) begin
        int j;
        logic [127:0] p;
        j = k - i;
        if (j >= 0) begin
          p = mm(a[i], b[j]);
          acc = (acc + p) % SYS_M;
        end else begin
          p = mm(a[i], b[j + N]);
          acc = (acc + SYS_M - p) % SYS_M;
        end
      end
      @(negedge clk);
      res_re = 1'b1; res_addr = AW'(k);
      @(negedge clk);
      res_re = 1'b0;
      checks++;
      if (res_rdata != acc) begin
        failures++;
        if (failures < 6) $display("c[%0d] = %h, expected %h", k, res_rdata, acc);
      end
      if (EMBED > 1) begin
        longint unsigned sref, sgot;
        int n_s, j;
        n_s = N / EMBED;
        j = k / EMBED;
        checks++;
        if (k % EMBED != 0) begin
          if (res_rdata != '0) begin failures++; $display("gap coefficient %0d not zero", k); end
          n_embed_gap++;
        end else begin
          // direct negacyclic product mod QS in the small ring
          sref = 0;
          for (int i = 0; i < n_s; i++) begin
            longint unsigned p;
            int l;
            l = j - i;
            if (l >= 0) p = (64'(a[EMBED*i]) * 64'(b[EMBED*l])) % QS;
            else        p = (64'(a[EMBED*i]) * 64'(b[EMBED*(l+n_s)])) % QS;
            sref = (l >= 0) ? (sref + p) % QS : (sref + QS - p) % QS;
          end
          // lift the result mod M to (-M/2, M/2), then reduce mod QS
          if (res_rdata > (SYS_M >> 1)) sgot = 64'((128'(QS) - ((SYS_M - res_rdata) % 128'(QS))) % 128'(QS));
          else                          sgot = 64'(res_rdata % 128'(QS));
          if (sgot != sref) begin failures++; $display("small-ring c[%0d] = %0d, expected %0d", j, sgot, sref); end
          n_embed_pos++;
        end
      end
    end
    if (EMBED > 1) begin
      checks++;
      if (n_embed_gap == 0 || n_embed_pos == 0) begin failures++; $display("embedded checks missing"); end
      $display("small-ring coefficients checked: %0d, gap coefficients: %0d", n_embed_pos, n_embed_gap);
    end

    // cycle budget: 3 transforms, 5 Hadamard passes, conversion
    checks++;
    if (t_end - t_start > 3 * ntt_budget() + 6 * longint'(N + 40)) begin
      failures++; $display("cycle count above budget");
    end

    $display("events: compute=%0d bypass=%0d stall=%0d passes=%0d wire=%0d ntt=%0d intt=%0d",
             n_comp, n_byp, n_stall, n_pass, n_wire, n_ntt, n_intt);
    // each transform does N/2*log2(N) butterflies
    checks++;
    if (n_comp != longint'(3 * (N / 2) * LOGN_T)) begin
      failures++; $display("butterfly count %0d, expected %0d", n_comp, 3 * (N / 2) * LOGN_T);
    end
    checks++; if (n_byp   == 0) begin failures++; $display("no bypass operation"); end
    checks++; if (n_pass  != 3 * NPASS_T) begin failures++; $display("pass count"); end
    checks++; if (n_ntt != 2 || n_intt != 1) begin failures++; $display("transform count"); end
    // a stage never waits for its own feedback: one butterfly per cycle
    checks++; if (n_stall != 0) begin failures++; $display("stage stalled %0d times", n_stall); end
    if (EXPECT_WIRE)  begin checks++; if (n_wire  == 0) begin failures++; $display("no wire-through stage"); end end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

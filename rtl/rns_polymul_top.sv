// rns_polymul_top: RNS-based NTT polynomial multiplier,
//   C = A * B mod (x^N + 1, M),
// by negative wrapped convolution on a residue number system.
//
// Data flow:
//   * the host writes the binary coefficients of A and B (coef_* port); the
//     forward converter turns each into 9 residues (base 1, base 2, m_r) and
//     stores it in bank A or bank B, one coefficient per cycle;
//   * the host loads the precomputed tables (tbl_* port): forward and
//     inverse NTT twiddles (w^e * D mod M, e < N/2), phi^i * D and
//     phi^-i * D (phi^2 = w), and the constant n^-1 * D^2 (all mod M, in RNS);
//   * 'start' runs the sequence of nwc_ctrl: two Hadamard twists, two
//     NTTs, the Hadamard product of the transforms, one INTT, the 1/n and
//     phi^-i Hadamard scalings, and the reverse conversion into the result
//     memory, which the host reads through res_* (one-cycle read latency).
// One NTT unit (four chained RNS butterflies), one Hadamard unit (an RNS
// Montgomery multiplier) and one conversion unit serve all steps, as in the
// document's full design. Every product inside is a Montgomery product that
// contributes a factor D^-1; the tables carry the compensating factors, and
// the n^-1 constant carries D^2 to undo the D^-1 of the A*B product.
// 'busy' is high from 'start' to the 'done' pulse; loads are accepted only
// while idle.
module rns_polymul_top
  import rns_pkg::*;
#(
  parameter int          N    = 4096,
  parameter int          NBF  = 4,
  parameter logic [127:0] SYSM = rns_pkg::SYS_M
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // binary coefficient load
  input  logic                 coef_we,
  input  logic                 coef_sel,      // 0: A, 1: B
  input  logic [$clog2(N)-1:0] coef_addr,
  input  coef_t                coef_wdata,
  // table load
  input  logic                 tbl_we,
  input  tbl_e                 tbl_sel,
  input  logic [$clog2(N)-1:0] tbl_addr,
  input  rns_t                 tbl_wdata,
  // control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // result read
  input  logic                 res_re,
  input  logic [$clog2(N)-1:0] res_addr,
  output coef_t                res_rdata
);
  localparam int AW = $clog2(N);

  nwc_step_e step;
  logic      go, eng_done;

  // ---------------- forward conversion at load time ------------------------
  logic          fc_valid;
  logic [AW:0]   fc_tag;
  rns_t          fc_r;
  rns_fwd_conv #(.TW(AW+1)) u_fwd (
    .clk(clk), .rst_n(rst_n),
    .i_valid(coef_we && !busy), .i_tag({coef_sel, coef_addr}), .i_x(coef_wdata),
    .o_valid(fc_valid), .o_tag(fc_tag), .o_r(fc_r));

  // ---------------- engines -------------------------------------------------------
  logic          had_start, had_busy, had_done, had_re, had_we;
  logic [AW-1:0] had_raddr, had_waddr;
  rns_t          had_x, had_y, had_wdata;

  logic          ntt_start, ntt_busy, ntt_done, ntt_re, ntt_we;
  logic [AW-1:0] ntt_raddr, ntt_waddr;
  rns_t          ntt_rdata, ntt_wdata;
  logic [NBF-1:0] ev_c, ev_b, ev_s;
  logic          ev_pe;

  logic          rev_run, rev_re, rev_v, rev_ov, rev_done;
  logic [AW:0]   rev_cnt, rev_wcnt;
  logic [AW-1:0] rev_tag, rev_otag;
  coef_t         rev_x;

  logic is_had, is_ntt, is_rev, had_on_b;
  always_comb begin
    is_had   = step inside {ST_HAD_A_PHI, ST_HAD_B_PHI, ST_HAD_AB, ST_HAD_NINV, ST_HAD_PHIINV};
    is_ntt   = step inside {ST_NTT_A, ST_NTT_B, ST_INTT_A};
    is_rev   = step == ST_REV;
    had_on_b = step == ST_HAD_B_PHI;
  end

  assign had_start = go && is_had;
  assign ntt_start = go && is_ntt;
  assign eng_done  = is_had ? had_done : is_ntt ? ntt_done : is_rev ? rev_done : 1'b0;

  nwc_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start && !busy), .eng_done(eng_done),
    .step(step), .go(go), .busy(busy), .done(done));

  rns_hadamard #(.N(N), .SYSM(SYSM)) u_had (
    .clk(clk), .rst_n(rst_n), .start(had_start), .busy(had_busy), .done(had_done),
    .rd_en(had_re), .rd_addr(had_raddr), .x_rdata(had_x), .y_rdata(had_y),
    .wr_en(had_we), .wr_addr(had_waddr), .wr_data(had_wdata));

  rns_ntt_unit #(.N(N), .NBF(NBF), .SYSM(SYSM)) u_ntt (
    .clk(clk), .rst_n(rst_n), .start(ntt_start), .inverse(step == ST_INTT_A),
    .busy(ntt_busy), .done(ntt_done),
    .mem_re(ntt_re), .mem_raddr(ntt_raddr), .mem_rdata(ntt_rdata),
    .mem_we(ntt_we), .mem_waddr(ntt_waddr), .mem_wdata(ntt_wdata),
    .tw_we(tbl_we && !busy && (tbl_sel == TBL_TW_FWD || tbl_sel == TBL_TW_INV)),
    .tw_inv(tbl_sel == TBL_TW_INV), .tw_waddr(tbl_addr[AW-2:0]), .tw_wdata(tbl_wdata),
    .ev_compute(ev_c), .ev_bypass(ev_b), .ev_stall(ev_s), .ev_pass_end(ev_pe));

  // ---------------- polynomial banks and tables ------------------------------
  logic          a_we, a_re, b_we, b_re;
  logic [AW-1:0] a_waddr, a_raddr, b_waddr, b_raddr;
  rns_t          a_wdata, b_wdata, a_rdata, b_rdata, phi_rdata, phiinv_rdata, ninv_q;

  always_comb begin
    // bank A
    a_we = 1'b0; a_waddr = '0; a_wdata = '0; a_re = 1'b0; a_raddr = '0;
    if (!busy) begin
      a_we = fc_valid && !fc_tag[AW]; a_waddr = fc_tag[AW-1:0]; a_wdata = fc_r;
    end else if (is_had && !had_on_b) begin
      a_we = had_we; a_waddr = had_waddr; a_wdata = had_wdata;
    end else if (step == ST_NTT_A || step == ST_INTT_A) begin
      a_we = ntt_we; a_waddr = ntt_waddr; a_wdata = ntt_wdata;
    end
    if (is_had) begin
      a_re = had_re; a_raddr = had_raddr;
    end else if (step == ST_NTT_A || step == ST_INTT_A) begin
      a_re = ntt_re; a_raddr = ntt_raddr;
    end else if (is_rev) begin
      a_re = rev_re; a_raddr = rev_cnt[AW-1:0];
    end
    // bank B
    b_we = 1'b0; b_waddr = '0; b_wdata = '0; b_re = 1'b0; b_raddr = '0;
    if (!busy) begin
      b_we = fc_valid && fc_tag[AW]; b_waddr = fc_tag[AW-1:0]; b_wdata = fc_r;
    end else if (had_on_b) begin
      b_we = had_we; b_waddr = had_waddr; b_wdata = had_wdata;
    end else if (step == ST_NTT_B) begin
      b_we = ntt_we; b_waddr = ntt_waddr; b_wdata = ntt_wdata;
    end
    if (is_had) begin
      b_re = had_re; b_raddr = had_raddr;
    end else if (step == ST_NTT_B) begin
      b_re = ntt_re; b_raddr = ntt_raddr;
    end
  end

  dp_ram #(.WIDTH($bits(rns_t)), .DEPTH(N)) u_bank_a (
    .clk(clk), .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
    .re(a_re), .raddr(a_raddr), .rdata(a_rdata));
  dp_ram #(.WIDTH($bits(rns_t)), .DEPTH(N)) u_bank_b (
    .clk(clk), .we(b_we), .waddr(b_waddr), .wdata(b_wdata),
    .re(b_re), .raddr(b_raddr), .rdata(b_rdata));
  dp_ram #(.WIDTH($bits(rns_t)), .DEPTH(N)) u_phi (
    .clk(clk), .we(tbl_we && !busy && tbl_sel == TBL_PHI), .waddr(tbl_addr), .wdata(tbl_wdata),
    .re(had_re), .raddr(had_raddr), .rdata(phi_rdata));
  dp_ram #(.WIDTH($bits(rns_t)), .DEPTH(N)) u_phiinv (
    .clk(clk), .we(tbl_we && !busy && tbl_sel == TBL_PHIINV), .waddr(tbl_addr), .wdata(tbl_wdata),
    .re(had_re), .raddr(had_raddr), .rdata(phiinv_rdata));

  always_ff @(posedge clk)
    if (tbl_we && !busy && tbl_sel == TBL_NINV) ninv_q <= tbl_wdata;

  assign ntt_rdata = (step == ST_NTT_B) ? b_rdata : a_rdata;
  assign had_x     = had_on_b ? b_rdata : a_rdata;
  always_comb begin
    case (step)
      ST_HAD_A_PHI, ST_HAD_B_PHI: had_y = phi_rdata;
      ST_HAD_AB:                  had_y = b_rdata;
      ST_HAD_NINV:                had_y = ninv_q;
      default:                    had_y = phiinv_rdata;
    endcase
  end

  // ---------------- reverse conversion into the result memory ---------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rev_run  <= 1'b0;
      rev_cnt  <= '0;
      rev_v    <= 1'b0;
      rev_wcnt <= '0;
      rev_done <= 1'b0;
    end else begin
      rev_v    <= rev_re;
      rev_tag  <= rev_cnt[AW-1:0];
      rev_done <= 1'b0;
      if (go && is_rev) begin
        rev_run  <= 1'b1;
        rev_cnt  <= '0;
        rev_wcnt <= '0;
      end else begin
        if (rev_re) begin
          rev_cnt <= rev_cnt + 1'b1;
          if (rev_cnt == (AW+1)'(N - 1)) rev_run <= 1'b0;
        end
        if (rev_ov) begin
          rev_wcnt <= rev_wcnt + 1'b1;
          if (rev_wcnt == (AW+1)'(N - 1)) rev_done <= 1'b1;
        end
      end
    end
  end
  assign rev_re = rev_run;

  rns_rev_conv #(.TW(AW), .SYSM(SYSM)) u_rev (
    .clk(clk), .rst_n(rst_n), .i_valid(rev_v), .i_tag(rev_tag), .i_r(a_rdata),
    .o_valid(rev_ov), .o_tag(rev_otag), .o_x(rev_x));

  dp_ram #(.WIDTH(WCOEF), .DEPTH(N)) u_res (
    .clk(clk), .we(rev_ov), .waddr(rev_otag), .wdata(rev_x),
    .re(res_re), .raddr(res_addr), .rdata(res_rdata));

  // the sequencer runs one engine at a time
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_n) !(had_busy && ntt_busy));
endmodule

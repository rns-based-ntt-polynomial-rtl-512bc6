// rns_ntt_unit: RNS NTT / INTT unit with NBF chained butterflies.
//
// The unit transforms the N-point polynomial held in an external RNS bank
// (the polynomial memory) in place. NBF ntt_stage blocks are chained; their
// sample FIFOs hold N/2, N/4, ... entries (each stage also has a difference
// FIFO of the same size plus 32, see ntt_stage). One pass streams N values
// through the chain and performs NBF consecutive NTT stages; with
// log2(N) > NBF stages, further passes are run. A pass reads either the
// polynomial memory (first pass) or the intermediate BUFFER (N words); its
// output goes to the BUFFER, except in the last pass, where it is written
// back to the polynomial memory at bit-reversed addresses, so the bank holds
// the transform in natural order. Stages left over in the last pass are
// switched to wires. If the whole transform fits one pass, a second,
// all-wire pass copies the BUFFER back, so the bank is never overwritten
// before it has been read.
// The butterfly uses w^e * D mod M from the twiddle bank (N/2 entries for
// the forward table, N/2 for the inverse table, chosen by 'inverse'); the
// bank is written through the tw_* port before use. INTT = the same flow
// with the inverse table; the 1/N scaling is left to the Hadamard unit.
// Passes run one after the other: the next pass starts when the last value
// of the previous one has been written (the document overlaps passes with a
// smaller buffer; that refinement is not built).
// Memory port timing: mem_rdata is valid the cycle after mem_re.
// Timing: a pass takes about N cycles plus the fill (sum of L) and latency
// of its active stages; N = 4096 needs three passes, 16,624 cycles in all.
// Follows the document: four chained stages, FIFO sizes, N-word BUFFER,
// twiddle bank, multi-pass reuse. Own choices: addressing, bit-reversed
// write-back, handshakes, no pass overlap.
module rns_ntt_unit
  import rns_pkg::*;
#(
  parameter int          N    = 4096,
  parameter int          NBF  = 4,
  parameter logic [127:0] SYSM = rns_pkg::SYS_M
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 inverse,
  output logic                 busy,
  output logic                 done,
  // polynomial memory
  output logic                 mem_re,
  output logic [$clog2(N)-1:0] mem_raddr,
  input  rns_t                 mem_rdata,
  output logic                 mem_we,
  output logic [$clog2(N)-1:0] mem_waddr,
  output rns_t                 mem_wdata,
  // twiddle bank load
  input  logic                 tw_we,
  input  logic                 tw_inv,
  input  logic [$clog2(N)-2:0] tw_waddr,
  input  rns_t                 tw_wdata,
  // observation
  output logic [NBF-1:0]       ev_compute,
  output logic [NBF-1:0]       ev_bypass,
  output logic [NBF-1:0]       ev_stall,
  output logic                 ev_pass_end
);
  localparam int LOGN  = $clog2(N);
  localparam int NPASS = ((LOGN + NBF - 1) / NBF < 2) ? 2 : (LOGN + NBF - 1) / NBF;
  localparam int PW    = $clog2(NPASS + 1);
  localparam int AW    = LOGN;
  localparam int RQD   = 4;

  // ---------------- twiddle bank (forward and inverse tables) -------------
  rns_t tw_fwd [N/2];
  rns_t tw_inv_t [N/2];
  logic inv_q;
  always_ff @(posedge clk) begin
    if (tw_we && !tw_inv) tw_fwd[tw_waddr]   <= tw_wdata;
    if (tw_we &&  tw_inv) tw_inv_t[tw_waddr] <= tw_wdata;
  end

  // ---------------- pass control -------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN} st_e;
  st_e          st;
  logic [PW-1:0] pass;
  logic [AW:0]   rd_cnt, wr_cnt;
  logic          rd_pending;
  logic          pass_start, last_pass, first_pass, pass_end;

  assign first_pass = (pass == '0);
  assign last_pass  = (32'(pass) == NPASS - 1);
  assign pass_start = (st == S_START);
  assign pass_end   = (st == S_RUN) && (wr_cnt == (AW+1)'(N));
  assign ev_pass_end = pass_end;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      pass  <= '0;
      inv_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE:  if (start) begin st <= S_START; pass <= '0; inv_q <= inverse; end
        S_START: st <= S_RUN;
        S_RUN:   if (pass_end) begin
                   if (last_pass) begin st <= S_IDLE; done <= 1'b1; end
                   else begin st <= S_START; pass <= pass + PW'(1); end
                 end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign busy = (st != S_IDLE);

  // ---------------- source: polynomial memory or buffer ---------------------
  rns_t           buf_rdata, src_data;
  logic [2:0]     rq_count;
  logic           rq_pop;
  rns_t           rq_head;
  logic           rd_issue;

  assign rd_issue = (st == S_RUN) && (rd_cnt < (AW+1)'(N))
                 && (32'(rq_count) + 32'(rd_pending)) < RQD;

  always_ff @(posedge clk) begin
    if (!rst_n || pass_start) begin
      rd_cnt     <= '0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= rd_issue;
      if (rd_issue) rd_cnt <= rd_cnt + 1'b1;
    end
  end

  logic src_is_mem;
  assign src_is_mem = first_pass;
  assign mem_re     = rd_issue && src_is_mem;
  assign mem_raddr  = rd_cnt[AW-1:0];
  assign src_data   = src_is_mem ? mem_rdata : buf_rdata;   // MUX

  sync_fifo #(.WIDTH($bits(rns_t)), .DEPTH(RQD)) u_rq (
    .clk(clk), .rst_n(rst_n && !pass_start),
    .wr_en(rd_pending), .wr_data(src_data),
    .rd_en(rq_pop), .rd_data(rq_head), .count(rq_count));

  // ---------------- butterfly chain --------------------------------------------
  logic [NBF:0] v, r;
  rns_t         d [NBF+1];
  assign v[0]   = rq_count != '0;
  assign d[0]   = rq_head;
  assign rq_pop = v[0] && r[0];

  for (genvar s = 0; s < NBF; s++) begin : g_st
    localparam int FD = (N >> (s + 1)) > 0 ? (N >> (s + 1)) : 1;
    int                  gs;
    logic                en;
    logic [LOGN-1:0]     logl;
    logic [LOGN-2:0]     twa;
    rns_t                twd;
    assign gs   = 32'(pass) * NBF + s;
    assign en   = gs < LOGN;
    assign logl = en ? LOGN'(LOGN - 1 - gs) : '0;
    assign twd  = inv_q ? tw_inv_t[twa] : tw_fwd[twa];

    ntt_stage #(.N(N), .FDEPTH(FD), .SYSM(SYSM)) u_stage (
      .clk(clk), .rst_n(rst_n), .start(pass_start), .en(en), .logl(logl),
      .in_valid(v[s]), .in_ready(r[s]), .in_data(d[s]),
      .out_valid(v[s+1]), .out_ready(r[s+1]), .out_data(d[s+1]),
      .tw_addr(twa), .tw_data(twd),
      .ev_compute(ev_compute[s]), .ev_bypass(ev_bypass[s]), .ev_stall(ev_stall[s]));
  end

  // ---------------- sink: buffer or polynomial memory (DMUX) -------------------
  logic [AW-1:0] brv;
  always_comb
    for (int i = 0; i < AW; i++) brv[AW-1-i] = wr_cnt[i];

  assign r[NBF] = (st == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n || pass_start) wr_cnt <= '0;
    else if (v[NBF] && r[NBF]) wr_cnt <= wr_cnt + 1'b1;
  end

  assign mem_we    = v[NBF] && r[NBF] && last_pass;
  assign mem_waddr = brv;
  assign mem_wdata = d[NBF];

  dp_ram #(.WIDTH($bits(rns_t)), .DEPTH(N)) u_buffer (
    .clk(clk),
    .we(v[NBF] && r[NBF] && !last_pass), .waddr(wr_cnt[AW-1:0]), .wdata(d[NBF]),
    .re(rd_issue && !src_is_mem), .raddr(rd_cnt[AW-1:0]), .rdata(buf_rdata));
endmodule

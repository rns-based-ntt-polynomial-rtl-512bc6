// ntt_stage: one stage of the chained (single-path feedback) RNS NTT: an
// rns_butterfly, its feedback storage and the fill / compute / output
// sequencing.
//
// For a stage whose butterflies pair samples L apart (L = 2^logl), the
// input stream is cut into blocks of 2L samples:
//   first L samples   fill: the sample is stored in the sample FIFO;
//   next  L samples   compute: the FIFO head x[i] is B, the incoming
//                     x[i+L] is A; Y = x[i] + w*x[i+L] goes to the sum
//                     queue, Z = x[i] - w*x[i+L] to the difference FIFO.
// The output sequencer emits, for every block, its L sums and then its L
// differences, which is the order the next stage (pair distance L/2) needs.
// The twiddle of block b is w^bitrev(b) (bit reversal over log2(N)-1 bits),
// so a chain of log2(N) stages maps a natural-order input to the transform
// in bit-reversed order (Cooley-Tukey butterflies, pair distance N/2 first).
//
// The document's stage keeps one FIFO of L words and passes the filling
// samples and the outgoing differences through the butterfly in bypass
// mode. With a pipelined butterfly (LAT_BF cycles) that schedule stalls
// whenever L is below the latency. This design instead moves samples that
// need no arithmetic on a direct path and gives the differences a FIFO of
// their own, so the stage takes one sample per cycle for every L; the price
// is a second FIFO (depth FDEPTH + QD). The butterfly's bypass mode is
// therefore not used here (i_byp is tied low).
//
// Interface: valid/ready streams in and out. 'start' clears the counters
// before a pass; with en = 0 the stage is a wire from input to output (used
// when fewer than four stages remain in the last pass). The compute issue
// waits only for output space (credit counting over the butterfly
// pipeline), so the input is stalled only by back-pressure.
module ntt_stage
  import rns_pkg::*;
#(
  parameter int           N      = 4096,  // points per pass
  parameter int           FDEPTH = 2048,  // sample FIFO depth (largest L)
  parameter logic [127:0] SYSM   = rns_pkg::SYS_M
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        en,
  input  logic [$clog2(N)-1:0]        logl,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  rns_t                        in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output rns_t                        out_data,
  output logic [$clog2(N)-2:0]        tw_addr,
  input  rns_t                        tw_data,
  // event strobes for observation
  output logic                        ev_compute,
  output logic                        ev_bypass,
  output logic                        ev_stall
);
  localparam int LOGN   = $clog2(N);
  localparam int CW     = LOGN + 1;
  localparam int QD     = 32;               // sum queue, > LAT_BF + 1
  localparam int DDEPTH = FDEPTH + QD;      // difference FIFO
  localparam int QCW    = $clog2(QD + 1);
  localparam int DCW    = $clog2(DDEPTH + 1);
  localparam int FCW    = $clog2(FDEPTH + 1);

  logic [CW-1:0]  in_cnt, out_cnt, blk;
  logic           first_half, out_diff, in_left;
  logic           fill_acc, comp_ok, comp_iss;
  logic [FCW-1:0] x_count;
  logic [QCW-1:0] s_count, inflight;
  logic [DCW-1:0] d_count;
  rns_t           x_head, s_head, d_head;
  logic           bf_valid;
  rns_t           bf_y, bf_z;
  logic           s_pop, d_pop;

  assign in_left    = in_cnt < CW'(N);
  assign first_half = ((in_cnt >> logl) & CW'(1)) == '0;
  assign blk        = in_cnt >> (logl + 1);
  assign out_diff   = ((out_cnt >> logl) & CW'(1)) != '0;

  always_comb begin
    tw_addr = '0;
    for (int i = 0; i < LOGN - 1; i++) tw_addr[LOGN-2-i] = blk[i];
  end

  // input side: fill straight into the sample FIFO, compute through the butterfly
  always_comb begin
    comp_ok  = (x_count != '0)
            && (32'(s_count) + 32'(inflight) < QD)
            && (32'(d_count) + 32'(inflight) < DDEPTH);
    fill_acc = en && in_left &&  first_half && in_valid && (32'(x_count) < FDEPTH);
    comp_iss = en && in_left && !first_half && in_valid && comp_ok;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || start) in_cnt <= '0;
    else if (fill_acc || comp_iss) in_cnt <= in_cnt + CW'(1);
  end

  sync_fifo #(.WIDTH($bits(rns_t)), .DEPTH(FDEPTH)) u_xfifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(fill_acc), .wr_data(in_data),
    .rd_en(comp_iss), .rd_data(x_head), .count(x_count));

  rns_butterfly #(.SYSM(SYSM)) u_bf (
    .clk(clk), .rst_n(rst_n),
    .i_valid(comp_iss), .i_byp(1'b0),
    .i_a(in_data), .i_b(x_head), .i_tw(tw_data),
    .o_valid(bf_valid), .o_byp(), .o_y(bf_y), .o_z(bf_z));

  always_ff @(posedge clk) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + QCW'(comp_iss) - QCW'(bf_valid);
  end

  sync_fifo #(.WIDTH($bits(rns_t)), .DEPTH(QD)) u_sumq (
    .clk(clk), .rst_n(rst_n),
    .wr_en(bf_valid), .wr_data(bf_y),
    .rd_en(s_pop), .rd_data(s_head), .count(s_count));

  sync_fifo #(.WIDTH($bits(rns_t)), .DEPTH(DDEPTH)) u_difq (
    .clk(clk), .rst_n(rst_n),
    .wr_en(bf_valid), .wr_data(bf_z),
    .rd_en(d_pop), .rd_data(d_head), .count(d_count));

  // output side: L sums, then L differences, per block
  assign s_pop = en && out_ready && !out_diff && s_count != '0;
  assign d_pop = en && out_ready &&  out_diff && d_count != '0;

  always_ff @(posedge clk) begin
    if (!rst_n || start) out_cnt <= '0;
    else if (s_pop || d_pop) out_cnt <= out_cnt + CW'(1);
  end

  assign out_valid = en ? (out_diff ? (d_count != '0) : (s_count != '0)) : in_valid;
  assign out_data  = en ? (out_diff ? d_head : s_head) : in_data;
  assign in_ready  = en ? (fill_acc || comp_iss) : out_ready;

  assign ev_compute = comp_iss;
  assign ev_bypass  = fill_acc || d_pop;
  assign ev_stall   = en && in_left && in_valid && !(fill_acc || comp_iss);

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                  (s_pop || d_pop) |-> out_cnt < CW'(N));
  a_balanced:   assert property (@(posedge clk) disable iff (!rst_n)
                  out_cnt <= in_cnt);
endmodule

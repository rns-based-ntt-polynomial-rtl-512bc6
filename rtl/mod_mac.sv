// mod_mac: unrolled, pipelined channel multiply-accumulate
//   Z = (sum_{t<NT} a_t * b_t) mod M.
//
// All NT products are formed in parallel and registered; the registered
// products are summed in one adder chain (2w + clog2(NT) bits wide) and the
// sum is reduced once by a Barrett reducer sized for that width, whose
// result is registered. Latency LAT_MAC = 2 cycles, one result per cycle.
// The operands need not be below M: any w-bit values are accepted, which
// the base extensions rely on (their sigma values come from other channels).
// No reset: the pipeline holds data only, validity is tracked by the caller.
module mod_mac #(
  parameter int          W  = 32,
  parameter int          NT = 4,
  parameter logic [W-1:0] M = 32'd4294967291
) (
  input  logic                 clk,
  input  logic [NT-1:0][W-1:0] a,
  input  logic [NT-1:0][W-1:0] b,
  output logic [W-1:0]         z
);
  localparam int SW = 2*W + $clog2(NT + 1);
  logic [NT-1:0][2*W-1:0] prod_q;
  logic [SW-1:0]          sum;
  logic [W-1:0]           red;

  always_ff @(posedge clk)
    for (int t = 0; t < NT; t++) prod_q[t] <= (2*W)'(a[t]) * (2*W)'(b[t]);

  always_comb begin
    sum = '0;
    for (int t = 0; t < NT; t++) sum = sum + SW'(prod_q[t]);
  end

  barrett_reduce #(.W(W), .IW(SW), .M(M)) u_red (.x(sum), .z(red));

  always_ff @(posedge clk) z <= red;
endmodule

// sync_fifo: synchronous first-in first-out queue with a fall-through head.
//
// DEPTH entries of WIDTH bits held in an array. The head entry is visible on
// rd_data whenever 'count' is non-zero; rd_en pops it at the clock edge and
// wr_en pushes wr_data, both in the same cycle if wanted. Pushing when full
// or popping when empty is a caller error and is flagged by assertions.
// Used for the butterfly feedback FIFOs of the NTT stages and for the small
// skid queues between stages. Synchronous active-low reset of the pointers.
// The document names the FIFOs and their sizes only; the fall-through
// organisation (asynchronous read of the array) is this design's choice.
module sync_fifo #(
  parameter int WIDTH = 288,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + PW'(1);
  endfunction

  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= nxt(wp);
      if (rd_en) rp <= nxt(rp);
      count <= count + CW'(wr_en) - CW'(rd_en);
    end
  end

  always_ff @(posedge clk)
    if (wr_en) mem[wp] <= wr_data;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                    wr_en && !rd_en |-> int'(count) < DEPTH);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                    rd_en |-> count != '0);
endmodule

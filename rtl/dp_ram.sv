// dp_ram: simple dual-port on-chip memory, one write port and one read port.
//
// DEPTH words of WIDTH bits. A write takes effect at the clock edge; a read
// returns the addressed word one cycle after re (registered output, as a
// block RAM does). Reading and writing the same address in one cycle returns
// the old word. Used for the polynomial banks, the NTT intermediate buffer,
// the twiddle-factor tables and the result memory. Contents are not reset.
// The document asks for one input and one output value per cycle from a
// dual-port block RAM; the read-during-write behaviour is this design's.
module dp_ram #(
  parameter int WIDTH = 288,
  parameter int DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule

// barrett_reduce: Z = X mod M for an IW-bit X and a W-bit channel modulus M.
//
// Barrett reduction with K = IW and L = floor(2^K / M): the quotient estimate
// T = (X*L) >> K is at most one below the true quotient because X < 2^K, so
// X - T*M lies in [0, 2M) and one conditional subtraction finishes the job.
// For channel products (IW = 2w) this is the document's K = 2*ceil(log2 M);
// the MAC uses the wider IW of its sum. The modulus must fill the channel
// width (2^(W-1) <= M < 2^W), as every modulus of this design does; that
// bounds L to IW-W+2 bits and is checked at elaboration. Purely
// combinational.
module barrett_reduce #(
  parameter int          W  = 32,
  parameter int          IW = 64,
  parameter logic [W-1:0] M = 32'd4294967291
) (
  input  logic [IW-1:0] x,
  output logic [W-1:0]  z
);
  localparam int LW = IW - W + 2;  // width of L = floor(2^IW / M), M >= 2^(W-1)
  localparam logic [127:0] LFULL = rns_pkg::barrett_l(IW, M);
  localparam logic [LW-1:0] L = LW'(LFULL);

  if (!M[W-1]) begin : g_bad_modulus
    $error("barrett_reduce: modulus must have its top bit set");
  end

  logic [IW+LW-1:0] xl;
  logic [LW-1:0]    t;
  logic [W+1:0]     r;      // X - T*M < 2M
  logic [W+1:0]     r2;
  always_comb begin
    xl = (IW+LW)'(x) * (IW+LW)'(L);
    t  = LW'(xl >> IW);
    r  = (W+2)'(x - IW'((IW+LW)'(t) * (IW+LW)'(M)));
    r2 = r - (W+2)'(M);
    z  = r2[W+1] ? r[W-1:0] : r2[W-1:0];
  end
endmodule

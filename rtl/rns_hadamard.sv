// rns_hadamard: RNS Hadamard (point-wise) product unit,
//   X[i] <- X[i] * Y[i] * D^-1 (mod M)   for i = 0 .. N-1,
// using one rns_montmul. The caller routes X from a polynomial bank and Y
// from a second bank, a table (powers of phi) or a constant; tables hold
// their values multiplied by D so the Montgomery factor cancels.
// One index is read per cycle (read data valid the next cycle), the product
// leaves the multiplier LAT_MONT cycles later and is written back to the
// same index: N + LAT_MONT + 2 cycles per pass. 'done' pulses after the
// last write.
module rns_hadamard
  import rns_pkg::*;
#(
  parameter int          N    = 4096,
  parameter logic [127:0] SYSM = rns_pkg::SYS_M
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 rd_en,
  output logic [$clog2(N)-1:0] rd_addr,
  input  rns_t                 x_rdata,
  input  rns_t                 y_rdata,
  output logic                 wr_en,
  output logic [$clog2(N)-1:0] wr_addr,
  output rns_t                 wr_data
);
  localparam int AW = $clog2(N);
  localparam int LT = LAT_MONT + 1;   // read + multiply

  logic          run;
  logic [AW:0]   cnt;
  logic [LT-1:0] v_d;
  logic [AW-1:0] a_d [LT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0;
      cnt <= '0;
    end else if (start && !busy) begin
      run <= 1'b1;
      cnt <= '0;
    end else if (run) begin
      cnt <= cnt + 1'b1;
      if (cnt == (AW+1)'(N - 1)) run <= 1'b0;
    end
  end

  assign rd_en   = run;
  assign rd_addr = cnt[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[LT-2:0], rd_en};
    a_d[0] <= rd_addr;
    for (int i = 1; i < LT; i++) a_d[i] <= a_d[i-1];
  end

  rns_montmul #(.SYSM(SYSM)) u_mm (.clk(clk), .a(x_rdata), .b(y_rdata), .z(wr_data));

  assign wr_en   = v_d[LT-1];
  assign wr_addr = a_d[LT-1];
  assign busy    = run || (v_d != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= v_d[LT-1] && !v_d[LT-2] && !run;
  end
endmodule

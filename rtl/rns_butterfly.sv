// rns_butterfly: radix-2 RNS NTT butterfly with a bypass path.
//
// Compute mode:  Y = B + w*A,   Z = B - w*A   (mod M, in RNS)
//   w*A is an RNS Montgomery product (the twiddle is stored pre-scaled by D,
//   so the Montgomery factor D^-1 cancels). B waits in a shift register
//   (SR) for the product; Add_RNS and Sub_RNS then work on all 9 channels.
//   Since the Montgomery result is only bounded (below SUBK*M), Sub_RNS
//   is given B + SUBK*M as its minuend so the integer never goes negative;
//   this keeps every residue vector a non-negative integer congruent to the
//   true value mod M.
// Bypass mode:   Y = B,  Z = A   (the document's bypass line from A to Z and
//   from B to Y). Here the bypassed pair travels through a delay of the same
//   length as the compute path, so the outputs of both modes leave in issue
//   order; the document draws the bypass as a direct line.
// Timing: input registers, LAT_MONT Montgomery stages, a register after the
// multiplier, a register after the adder/subtractor: LAT_BF = 18 cycles,
// one butterfly per cycle. o_valid/o_byp follow i_valid/i_byp. Reset clears
// only the valid pipeline.
module rns_butterfly
  import rns_pkg::*;
#(
  parameter logic [127:0] SYSM = rns_pkg::SYS_M
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_valid,
  input  logic i_byp,
  input  rns_t i_a,
  input  rns_t i_b,
  input  rns_t i_tw,
  output logic o_valid,
  output logic o_byp,
  output rns_t o_y,
  output rns_t o_z
);
  localparam rns_t SUB_OFF = f_sub_off(SYSM);
  localparam int   D       = LAT_MONT + 1;   // B / bypass wait after the input register

  rns_t a_q, b_q, tw_q, p, p_q;
  rns_t b_d [D];
  rns_t a_d [D];
  logic [LAT_BF-1:0] v_d, byp_d;
  rns_t sum, bo, dif, y_n, z_n;

  always_ff @(posedge clk) begin
    a_q  <= i_a;
    b_q  <= i_b;
    tw_q <= i_tw;
  end

  rns_montmul #(.SYSM(SYSM)) u_mm (.clk(clk), .a(a_q), .b(tw_q), .z(p));

  always_ff @(posedge clk) begin
    p_q    <= p;
    b_d[0] <= b_q;
    a_d[0] <= a_q;
    for (int i = 1; i < D; i++) begin
      b_d[i] <= b_d[i-1];
      a_d[i] <= a_d[i-1];
    end
  end

  rns_add u_add (.a(b_d[D-1]), .b(p_q), .z(sum));
  rns_add u_off (.a(b_d[D-1]), .b(SUB_OFF), .z(bo));
  rns_sub u_sub (.a(bo), .b(p_q), .z(dif));

  // byp_d[LAT_BF-2] belongs to the operation now at the add/sub inputs
  assign y_n = byp_d[LAT_BF-2] ? b_d[D-1] : sum;
  assign z_n = byp_d[LAT_BF-2] ? a_d[D-1] : dif;

  always_ff @(posedge clk) begin
    o_y <= y_n;
    o_z <= z_n;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d   <= '0;
      byp_d <= '0;
    end else begin
      v_d   <= {v_d[LAT_BF-2:0], i_valid};
      byp_d <= {byp_d[LAT_BF-2:0], i_byp};
    end
  end
  assign o_valid = v_d[LAT_BF-1];
  assign o_byp   = byp_d[LAT_BF-1];
endmodule

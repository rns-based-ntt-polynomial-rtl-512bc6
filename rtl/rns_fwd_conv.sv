// rns_fwd_conv: forward RNS converter, x_c = X mod m_c for all 9 channels.
//
// The 128-bit coefficient is split into four 32-bit words X = sum_w X_w*2^(32w);
// each channel then computes |sum_w X_w * |2^(32w)|_c|_c with one unrolled
// modular MAC (mod_mac), whose constants come from rns_pkg. This is this
// design's way of reducing a w-bit value by a w_ch-bit modulus without a
// wide divider. One coefficient per cycle, latency LAT_MAC = 2; the tag
// (for example a write address) travels alongside.
module rns_fwd_conv
  import rns_pkg::*;
#(
  parameter int TW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_valid,
  input  logic [TW-1:0] i_tag,
  input  coef_t         i_x,
  output logic          o_valid,
  output logic [TW-1:0] o_tag,
  output rns_t          o_r
);
  localparam logic [NCH-1:0][3:0][31:0] P2 = f_pow2_red();
  logic [3:0][31:0] words;
  logic [LAT_MAC-1:0]         v_d;
  logic [LAT_MAC-1:0][TW-1:0] t_d;

  assign words = i_x;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    mod_mac #(.W(WCH), .NT(4), .M(MODS[c])) u_mac (
      .clk(clk), .a(words), .b(P2[c]), .z(o_r[c]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[LAT_MAC-2:0], i_valid};
    t_d <= {t_d[LAT_MAC-2:0], i_tag};
  end
  assign o_valid = v_d[LAT_MAC-1];
  assign o_tag   = t_d[LAT_MAC-1];
endmodule

// Top level: the proposed approximate arithmetic units side by side.
//
// The units share no signals; each has its own ports, prefixed by its name:
//   axpa_*  32-bit accuracy configurable prefix adder (mode selects 16-bit
//           exact or 32-bit approximate operation)
//   axca_*  32-bit constant-carry adder
//   axha_*  32-bit approximate hierarchical adder, K = 12
//   axm_*   8-bit AXM1 multiplier (carry-save merged), AX_L = 2
//   sop_*   AXSOP3 a*b + c*d, K = 8, AX_L = 2
//   pos_*   AXPOS3 (a+b)*(c+d), K = 4, AX_L = 2
//   mac_*   AXMAC3 accumulator, MC = 8, K = 8, AX_L = 4, clocked by clk
// All units except the MAC are combinational; the MAC register updates on
// the rising clk edge when mac_en is high and clears on rst.
module approx_arith_top
  import approx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,

  input  logic        axpa_mode,
  input  logic [31:0] axpa_a,
  input  logic [31:0] axpa_b,
  input  logic        axpa_cin,
  output logic [32:0] axpa_s,

  input  logic [31:0] axca_a,
  input  logic [31:0] axca_b,
  output logic [32:0] axca_s,

  input  logic [31:0] axha_a,
  input  logic [31:0] axha_b,
  output logic [32:0] axha_s,

  input  logic [7:0]  axm_a,
  input  logic [7:0]  axm_b,
  output logic [15:0] axm_p,

  input  logic [7:0]  sop_a,
  input  logic [7:0]  sop_b,
  input  logic [7:0]  sop_c,
  input  logic [7:0]  sop_d,
  output logic [16:0] sop_y,

  input  logic [7:0]  pos_a,
  input  logic [7:0]  pos_b,
  input  logic [7:0]  pos_c,
  input  logic [7:0]  pos_d,
  output logic [17:0] pos_y,

  input  logic        mac_en,
  input  logic [7:0]  mac_a,
  input  logic [7:0]  mac_b,
  output logic [18:0] mac_acc
);
  axpa #(.N(32)) u_axpa (
    .mode(axpa_mode_e'(axpa_mode)), .a(axpa_a), .b(axpa_b), .cin(axpa_cin), .s(axpa_s)
  );
  axca #(.N(32)) u_axca (.a(axca_a), .b(axca_b), .s(axca_s));
  axha #(.N(32), .K(12)) u_axha (.a(axha_a), .b(axha_b), .s(axha_s));
  axm1_8b #(.AX_L(2)) u_axm (.a(axm_a), .b(axm_b), .p(axm_p));
  axsop #(.K(8), .AX_L(2)) u_sop (.a(sop_a), .b(sop_b), .c(sop_c), .d(sop_d), .y(sop_y));
  axpos #(.K(4), .AX_L(2)) u_pos (.a(pos_a), .b(pos_b), .c(pos_c), .d(pos_d), .y(pos_y));
  axmac #(.MC(8), .K(8), .AX_L(4)) u_mac (
    .clk(clk), .rst(rst), .en(mac_en), .a(mac_a), .b(mac_b), .acc(mac_acc)
  );
endmodule

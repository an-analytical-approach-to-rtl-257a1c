// AXMAC: approximate multiply-accumulate unit, acc <= acc + a*b.
//
// Datapath per cycle:
//   O1 = rec_mult(a, b)                          (2N = 16 bits, level AX_L)
//   {O4, O3} = axha(O1, acc[2N-1:0])             (16-bit approximate adder,
//                                                 K approximate LSBs)
//   upper = acc[2N+LM-1:2N] + O4                 (conditional +1, LM bits)
//   acc  <= {upper, O3}                          when en = 1
// LM = log2(MC) guard bits let MC products accumulate without overflow (MC =
// 8 and N = 8 give a 19-bit register, enough for 8*255*255 = 520200). Only a
// 2N-bit adder is needed; the guard bits take its carry through the
// incrementor. Variants: AXMAC1 (AX_L = 0), AXMAC2 (K = 0), AXMAC3 (both > 0,
// default K = 8, AX_L = 4).
//
// Timing: one product is accumulated per clock edge with en = 1; acc is the
// registered sum and shows the new value one cycle after a, b are applied.
// rst (synchronous, active high, priority over en) clears acc to 0. The
// register, its enable and reset and all widths follow the published
// design; synchronous reset is this design's choice. The guard bits wrap past MC
// products.
module axmac #(
  parameter int unsigned MC   = 8,
  parameter int unsigned K    = 8,
  parameter int unsigned AX_L = 4,
  localparam int unsigned LM  = (MC > 1) ? $clog2(MC) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [7:0]        a,
  input  logic [7:0]        b,
  output logic [16+LM-1:0]  acc
);
  localparam int unsigned N = 8;

  logic [2*N-1:0] o1, o3;
  logic           o4;
  logic [LM-1:0]  upper;
  logic           unused_co;

  rec_mult #(.AX_L(AX_L)) u_mul (.a(a), .b(b), .p(o1));
  axha #(.N(2*N), .K(K)) u_add (.a(o1), .b(acc[2*N-1:0]), .s({o4, o3}));
  cond_inc #(.W(LM)) u_inc (.a(acc[2*N+LM-1:2*N]), .inc(o4), .y(upper), .cout(unused_co));

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= {upper, o3};
  end
endmodule

// 4x4 unsigned Vedic multiplier.
//
// Splits X and Y into 2-bit halves and multiplies them crosswise with four
// 2-bit Vedic multipliers (yh*xh, yh*xl, yl*xh, yl*xl), then joins the four
// 4-bit products in the adder stage (vedic_combine) to form the
// 8-bit product. KIND selects the adders of this and every lower level.
// Interface: s = x * y. Purely combinational.
module vedic_mult4
  import vedic_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_CLA
) (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] s
);
  logic [3:0] q_hh, q_hl, q_lh, q_ll;

  vedic_mult2 u_hh (.a(y[3:2]), .b(x[3:2]), .out(q_hh));
  vedic_mult2 u_hl (.a(y[3:2]), .b(x[1:0]), .out(q_hl));
  vedic_mult2 u_lh (.a(y[1:0]), .b(x[3:2]), .out(q_lh));
  vedic_mult2 u_ll (.a(y[1:0]), .b(x[1:0]), .out(q_ll));

  vedic_combine #(.H(2), .KIND(KIND)) u_combine (
    .q_hh,
    .q_hl,
    .q_lh,
    .q_ll,
    .s
  );
endmodule

// 16x16 unsigned Vedic multiplier.
//
// Splits X and Y into 8-bit halves and multiplies them crosswise with four
// 8-bit Vedic multipliers (yh*xh, yh*xl, yl*xh, yl*xl), then joins the four
// 16-bit products in the adder stage (vedic_combine) to form the
// 32-bit product. KIND selects the adders of this and every lower level.
// Interface: s = x * y. Purely combinational.
module vedic_mult16
  import vedic_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_CLA
) (
  input  logic [15:0] x,
  input  logic [15:0] y,
  output logic [31:0] s
);
  logic [15:0] q_hh, q_hl, q_lh, q_ll;

  vedic_mult8 #(.KIND(KIND)) u_hh (.x(y[15:8]), .y(x[15:8]), .s(q_hh));
  vedic_mult8 #(.KIND(KIND)) u_hl (.x(y[15:8]), .y(x[7:0]), .s(q_hl));
  vedic_mult8 #(.KIND(KIND)) u_lh (.x(y[7:0]), .y(x[15:8]), .s(q_lh));
  vedic_mult8 #(.KIND(KIND)) u_ll (.x(y[7:0]), .y(x[7:0]), .s(q_ll));

  vedic_combine #(.H(8), .KIND(KIND)) u_combine (
    .q_hh,
    .q_hl,
    .q_lh,
    .q_ll,
    .s
  );
endmodule

// Adder stage of a 2H x 2H Vedic multiplier.
//
// With X = {xh, xl} and Y = {yh, yl} split into H-bit halves, the four
// half-width products are q_hh = yh*xh, q_hl = yh*xl, q_lh = yl*xh and
// q_ll = yl*xl, and X*Y = q_hh<<2H + (q_hl + q_lh)<<H + q_ll. The stage adds
// them in the crosswise pattern:
//   - s[H-1:0] is q_ll[H-1:0] unchanged;
//   - a first 2H-bit adder forms q_hl + q_lh, with carry c1;
//   - a second 2H-bit adder adds that sum to {q_hh[H-1:0], q_ll[2H-1:H]},
//     giving s[3H-1:H] and carry c2;
//   - c1 and c2 are merged into a 2-bit count by a half adder;
//   - an H-bit adder adds the count to q_hh[2H-1:H], giving s[4H-1:3H].
// The published schematics of this structure merge c1 and c2 with a single
// OR gate. That is not enough: c1 and c2 are both 1 for some operands once
// H >= 4 (248 of the 65536 operand pairs of the 8-bit multiplier, about 1.2%
// of 16-bit pairs), and an OR then drops a carry of weight 2^(3H). Here the
// merge is a half adder, whose 2-bit count keeps both; this is a deliberate
// departure. S[H-1:0] is q_ll[H-1:0] wired straight through. The first two adders and the last are of the kind KIND; in the
// carry-save flavour the last one is ripple-carry.
// Purely combinational.
module vedic_combine
  import vedic_pkg::*;
#(
  parameter int unsigned H    = 16,
  parameter adder_kind_e KIND = ADDER_CLA
) (
  input  logic [2*H-1:0] q_hh,
  input  logic [2*H-1:0] q_hl,
  input  logic [2*H-1:0] q_lh,
  input  logic [2*H-1:0] q_ll,
  output logic [4*H-1:0] s
);
  localparam adder_kind_e TOP_KIND = (KIND == ADDER_CSA) ? ADDER_RCA : KIND;

  logic [2*H-1:0] cross_sum, mid_sum;
  logic           c1, c2;
  logic [1:0]     ccount;
  logic [H-1:0]   top_sum;
  logic           top_cout;

  vedic_adder #(.N(2*H), .KIND(KIND)) u_add_cross (
    .a   (q_hl),
    .b   (q_lh),
    .cin (1'b0),
    .sum (cross_sum),
    .cout(c1)
  );

  vedic_adder #(.N(2*H), .KIND(KIND)) u_add_mid (
    .a   (cross_sum),
    .b   ({q_hh[H-1:0], q_ll[2*H-1:H]}),
    .cin (1'b0),
    .sum (mid_sum),
    .cout(c2)
  );

  half_adder u_carry_merge (
    .a    (c1),
    .b    (c2),
    .sum  (ccount[0]),
    .carry(ccount[1])
  );

  vedic_adder #(.N(H), .KIND(TOP_KIND)) u_add_top (
    .a   (q_hh[2*H-1:H]),
    .b   (H'(ccount)),
    .cin (1'b0),
    .sum (top_sum),
    .cout(top_cout)
  );

  assign s = {top_sum, mid_sum, q_ll[H-1:0]};

  // The product of two 2H-bit numbers fits in 4H bits, so top_cout is always
  // 0 when the inputs are true products; it is left unused.
  logic unused_top_cout;
  assign unused_top_cout = top_cout;
endmodule

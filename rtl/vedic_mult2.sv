// 2x2 Vedic multiplier, the leaf of the recursive multiplier family.
//
// Vertically and crosswise on two bits: the vertical product a0b0 is out[0];
// the two crosswise products a1b0 and a0b1 go into a half adder whose sum is
// out[1]; the vertical product a1b1 and that half adder's carry go into a
// second half adder giving out[2] (sum) and out[3] (carry). Four AND gates and
// two half adders, no other logic. Purely combinational.
module vedic_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] out
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  assign out[0] = a0b0;

  half_adder u_ha_cross (
    .a    (a1b0),
    .b    (a0b1),
    .sum  (out[1]),
    .carry(c1)
  );

  half_adder u_ha_top (
    .a    (a1b1),
    .b    (c1),
    .sum  (out[2]),
    .carry(out[3])
  );
endmodule

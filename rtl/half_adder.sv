// Half adder: sum and carry of two bits. Building block of the 2x2 Vedic
// multiplier. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule

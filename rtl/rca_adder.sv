// N-bit ripple-carry adder.
//
// A chain of N full adders; the carry out of bit i is the carry in of bit
// i+1, so the delay grows linearly with N. This is the adder of the
// area-optimised multiplier flavour. Interface: sum + (cout << N) =
// a + b + cin. Purely combinational.
module rca_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule

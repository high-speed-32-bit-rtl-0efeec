// N-bit carry-save adder, used as a two-operand adder with carry out.
//
// It works in two stages. The carry-save stage is a row of full adders that
// reduces a, b and cin (entering at bit 0) to a partial-sum vector ps and a
// carry vector cv without passing carries sideways. The second stage merges
// ps and cv shifted up one place with a ripple-carry row. The top carry bit
// cv[N-1] and the merge row's carry out are never both 1 because the total is
// below 2^(N+1), so the carry out is their OR.
// Interface: sum + (cout << N) = a + b + cin. Purely combinational.
module csa_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] ps, cv, third;
  logic         merge_cout;

  // Stage 1: carry-save row.
  assign third = {{(N-1){1'b0}}, cin};
  for (genvar i = 0; i < N; i++) begin : g_save
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (third[i]),
      .sum (ps[i]),
      .cout(cv[i])
    );
  end

  // Stage 2: carry-propagate merge of ps and 2*cv.
  logic [N-1:0] cv_shift;
  if (N > 1) begin : g_shift
    assign cv_shift = {cv[N-2:0], 1'b0};
  end else begin : g_noshift
    assign cv_shift = '0;
  end

  rca_adder #(.N(N)) u_merge (
    .a   (ps),
    .b   (cv_shift),
    .cin (1'b0),
    .sum (sum),
    .cout(merge_cout)
  );

  assign cout = cv[N-1] | merge_cout;
endmodule

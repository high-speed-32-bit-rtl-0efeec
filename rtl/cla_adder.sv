// N-bit carry-lookahead adder.
//
// Every bit forms generate g = a & b and propagate p = a ^ b. The bits are
// cut into groups of CLA_GROUP. Each group forms a group generate GG and
// group propagate GP from its g/p terms alone; the carry into every group is
// then gc[k+1] = GG[k] | GP[k] & gc[k], computed from cin and the group terms.
// Inside a group every carry is a sum of products of the group's carry in and
// its g/p terms,
//   c[j+1] = g[j] | p[j]g[j-1] | ... | p[j]..p[k+1]g[k] | p[j]..p[k]c[k],
// so no bit waits on the carry of the bit below it. The last group is
// narrower when N is not a multiple of CLA_GROUP. The group size is this
// design's choice. Interface: sum + (cout << N) = a + b + cin. Purely
// combinational.
module cla_adder
  import vedic_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (N + CLA_GROUP - 1) / CLA_GROUP;

  logic [N-1:0]  g, p;
  logic [NG-1:0] gg, gp;   // group generate / propagate
  logic [NG:0]   gc;       // carry into each group

  assign g = a & b;
  assign p = a ^ b;

  for (genvar k = 0; k < NG; k++) begin : g_group
    localparam int unsigned LO = k * CLA_GROUP;
    localparam int unsigned HI = ((k + 1) * CLA_GROUP < N) ? (k + 1) * CLA_GROUP : N;
    localparam int unsigned W  = HI - LO;

    logic [W-1:0] gl, pl;
    logic [W-1:0] cl;   // carry into each bit of the group

    assign gl = g[HI-1:LO];
    assign pl = p[HI-1:LO];

    // Group generate and propagate.
    always_comb begin
      logic term;
      gp[k] = &pl;
      gg[k] = 1'b0;
      for (int unsigned t = 0; t < W; t++) begin
        term = gl[t];
        for (int unsigned m = t + 1; m < W; m++) term &= pl[m];
        gg[k] |= term;
      end
    end

    // Bit carries looked ahead from the group carry in.
    always_comb begin
      logic term;
      cl[0] = gc[k];
      for (int unsigned j = 1; j < W; j++) begin
        term = gc[k];
        for (int unsigned m = 0; m < j; m++) term &= pl[m];
        cl[j] = term;
        for (int unsigned t = 0; t < j; t++) begin
          term = gl[t];
          for (int unsigned m = t + 1; m < j; m++) term &= pl[m];
          cl[j] |= term;
        end
      end
    end

    assign sum[HI-1:LO] = pl ^ cl;
  end

  // Carries between groups.
  always_comb begin
    logic c;
    c = cin;
    for (int unsigned k = 0; k < NG; k++) begin
      gc[k] = c;
      c     = gg[k] | (gp[k] & c);
    end
    gc[NG] = c;
  end

  assign cout = gc[NG];
endmodule

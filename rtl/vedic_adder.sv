// Adder selected by kind: one of the ripple-carry, carry-lookahead or
// carry-save adders, chosen at elaboration by KIND. Lets the Vedic adder
// stage be written once for all three multiplier flavours.
// Interface: sum + (cout << N) = a + b + cin. Purely combinational.
module vedic_adder
  import vedic_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter adder_kind_e KIND = ADDER_CLA
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  if (KIND == ADDER_CSA) begin : g_csa
    csa_adder #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (KIND == ADDER_CLA) begin : g_cla
    cla_adder #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else begin : g_rca
    rca_adder #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end
endmodule

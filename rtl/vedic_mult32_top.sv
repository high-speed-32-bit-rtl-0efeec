// Three 32x32 Vedic multipliers side by side: the carry-save, carry-lookahead
// and ripple-carry flavours, which trade LUT count against delay.
//
// All three take the same operands and produce the same 64-bit product; they
// differ only in the adders of their adder stages. They are built together so
// that one netlist holds the three designs for comparison. Each is pipelined
// in two stages (see vedic_mult32), so the products appear on s_csa, s_cla
// and s_rca with out_valid two clock edges after x, y are presented with
// in_valid. rst_n is an active-low synchronous reset.
module vedic_mult32_top
  import vedic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic        out_valid,
  output logic [63:0] s_csa,
  output logic [63:0] s_cla,
  output logic [63:0] s_rca
);
  logic v_csa, v_cla, v_rca;

  vedic_mult32 #(.KIND(ADDER_CSA)) u_csa (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(v_csa), .s(s_csa)
  );
  vedic_mult32 #(.KIND(ADDER_CLA)) u_cla (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(v_cla), .s(s_cla)
  );
  vedic_mult32 #(.KIND(ADDER_RCA)) u_rca (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(v_rca), .s(s_rca)
  );

  // The three pipelines have the same depth and share their inputs.
  assign out_valid = v_cla;

  logic unused_valid;
  assign unused_valid = v_csa ^ v_rca;

  always_ff @(posedge clk) begin
    if (rst_n) assert (v_csa == v_cla && v_rca == v_cla);
  end
endmodule

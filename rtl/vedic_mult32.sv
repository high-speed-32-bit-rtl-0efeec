// 32x32 unsigned Vedic multiplier, pipelined in two stages.
//
// Splits X and Y into 16-bit halves and multiplies them crosswise with four
// 16-bit Vedic multipliers (yh*xh, yh*xl, yl*xh, yl*xl). The adder stage
// (vedic_combine with H = 16: two 32-bit adders, a carry merge and a 16-bit
// adder) joins the four 32-bit products into the 64-bit product S.
//
// Pipelining: stage 1 registers the four partial products, stage 2 runs the
// adder stage and registers S. A new operand pair may enter every cycle; its
// product appears on s with out_valid two clock edges after it was presented
// with in_valid. The placement of the two registers is this design's choice.
// rst_n is an active-low synchronous reset that clears the valid bits and the
// data registers.
module vedic_mult32
  import vedic_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_CLA
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic        out_valid,
  output logic [63:0] s
);
  typedef struct packed {
    logic [31:0] hh;
    logic [31:0] hl;
    logic [31:0] lh;
    logic [31:0] ll;
  } partials_t;

  partials_t pp_d, pp_q;
  logic      pp_valid;
  logic [63:0] s_d;

  vedic_mult16 #(.KIND(KIND)) u_hh (.x(y[31:16]), .y(x[31:16]), .s(pp_d.hh));
  vedic_mult16 #(.KIND(KIND)) u_hl (.x(y[31:16]), .y(x[15:0]),  .s(pp_d.hl));
  vedic_mult16 #(.KIND(KIND)) u_lh (.x(y[15:0]),  .y(x[31:16]), .s(pp_d.lh));
  vedic_mult16 #(.KIND(KIND)) u_ll (.x(y[15:0]),  .y(x[15:0]),  .s(pp_d.ll));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pp_q     <= '0;
      pp_valid <= 1'b0;
    end else begin
      pp_q     <= pp_d;
      pp_valid <= in_valid;
    end
  end

  vedic_combine #(.H(16), .KIND(KIND)) u_combine (
    .q_hh(pp_q.hh),
    .q_hl(pp_q.hl),
    .q_lh(pp_q.lh),
    .q_ll(pp_q.ll),
    .s   (s_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s         <= '0;
      out_valid <= 1'b0;
    end else begin
      s         <= s_d;
      out_valid <= pp_valid;
    end
  end
endmodule

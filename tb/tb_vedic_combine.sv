// Self-checking testbench for the Vedic adder stage (vedic_combine).
//
// The four half-width products are formed here with the simulator's own
// multiplication, so the stage is tested on its own. At H = 4 every pair of
// 8-bit operands is applied; at the default H = 16 random and corner 32-bit
// operands are. Each of the three adder kinds is instantiated. The result
// must equal the full product. The number of cases in which both 2H-bit
// carries are set is counted and must be non-zero. Combinational; a
// watchdog ends the run if it stalls.
module tb_vedic_combine;
  import vedic_pkg::*;

  int checks = 0, failures = 0, both_carries = 0;

  logic [7:0]  qhh8, qhl8, qlh8, qll8;
  logic [15:0] s8_csa, s8_cla, s8_rca;
  logic [31:0] qhh, qhl, qlh, qll;
  logic [63:0] s_csa, s_cla, s_rca;

  vedic_combine #(.H(4), .KIND(ADDER_CSA)) d8_csa (.q_hh(qhh8), .q_hl(qhl8), .q_lh(qlh8), .q_ll(qll8), .s(s8_csa));
  vedic_combine #(.H(4), .KIND(ADDER_CLA)) d8_cla (.q_hh(qhh8), .q_hl(qhl8), .q_lh(qlh8), .q_ll(qll8), .s(s8_cla));
  vedic_combine #(.H(4), .KIND(ADDER_RCA)) d8_rca (.q_hh(qhh8), .q_hl(qhl8), .q_lh(qlh8), .q_ll(qll8), .s(s8_rca));

  vedic_combine #(.KIND(ADDER_CSA)) d_csa (.q_hh(qhh), .q_hl(qhl), .q_lh(qlh), .q_ll(qll), .s(s_csa));
  vedic_combine #(.KIND(ADDER_CLA)) d_cla (.q_hh(qhh), .q_hl(qhl), .q_lh(qlh), .q_ll(qll), .s(s_cla));
  vedic_combine                     d_rca (.q_hh(qhh), .q_hl(qhl), .q_lh(qlh), .q_ll(qll), .s(s_rca));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e8;
    logic [63:0] e;
    logic [32:0] xsum, mid;
    logic [8:0]  xsum8, mid8;
    logic [31:0] x, y;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        qhh8 = 8'(j >> 4) * 8'(i >> 4);
        qhl8 = 8'(j >> 4) * 8'(i & 15);
        qlh8 = 8'(j & 15) * 8'(i >> 4);
        qll8 = 8'(j & 15) * 8'(i & 15);
        xsum8 = 9'(qhl8) + 9'(qlh8);
        mid8   = 9'(xsum8[7:0]) + 9'({qhh8[3:0], qll8[7:4]});
        if (xsum8[8] && mid8[8]) both_carries++;
        #1;
        e8 = 16'(i) * 16'(j);
        checks++;
        if (s8_csa !== e8 || s8_cla !== e8 || s8_rca !== e8) begin
          failures++;
          if (failures <= 10) $display("FAIL H=4 %0d*%0d: %0h %0h %0h", i, j, s8_csa, s8_cla, s8_rca);
        end
      end
    for (int n = 0; n < 20000; n++) begin
      case (n)
        0: begin x = '1; y = '1; end
        1: begin x = 32'hFFFF_0001; y = 32'h0001_FFFF; end
        default: begin x = $urandom; y = $urandom; end
      endcase
      qhh = 32'(y[31:16]) * 32'(x[31:16]);
      qhl = 32'(y[31:16]) * 32'(x[15:0]);
      qlh = 32'(y[15:0]) * 32'(x[31:16]);
      qll = 32'(y[15:0]) * 32'(x[15:0]);
      xsum = 33'(qhl) + 33'(qlh);
      mid   = 33'(xsum[31:0]) + 33'({qhh[15:0], qll[31:16]});
      if (xsum[32] && mid[32]) both_carries++;
      #1;
      e = 64'(x) * 64'(y);
      checks++;
      if (s_csa !== e || s_cla !== e || s_rca !== e) begin
        failures++;
        if (failures <= 10) $display("FAIL H=16 %0h*%0h: %0h %0h %0h", x, y, s_csa, s_cla, s_rca);
      end
    end
    $display("adder stage saw both carries set %0d times", both_carries);
    checks++;
    if (both_carries == 0) begin
      failures++;
      $display("FAIL: the both-carries case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

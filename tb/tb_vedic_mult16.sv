// Self-checking testbench for the 16x16 Vedic multiplier.
//
// Instantiates the carry-save, carry-lookahead and ripple-carry flavours side
// by side and checks all three against the simulator's multiplication for
// random and corner operand pairs (30000). Counts how often the adder stage sees both of its
// 2H-bit carries set (the case a single OR of the carries gets wrong), and
// fails if that never happens (it cannot happen at 4 bits). Combinational; a
// watchdog ends the run if it stalls.
module tb_vedic_mult16;
  import vedic_pkg::*;

  int checks = 0, failures = 0, both_carries = 0;
  logic [15:0]   x, y;
  logic [31:0] s_csa, s_cla, s_rca;

  vedic_mult16 #(.KIND(ADDER_CSA)) dut_csa (.x, .y, .s(s_csa));
  vedic_mult16 #(.KIND(ADDER_CLA)) dut_cla (.x, .y, .s(s_cla));
  vedic_mult16 #(.KIND(ADDER_RCA)) dut_rca (.x, .y, .s(s_rca));

  localparam int H = 8;

  task automatic check();
    logic [31:0] exp;
    longint unsigned xh, xl, yh, yl, xsum, mid;
    exp = 32'(x) * 32'(y);
    // Reference carries of the adder stage, from the operand halves.
    xh = longint'(x) >> H; xl = longint'(x) & ((64'd1 << H) - 1);
    yh = longint'(y) >> H; yl = longint'(y) & ((64'd1 << H) - 1);
    xsum = yh * xl + yl * xh;
    mid   = (xsum & ((64'd1 << (2*H)) - 1)) + (((yh * xh) & ((64'd1 << H) - 1)) << H) + ((yl * xl) >> H);
    if ((xsum >> (2*H)) != 0 && (mid >> (2*H)) != 0) both_carries++;
    checks++;
    if (s_csa !== exp || s_cla !== exp || s_rca !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %0h*%0h: csa %0h cla %0h rca %0h expected %0h", x, y, s_csa, s_cla, s_rca, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 30000; n++) begin
      case (n)
        0: begin x = '1; y = '1; end
        1: begin x = '1; y = 16'd1; end
        2: begin x = '0; y = '1; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      #1;
      check();
    end
    $display("adder stage saw both carries set %0d times", both_carries);
    if (H >= 4) begin
      checks++;
      if (both_carries == 0) begin
        failures++;
        $display("FAIL: the both-carries case never occurred");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

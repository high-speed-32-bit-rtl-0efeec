// Self-checking testbench for the pipelined 32x32 Vedic multiplier.
//
// Runs the three adder flavours side by side on one operand stream, with
// random gaps in in_valid, back-to-back operands and a reset in the middle
// of the stream. A scoreboard holds the expected product and the issue cycle
// of every operand pair; each out_valid must match the oldest entry and
// arrive exactly two cycles after issue. A reset empties the scoreboard.
// Operands are driven on the falling clock edge. A watchdog ends the run.
module tb_vedic_mult32;
  import vedic_pkg::*;

  localparam int LATENCY = 2;
  localparam int NOPS    = 5000;

  int checks = 0, failures = 0;
  int cycle = 0;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [31:0] x = '0, y = '0;
  logic        v_csa, v_cla, v_rca;
  logic [63:0] s_csa, s_cla, s_rca;

  vedic_mult32 #(.KIND(ADDER_CSA)) dut_csa (.clk, .rst_n, .in_valid, .x, .y, .out_valid(v_csa), .s(s_csa));
  vedic_mult32                     dut_cla (.clk, .rst_n, .in_valid, .x, .y, .out_valid(v_cla), .s(s_cla));
  vedic_mult32 #(.KIND(ADDER_RCA)) dut_rca (.clk, .rst_n, .in_valid, .x, .y, .out_valid(v_rca), .s(s_rca));

  always #5 clk = ~clk;

  typedef struct { logic [63:0] prod; int issued; } entry_t;
  entry_t sb[$];
  int     issued = 0, retired = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      sb.delete();
    end else begin
      if (v_csa !== v_cla || v_rca !== v_cla) begin
        checks++; failures++;
        $display("FAIL valid mismatch at cycle %0d", cycle);
      end
      if (v_cla) begin
        entry_t e;
        checks++;
        if (sb.size() == 0) begin
          failures++;
          $display("FAIL unexpected out_valid at cycle %0d", cycle);
        end else begin
          e = sb.pop_front();
          retired++;
          if (s_csa !== e.prod || s_cla !== e.prod || s_rca !== e.prod || cycle - e.issued != LATENCY) begin
            failures++;
            if (failures <= 10)
              $display("FAIL cycle %0d: csa %0h cla %0h rca %0h expected %0h, latency %0d",
                       cycle, s_csa, s_cla, s_rca, e.prod, cycle - e.issued);
          end
        end
      end
      if (in_valid) begin
        sb.push_back('{64'(x) * 64'(y), cycle});
        issued++;
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NOPS; n++) begin
      @(negedge clk);
      if (n == NOPS / 2) begin
        // Reset with operands in flight: they must be dropped.
        in_valid = 1'b1; x = $urandom; y = $urandom;
        @(negedge clk);
        rst_n = 1'b0; in_valid = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        continue;
      end
      in_valid = ($urandom % 4) != 0;
      case (n)
        0: begin x = '1; y = '1; end
        1: begin x = '0; y = '1; end
        2: begin x = 32'h8000_0000; y = 32'h8000_0000; end
        default: begin x = $urandom; y = $urandom; end
      endcase
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0 || retired < NOPS / 2) begin
      failures++;
      $display("FAIL %0d products never appeared, %0d retired", sb.size(), retired);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

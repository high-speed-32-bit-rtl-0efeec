// Self-checking testbench for the CSA adder (csa_adder).
//
// Checks sum + (cout << N) = a + b + cin against the simulator's own '+':
// exhaustively at N = 2 and N = 8 (every a, b and cin), and with random and
// corner operands at the default width N = 32. Combinational, no clock; a
// watchdog ends the run if it stalls.
module tb_csa_adder;
  int checks = 0, failures = 0;

  logic [1:0]  a2, b2, s2;   logic cin2, co2;
  logic [7:0]  a8, b8, s8;   logic cin8, co8;
  logic [31:0] a32, b32, s32; logic cin32, co32;

  csa_adder #(.N(2)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(s2), .cout(co2));
  csa_adder #(.N(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(co8));
  csa_adder          dut32 (.a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(co32));

  task automatic check(input logic [32:0] got, input logic [32:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          a2 = 2'(i); b2 = 2'(j); cin2 = 1'(c); #1;
          check(33'({co2, s2}), 33'(i + j + c), "N=2");
        end
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a8 = 8'(i); b8 = 8'(j); cin8 = 1'(c); #1;
          check(33'({co8, s8}), 33'(i + j + c), "N=8");
        end
    for (int n = 0; n < 20000; n++) begin
      case (n)
        0: begin a32 = '1; b32 = '1; cin32 = 1'b1; end
        1: begin a32 = '1; b32 = '0; cin32 = 1'b1; end
        2: begin a32 = 32'h5555_5555; b32 = 32'hAAAA_AAAA; cin32 = 1'b1; end
        default: begin a32 = $urandom; b32 = $urandom; cin32 = 1'($urandom); end
      endcase
      #1;
      check({co32, s32}, 33'(a32) + 33'(b32) + 33'(cin32), "N=32");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

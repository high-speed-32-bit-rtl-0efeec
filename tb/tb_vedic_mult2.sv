// Self-checking testbench for the 2x2 Vedic multiplier: all 16 operand pairs
// against the simulator's multiplication. Combinational; a watchdog ends the
// run if it stalls.
module tb_vedic_mult2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] out;

  vedic_mult2 dut (.a, .b, .out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j); #1;
        checks++;
        if (out !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

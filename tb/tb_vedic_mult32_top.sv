// End-to-end testbench for the three-flavour 32x32 Vedic multiplier top,
// at its default (and only) size.
//
// Streams random and corner operand pairs through the top with gaps in
// in_valid, and resets it once with products in flight. A scoreboard holds
// the expected 64-bit product and issue cycle of every pair; every out_valid
// must deliver the oldest one on all three outputs exactly two cycles after
// issue. It also counts, from the operands alone, how often each mechanism of
// the 32-bit adder stage fires: the carry out of the cross-product adder
// (c1), the carry out of the middle adder (c2), both at once (the case the
// carry merge exists for), plus pipeline bubbles, back-to-back operands and
// the reset flush. Each must happen at least once. A watchdog ends the run.
module tb_vedic_mult32_top;
  localparam int LATENCY = 2;
  localparam int NOPS    = 20000;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0, n_bubble = 0, n_b2b = 0, n_flush = 0;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [31:0] x = '0, y = '0;
  logic        out_valid;
  logic [63:0] s_csa, s_cla, s_rca;
  logic        prev_valid = 1'b0;

  vedic_mult32_top dut (.clk, .rst_n, .in_valid, .x, .y, .out_valid, .s_csa, .s_cla, .s_rca);

  always #5 clk = ~clk;

  typedef struct { logic [63:0] prod; int issued; } entry_t;
  entry_t sb[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      if (sb.size() != 0) n_flush++;
      sb.delete();
      prev_valid <= 1'b0;
    end else begin
      if (out_valid) begin
        entry_t e;
        checks++;
        if (sb.size() == 0) begin
          failures++;
          $display("FAIL unexpected out_valid at cycle %0d", cycle);
        end else begin
          e = sb.pop_front();
          if (s_csa !== e.prod || s_cla !== e.prod || s_rca !== e.prod || cycle - e.issued != LATENCY) begin
            failures++;
            if (failures <= 10)
              $display("FAIL cycle %0d: csa %0h cla %0h rca %0h expected %0h, latency %0d",
                       cycle, s_csa, s_cla, s_rca, e.prod, cycle - e.issued);
          end
        end
      end
      if (in_valid) begin
        logic [32:0] xsum, mid;
        logic [31:0] qhh, qll;
        xsum = 33'(y[31:16]) * 33'(x[15:0]) + 33'(y[15:0]) * 33'(x[31:16]);
        qhh   = 32'(y[31:16]) * 32'(x[31:16]);
        qll   = 32'(y[15:0]) * 32'(x[15:0]);
        mid   = 33'(xsum[31:0]) + 33'({qhh[15:0], qll[31:16]});
        if (xsum[32]) n_c1++;
        if (mid[32]) n_c2++;
        if (xsum[32] && mid[32]) n_both++;
        if (prev_valid) n_b2b++;
        sb.push_back('{64'(x) * 64'(y), cycle});
      end else begin
        n_bubble++;
      end
      prev_valid <= in_valid;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input int count, input string what);
    $display("%-28s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NOPS; n++) begin
      @(negedge clk);
      if (n == NOPS / 2) begin
        in_valid = 1'b1; x = $urandom; y = $urandom;
        @(negedge clk);
        rst_n = 1'b0; in_valid = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        continue;
      end
      in_valid = ($urandom % 5) != 0;
      case (n)
        0: begin x = '1; y = '1; end
        1: begin x = 32'hFFFF_0000; y = 32'h0000_FFFF; end
        2: begin x = '0; y = '1; end
        3: begin x = 32'd1; y = 32'hDEAD_BEEF; end
        default: begin x = $urandom; y = $urandom; end
      endcase
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL %0d products never appeared", sb.size());
    end
    need(n_c1, "cross-adder carry (c1)");
    need(n_c2, "middle-adder carry (c2)");
    need(n_both, "both carries set");
    need(n_bubble, "pipeline bubbles");
    need(n_b2b, "back-to-back operands");
    need(n_flush, "reset with data in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rohc_divider: checks the sequential divider against the simulator's /
// and % operators for random, small and edge-case operands, the fixed
// latency, and the result for a zero divisor (all-ones quotient, remainder
// equal to the dividend).
`timescale 1ns/1ps
module tb_rohc_divider;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done;
  logic [31:0] a, b, q, r;

  rohc_divider #(.W(32)) dut (.clk, .rst_n, .start, .dividend(a), .divisor(b), .busy, .done, .quotient(q), .remainder(r));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      int cyc;
      case (n % 5)
        0: begin a = $urandom; b = $urandom; end
        1: begin a = $urandom; b = $urandom % 300; end
        2: begin a = $urandom % 1000; b = $urandom % 1000 + 1; end
        3: begin a = 32'hFFFF_FFFF; b = 32'd1 << ($urandom % 32); end
        default: begin a = $urandom; b = 32'd160; end
      endcase
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      if (b == 0) chk(q == 32'hFFFF_FFFF && r == a, "divide by zero");
      else chk(q == a / b && r == a % b, $sformatf("%0d / %0d = %0d r %0d", a, b, q, r));
      chk(cyc == 34, $sformatf("latency %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

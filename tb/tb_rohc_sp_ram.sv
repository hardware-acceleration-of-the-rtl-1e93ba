// tb_rohc_sp_ram: checks the single-port packet RAM: writes random words to
// random addresses and reads them back one cycle later against an array
// model; a write cycle does not disturb other addresses.
`timescale 1ns/1ps
module tb_rohc_sp_ram;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [256];

  rohc_sp_ram #(.DEPTH(256), .W(32)) dut (.clk, .we, .addr, .wdata, .rdata);

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
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1'b1; addr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0; addr = 8'($urandom); wdata = $urandom;
      if (we) model[addr] = wdata;
      else begin
        @(negedge clk);
        we = 1'b0;
        chk(rdata == model[addr], $sformatf("addr %0d", addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

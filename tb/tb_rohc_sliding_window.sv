// tb_rohc_sliding_window: checks the circular window update against a queue
// model: pushes go in at the slot after the newest entry, the count saturates
// at the window size, the oldest entry is overwritten when full, and no push
// leaves the window unchanged.
`timescale 1ns/1ps
module tb_rohc_sliding_window;
  int checks = 0, failures = 0;
  logic [3:0][15:0] win_in, win_out;
  logic [2:0] cnt_in, cnt_out;
  logic [1:0] ptr_in, ptr_out;
  logic push;
  logic [15:0] din;

  rohc_sliding_window #(.N(4), .W(16)) dut (.win_in, .cnt_in, .ptr_in, .push, .din, .win_out, .cnt_out, .ptr_out);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model [$];
    for (int run = 0; run < 50; run++) begin
      model.delete();
      win_in = '0; cnt_in = '0; ptr_in = '0;
      for (int n = 0; n < 40; n++) begin
        push = ($urandom % 4) != 0;
        din  = 16'($urandom);
        #1;
        if (push) begin
          model.push_back(din);
          if (model.size() > 4) void'(model.pop_front());
        end
        chk(cnt_out == 3'(model.size()), "count");
        // walk back from the newest entry
        for (int i = 0; i < model.size(); i++)
          chk(win_out[2'(ptr_out - 2'(i))] == model[model.size() - 1 - i], "content");
        if (!push) chk(win_out == win_in && ptr_out == ptr_in, "no push keeps window");
        win_in = win_out; cnt_in = cnt_out; ptr_in = ptr_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

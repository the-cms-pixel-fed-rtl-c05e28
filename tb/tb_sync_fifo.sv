`timescale 1ns/1ps
// tb_sync_fifo: self-checking test of sync_fifo against a queue model.
// Random writes and reads (including simultaneous ones) on a 16-entry FIFO;
// checks the head word, empty, full, level and nearly_full every cycle.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic [15:0] wr_data, rd_data;
  logic empty, full, nearly_full;
  logic [4:0] level;
  int checks = 0, failures = 0;
  logic [15:0] model[$];

  sync_fifo #(.WIDTH(16), .DEPTH_LOG2(4), .NEARLY_FULL(12)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == 16), "full");
      chk(level == 5'(model.size()), "level");
      chk(nearly_full == (model.size() >= 12), "nearly_full");
      if (model.size() != 0) chk(rd_data == model[0], "head");
      // bias: fill phase, then drain phase
      wr_en = !full && ($urandom_range(0, 99) < ((cyc / 300) % 2 ? 30 : 70));
      rd_en = !empty && ($urandom_range(0, 99) < ((cyc / 300) % 2 ? 70 : 30));
      wr_data = 16'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

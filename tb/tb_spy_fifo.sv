`timescale 1ns/1ps
// tb_spy_fifo: self-checking test of the spy memory.
// Before arming nothing is captured. After arm, the first 16 transferred
// words (mon_valid) are kept in order and capture stops when full; reading
// pops them in order. Re-arming in the middle of a read-out discards the old
// contents and starts a new record.
module tb_spy_fifo;
  logic clk = 0, rst_n = 0;
  logic arm = 0, mon_valid = 0, rd_en = 0, empty, full, capturing;
  logic [19:0] mon_data = 0, rd_data;
  int checks = 0, failures = 0;
  logic [19:0] expq[$];

  spy_fifo #(.WIDTH(20), .DEPTH_LOG2(4)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic traffic(int n);
    repeat (n) begin
      @(negedge clk);
      mon_valid = $urandom_range(0, 1);
      mon_data = 20'($urandom);
      if (mon_valid && capturing && expq.size() < 16) expq.push_back(mon_data);
    end
    @(negedge clk); mon_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    traffic(20);
    chk(empty && !capturing, "nothing captured before arm");
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); arm = 1;
      @(negedge clk); arm = 0;
      expq.delete();
      traffic(100);
      chk(full && !capturing && expq.size() == 16, "capture stops when full");
      for (int i = 0; i < (r == 1 ? 5 : 16); i++) begin
        @(negedge clk);
        chk(!empty && rd_data == expq[0], $sformatf("spy word %0d", i));
        void'(expq.pop_front());
        rd_en = 1;
        @(negedge clk); rd_en = 0;
      end
      if (r != 1) chk(empty, "read out completely");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

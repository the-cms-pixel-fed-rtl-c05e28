`timescale 1ns/1ps
// tb_async_fifo: self-checking test of async_fifo with unrelated clocks.
// Write clock 25 ns, read clock 12.5 ns (like 40 MHz builder to 80 MHz link)
// with random enables on a 16-entry FIFO; every word read must be the next
// one written, in order, and nothing may be lost or duplicated. The writer
// also fills the FIFO to full to check that full stops it.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [65:0] wr_data = '0, rd_data;
  logic [4:0] wlevel;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  logic [65:0] model[$];
  bit saw_full = 0, wdone = 0;

  async_fifo #(.WIDTH(66), .DEPTH_LOG2(4)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wr_data, .full, .wlevel,
    .rclk, .rrst_n(rst_n), .rd_en, .rd_data, .empty);

  always #12.5 wclk = ~wclk;
  always #6.25 rclk = ~rclk;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer: phase 1 writes faster than reads, phase 2 slower
  initial begin
    repeat (4) @(posedge wclk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge wclk);
      if (full) saw_full = 1;
      wr_en = !full && ($urandom_range(0, 99) < (i < 1500 ? 95 : 40));
      wr_data = {$urandom, $urandom, 2'(i)};
      @(posedge wclk);
      if (wr_en) begin model.push_back(wr_data); n_wr++; end
    end
    @(negedge wclk); wr_en = 0; wdone = 1;
  end

  initial begin
    repeat (6) @(posedge rclk);
    forever begin
      @(negedge rclk);
      rd_en = !empty && ($urandom_range(0, 99) < 25 || n_wr > 2000);
      if (rd_en) begin
        checks++;
        if (model.size() == 0 || rd_data != model[0]) begin
          failures++; $display("FAIL word %0d", n_rd);
        end
      end
      @(posedge rclk);
      if (rd_en) begin void'(model.pop_front()); n_rd++; end
      if (wdone && model.size() == 0) break;
    end
    checks++;
    if (!saw_full) begin failures++; $display("FAIL never full"); end
    checks++;
    if (n_rd != n_wr) begin failures++; $display("FAIL count %0d %0d", n_rd, n_wr); end
    $display("words %0d", n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ns/1ps
// tb_column_histogram: self-checking test of the column histogram.
// After the reset-time clear, 3000 random hits (some with columns beyond
// the chip, which must be ignored) are counted and every bin is compared with
// a reference count; then a clear must empty all bins within N_COLS cycles.
// A 4-bit counter variant checks saturation.
module tb_column_histogram;
  logic clk = 0, rst_n = 0;
  logic hit_valid = 0, clear = 0, clearing, clearing4;
  logic [5:0] hit_col = 0, rd_addr = 0;
  logic [15:0] rd_data;
  logic [3:0] rd4;
  int checks = 0, failures = 0;
  int ref_cnt[64];

  column_histogram #(.N_COLS(52), .CNT_BITS(16)) dut (.*);
  column_histogram #(.N_COLS(52), .CNT_BITS(4)) dut4 (
    .clk, .rst_n, .hit_valid, .hit_col, .clear, .clearing(clearing4), .rd_addr, .rd_data(rd4));

  always #12.5 clk = ~clk;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (53) @(posedge clk);
    #1 chk(!clearing, "clear after reset ends in N_COLS cycles");
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      hit_valid = $urandom_range(0, 3) != 0;
      hit_col = 6'($urandom_range(0, 20) == 0 ? $urandom_range(52, 63) : $urandom_range(0, 51));
      if (hit_valid && hit_col < 52) ref_cnt[hit_col]++;
    end
    @(negedge clk); hit_valid = 0;
    for (int c = 0; c < 64; c++) begin
      rd_addr = 6'(c); #1;
      chk(rd_data == 16'(c < 52 ? ref_cnt[c] : 0), $sformatf("bin %0d = %0d, expected %0d", c, rd_data, ref_cnt[c]));
      if (c < 52) chk(rd4 == 4'(ref_cnt[c] > 15 ? 15 : ref_cnt[c]), "saturating bin");
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    repeat (53) @(negedge clk);
    chk(!clearing, "clear finished");
    for (int c = 0; c < 52; c++) begin
      rd_addr = 6'(c); #1;
      chk(rd_data == 0, "bin cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

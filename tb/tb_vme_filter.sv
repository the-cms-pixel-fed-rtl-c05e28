`timescale 1ns/1ps
// tb_vme_filter: self-checking test of the VME input filter.
// Each of 8 lines gets random spikes of 1..STABLE-1 clocks, which must never
// reach the output, and steady levels, which must appear exactly 2 + STABLE
// clocks after the input changed.
module tb_vme_filter;
  localparam int W = 8, ST = 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;
  logic [W-1:0] hist[$];

  vme_filter #(.WIDTH(W), .STABLE(ST), .INIT('0)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] level = '0, prev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      // a spike on random lines
      @(negedge clk);
      d = level ^ W'($urandom);
      repeat ($urandom_range(1, ST - 1)) @(negedge clk);
      d = level;
      repeat (ST + 3) begin
        @(negedge clk);
        checks++;
        if (q != level) begin failures++; $display("FAIL spike passed %h %h", q, level); end
      end
      // a real change
      prev  = level;
      level = W'($urandom);
      d = level;
      repeat (ST + 1) @(negedge clk);
      checks++;
      if (q != prev) begin failures++; $display("FAIL change passed before 2+STABLE"); end
      @(negedge clk);
      checks++;
      if (q != level) begin failures++; $display("FAIL change not passed at 2+STABLE"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ns/1ps
// tb_adc_sync: self-checking test of the ADC clock-domain crossing.
// Four synchronisers see a counting ADC pattern. Three sample at 40 MHz,
// shifted by 0, 8 and 19.2 ns (multiples of the 1.6 ns phase step), into the
// 80 MHz main clock: every sample must come out exactly once and in order
// (each one more than the last), at the sampling rate, without a lost flag.
// The fourth samples faster than the main clock: it must flag lost.
module tb_adc_sync;
  logic clk = 0, rst_n = 0;
  logic [3:0] adc_clk = '0;
  logic [3:0][9:0] adc_data = '0, sample;
  logic [3:0] sample_valid, lost;
  int checks = 0, failures = 0;
  int nvalid[3] = '{0, 0, 0};
  logic [9:0] last[3];
  bit started[3] = '{0, 0, 0};

  for (genvar i = 0; i < 4; i++) begin : g_dut
    adc_sync #(.ADC_BITS(10), .DEPTH_LOG2(4)) dut (
      .adc_clk(adc_clk[i]), .adc_data(adc_data[i]), .clk, .rst_n,
      .sample(sample[i]), .sample_valid(sample_valid[i]), .lost(lost[i]));
    always @(posedge adc_clk[i]) adc_data[i] <= adc_data[i] + 1'b1;
  end

  always #6.25 clk = ~clk;
  initial begin #0;    forever #12.5 adc_clk[0] = ~adc_clk[0]; end
  initial begin #8;    forever #12.5 adc_clk[1] = ~adc_clk[1]; end
  initial begin #19.2; forever #12.5 adc_clk[2] = ~adc_clk[2]; end
  initial begin #3;    forever #6.0 adc_clk[3] = ~adc_clk[3]; end

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        if (sample_valid[i]) begin
          if (started[i]) chk(sample[i] == last[i] + 10'd1, $sformatf("consecutive samples (%0d)", i));
          started[i] = 1;
          last[i] = sample[i];
          nvalid[i]++;
        end
      end
    end
    for (int i = 0; i < 3; i++) begin
      chk(!lost[i], "no loss from a 40 MHz sampling clock");
      chk(nvalid[i] >= 1995 && nvalid[i] <= 2000, $sformatf("samples delivered at the sampling rate (%0d)", nvalid[i]));
    end
    chk(lost[3], "loss flagged for a fast sampling clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

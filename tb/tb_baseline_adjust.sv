`timescale 1ns/1ps
// tb_baseline_adjust: self-checking test of the pedestal correction loop.
// A black level with small noise starts 130 counts below the target, then the
// drift moves it 60 counts up. After each change the corrected black level must
// settle within TOL+2 of the target within 8 windows, and the output must equal
// the input plus the reported offset, clamped to 0..1023, one cycle later.
module tb_baseline_adjust;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, black_valid, out_valid;
  logic [9:0] in_sample = '0, target = 10'd450, out_sample;
  logic signed [10:0] offset;
  int checks = 0, failures = 0;
  int base = 320;

  baseline_adjust #(.ADC_BITS(10), .TOL(4), .STEP_LOG2(4)) dut (.*);

  assign black_valid = out_valid;   // every sample is idle black here

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
    int dev, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      n = 0;
      for (int i = 0; i < 16 * 12; i++) begin
        @(negedge clk);
        in_valid  = 1;
        in_sample = 10'(base + $urandom_range(0, 4) - 2);
        if (i >= 16 * 8) begin
          @(posedge clk); #1;
          dev = int'(out_sample) - 450;
          chk(dev <= 6 && dev >= -6, $sformatf("settled level %0d", out_sample));
          chk(int'(out_sample) == int'(in_sample) + int'(offset), "out = in + offset");
        end
      end
      base = 380;
    end
    chk(offset == 11'sd70 || (offset >= 11'sd66 && offset <= 11'sd74), $sformatf("offset %0d", offset));
    // clamping: a huge input with positive offset stays at 1023
    @(negedge clk); in_sample = 10'd1020;
    @(posedge clk); #1;
    chk(out_sample == 10'd1023, "clamp high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

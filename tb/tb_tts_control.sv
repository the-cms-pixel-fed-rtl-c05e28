`timescale 1ns/1ps
// tb_tts_control: self-checking test of the TTS state logic.
// Walks through the states and checks code and priority one cycle after each
// cause: READY, WARNING, BUSY over WARNING, OUT_OF_SYNC over BUSY, ERROR
// sticky over everything until cleared. Then 3000 cycles of random inputs
// (rare critical and clear pulses) are compared cycle by cycle with a
// reference model: the error flag is set by critical and reset by clear, and
// the code follows the priority one cycle after the inputs (two cycles after
// a critical pulse, which first sets the error flag).
module tb_tts_control;
  import fed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic busy_in = 0, warn_in = 0, oos_in = 0, critical = 0, clear = 0;
  logic [3:0] tts;
  int checks = 0, failures = 0;

  tts_control dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_tts(logic [3:0] code, string what);
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (tts !== code) begin failures++; $display("FAIL %s: %b expected %b", what, tts, code); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_tts(TTS_READY, "ready");
    warn_in = 1;  expect_tts(TTS_WARN, "warning");
    busy_in = 1;  expect_tts(TTS_BUSY, "busy over warning");
    busy_in = 0; warn_in = 0; expect_tts(TTS_READY, "back to ready");
    oos_in = 1; expect_tts(TTS_OOS, "out of sync");
    busy_in = 1; expect_tts(TTS_OOS, "out of sync over busy");
    oos_in = 0; expect_tts(TTS_BUSY, "busy once back in sync");
    busy_in = 0; expect_tts(TTS_READY, "ready again");
    oos_in = 1;
    pulse(critical);
    expect_tts(TTS_ERROR, "error over out of sync");
    oos_in = 0;
    repeat (10) @(posedge clk);
    expect_tts(TTS_ERROR, "error is sticky");
    pulse(clear);
    expect_tts(TTS_READY, "cleared");
    // random phase against a reference model
    begin
      bit err_m = 0;
      logic [3:0] exp_tts = TTS_READY;
      repeat (3000) begin
        @(negedge clk);
        checks++;
        if (tts !== exp_tts) begin failures++; $display("FAIL random: %b expected %b at %0t", tts, exp_tts, $time); end
        busy_in  = $urandom_range(0, 3) == 0;
        warn_in  = $urandom_range(0, 2) == 0;
        oos_in   = $urandom_range(0, 5) == 0;
        critical = $urandom_range(0, 60) == 0;
        clear    = $urandom_range(0, 40) == 0;
        // the register update at the next rising edge
        exp_tts = err_m ? TTS_ERROR : oos_in ? TTS_OOS : busy_in ? TTS_BUSY : warn_in ? TTS_WARN : TTS_READY;
        if (clear) err_m = 0; else if (critical) err_m = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

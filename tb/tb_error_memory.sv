`timescale 1ns/1ps
// tb_error_memory: self-checking test of the error memory.
// Random reports from 11 sources, sometimes several in one cycle: the entry
// of the lowest-numbered source must be stored (code, input, event number,
// critical flag), the others counted as lost, and a critical pulse must
// follow a stored critical report. Entries are read back in order. Filling
// the 16-entry memory checks that further reports are counted as lost.
module tb_error_memory;
  import fed_pkg::*;
  localparam int NS = 11;
  logic clk = 0, rst_n = 0;
  err_t [NS-1:0] err = '0;
  logic rd_en = 0, empty, critical;
  logic [31:0] rd_data;
  logic [15:0] lost;
  int checks = 0, failures = 0;
  logic [18:0] expq[$];   // entry without the time stamp
  int exp_lost = 0, n_crit = 0, exp_crit = 0, n_full_drop = 0;

  error_memory #(.N_SRC(NS), .DEPTH_LOG2(4)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n && critical) n_crit++;

  task automatic drain();
    while (!empty) begin
      @(negedge clk);
      chk(expq.size() != 0 && rd_data[31:13] == expq[0], $sformatf("entry %h", rd_data));
      if (expq.size() != 0) void'(expq.pop_front());
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
    end
    chk(expq.size() == 0, "all entries read");
  endtask

  initial begin
    int first, act;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 24; k++) begin
        @(negedge clk);
        first = -1; act = 0;
        for (int s = 0; s < NS; s++) begin
          err[s] = '0;
          if ($urandom_range(0, 99) < 8) begin
            err[s].valid = 1;
            err[s].critical = $urandom_range(0, 1);
            err[s].code = err_code_t'($urandom_range(1, 6));
            err[s].chan = 6'($urandom_range(1, 36));
            err[s].evn = 8'($urandom);
            act++;
            if (first < 0) first = s;
          end
        end
        if (first >= 0) begin
          if (expq.size() < 16) begin
            expq.push_back({err[first].code, err[first].chan, err[first].evn, err[first].critical});
            exp_lost += act - 1;
            if (err[first].critical) exp_crit++;
          end else begin exp_lost += act; n_full_drop++; end
        end
      end
      @(negedge clk); err = '0;
      if (round % 4 != 3) drain();   // every fourth round lets the memory fill up
    end
    drain();
    repeat (2) @(negedge clk);
    chk(lost == 16'(exp_lost), $sformatf("lost %0d expected %0d", lost, exp_lost));
    chk(n_full_drop > 0, "memory filled up");
    chk(n_crit == exp_crit, $sformatf("critical pulses %0d expected %0d", n_crit, exp_crit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

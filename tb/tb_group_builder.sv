`timescale 1ns/1ps
// tb_group_builder: self-checking test of the FIFO-1 to FIFO-2 event builder.
// Five FIFO-1 are modelled as queues. 40 triggers are sent; for each event
// every input gets a block (header, 0..6 hits, trailer) after a random delay.
// Some events give one input a wrong event number (an error word must follow
// its header, with a report and a mismatch pulse) and some leave one
// input without data (a time-out error word must replace it). FIFO-2
// back-pressure (nearly full) is toggled at random. The FIFO-2 entries are
// unpacked and compared word by word with the expected event, which must end
// on an entry flagged eoe. Input 1 is wrong in events 30..32: oos must rise
// after the third and fall with the next match.
module tb_group_builder;
  import fed_pkg::*;
  import tb_fed_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic trig_valid = 0;
  logic [7:0] trig_evn = 0;
  logic [N-1:0] f1_empty, f1_rd;
  fed_word_t [N-1:0] f1_data;
  logic f2_wr, f2_nearly_full = 0, evn_match, evn_mismatch, oos, trig_overflow;
  bus_word_t f2_data;
  err_t err;
  int checks = 0, failures = 0;
  logic [31:0] f1q[N][$];
  logic [31:0] expq[$];
  int n_errevn = 0, n_mismatch = 0, n_match = 0, n_crit = 0, n_tmo = 0, n_eoe = 0, n_stall = 0;

  group_builder #(.N_IN(N), .TIMEOUT(200), .TRIG_DEPTH_LOG2(5), .OOS_LIMIT(3)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #20000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always_comb
    for (int i = 0; i < N; i++) begin
      f1_empty[i] = f1q[i].size() == 0;
      f1_data[i]  = f1_empty[i] ? '0 : f1q[i][0];
    end

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) if (f1_rd[i]) void'(f1q[i].pop_front());
    if (rst_n) begin
      chk(!(f1_rd != 0 && f2_nearly_full), "no copy while FIFO-2 nearly full");
      if (f2_nearly_full) n_stall++;
      if (evn_mismatch) n_mismatch++;
      if (evn_match) n_match++;
      if (err.valid && err.critical) n_crit++;
      if (err.valid && err.code == ERR_EVN) n_errevn++;
      if (err.valid && err.code == ERR_GRP_TMO) n_tmo++;
      if (f2_wr) begin
        if (f2_data.hi_v) begin
          chk(expq.size() != 0 && f2_data.data[63:32] == expq[0], $sformatf("hi word %h", f2_data.data[63:32]));
          if (expq.size() != 0) void'(expq.pop_front());
        end
        if (f2_data.lo_v) begin
          chk(expq.size() != 0 && f2_data.data[31:0] == expq[0], $sformatf("lo word %h", f2_data.data[31:0]));
          if (expq.size() != 0) void'(expq.pop_front());
        end
        if (f2_data.eoe) begin
          n_eoe++;
          chk(expq.size() == 0, "eoe at end of event");
        end
      end
    end
  end

  always @(negedge clk) f2_nearly_full <= ($urandom_range(0, 99) < 15);

  initial begin
    hit_s hits[$];
    logic [31:0] blk[$];
    int bad_in, miss_in, evn;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 1; e <= 40; e++) begin
      evn = e & 255;
      bad_in  = (e % 5 == 2) ? $urandom_range(0, N - 1) : -1;
      if (e >= 30 && e <= 32) bad_in = 1;   // three in a row: out of sync
      miss_in = (e % 7 == 3) ? ((bad_in >= 0) ? (bad_in + 1) % N : $urandom_range(0, N - 1)) : -1;
      @(negedge clk);
      trig_valid = 1; trig_evn = 8'(evn);
      @(negedge clk);
      trig_valid = 0;
      for (int i = 0; i < N; i++) begin
        if (i == miss_in) begin
          expq.push_back(word(0, 29, 6, i, evn));
          continue;
        end
        blk.delete();
        random_hits(hits, $urandom_range(0, 6), 4);
        expect_event(blk, 11 + i, (i == bad_in) ? evn + 3 : evn, hits, 64);
        foreach (blk[k]) begin
          expq.push_back(blk[k]);
          if (k == 0 && i == bad_in) expq.push_back(word(11 + i, 29, 5, 0, evn));
        end
        repeat ($urandom_range(0, 30)) @(negedge clk);
        foreach (blk[k]) f1q[i].push_back(blk[k]);
      end
      // wait for the event to leave
      for (int w = 0; w < 3000 && expq.size() != 0; w++) @(negedge clk);
      repeat (4) @(negedge clk);
      chk(expq.size() == 0, $sformatf("event %0d complete", e));
      chk(oos == (e == 32), $sformatf("oos after event %0d", e));
    end
    chk(n_eoe == 40, "one eoe per event");
    chk(n_mismatch == 10 && n_crit == 0, $sformatf("mismatches %0d %0d", n_mismatch, n_crit));
    chk(n_errevn == 10, "mismatches reported");
    chk(n_tmo == 6, $sformatf("time-outs %0d", n_tmo));
    chk(n_match == 40 * N - 10 - 6, $sformatf("matches %0d", n_match));
    chk(n_stall > 0, "back-pressure exercised");
    chk(!trig_overflow, "no trigger overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

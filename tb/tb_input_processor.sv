`timescale 1ns/1ps
// tb_input_processor: self-checking test of the per-input data processor.
// Feeds generated link streams (tb_fed_pkg) and compares every FIFO-1 word
// with the reference words: normal events with 0..12 hits on up to 8 chips,
// an event above MAX_HITS (truncation), an event while FIFO-1 reports nearly
// full (reduced to header and trailer, busy raised, error reported), an
// invalid address, and a stream whose trailer never comes (time-out). Also
// checks that idle samples are flagged as black level, that every hit is
// reported to the histogram with column 2*dcol + pix[0], and that a word
// appears in the cycle its last sample is presented.
module tb_input_processor;
  import fed_pkg::*;
  import tb_fed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, fifo_nearly_full = 0, fifo_full = 0;
  sample_t in_sample = 10'(BLACK);
  levels_t thr;
  logic wr_en, black_valid, hit_valid, busy;
  fed_word_t wr_data;
  logic [5:0] hit_col;
  err_t err;
  int checks = 0, failures = 0;
  logic [31:0] expq[$];
  int colq[$];
  int n_black = 0, n_err[16];
  int n_busy = 0;

  input_processor #(.CHANNEL(6'd7), .MAX_HITS(10), .TIMEOUT(300)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #5000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // compare outputs at every sample
  always @(negedge clk) if (rst_n && in_valid) begin
    if (wr_en) begin
      if (expq.size() == 0) chk(0, $sformatf("unexpected word %h", wr_data));
      else begin
        chk(wr_data == expq[0], $sformatf("word %h expected %h", wr_data, expq[0]));
        void'(expq.pop_front());
      end
    end
    if (hit_valid) begin
      chk(colq.size() != 0 && hit_col == 6'(colq[0]), "hit column");
      if (colq.size() != 0) void'(colq.pop_front());
    end
    if (black_valid) n_black++;
    if (err.valid) n_err[err.code]++;
    if (err.valid) chk(err.critical == (err.code == ERR_IN_TMO), "only a time-out is critical");
    if (busy) n_busy++;
  end

  task automatic play(int q[$]);
    foreach (q[i]) begin
      @(posedge clk); #1;
      in_valid = 1; in_sample = 10'(q[i]);
    end
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    int q[$];
    hit_s hits[$];
    thr.ub = 250; thr.lvl = {10'd800, 10'd700, 10'd600, 10'd500, 10'd400};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // normal events
    for (int e = 0; e < 30; e++) begin
      q.delete();
      random_hits(hits, $urandom_range(0, e < 20 ? 10 : 12), 8);
      push_idle(q, $urandom_range(1, 20));
      push_event(q, e * 37 + 5, 8, hits);
      expect_event(expq, 7, e * 37 + 5, hits, 10);
      foreach (hits[i]) if (i < 10) colq.push_back(2 * hits[i].dcol + hits[i].pix % 2);
      play(q);
      chk(expq.size() == 0, "all words of event written in time");
    end
    chk(n_err[ERR_TRUNC] > 0, "truncation happened");
    chk(n_black > 0, "idle black samples flagged");
    // reduced mode: FIFO-1 nearly full from the start of the event
    q.delete();
    random_hits(hits, 5, 4);
    push_event(q, 200, 4, hits);
    expq.push_back(word(7, 28, 0, 0, 200));
    expq.push_back(word(7, 30, 2, 0, 200));
    fifo_nearly_full = 1;
    play(q);
    fifo_nearly_full = 0;
    chk(n_err[ERR_REDUCED] == 1, "reduced reported once");
    chk(n_busy > 0, "busy while reduced");
    chk(expq.size() == 0, "reduced event");
    // invalid address: double column 30 is outside the chip
    q.delete();
    hits.delete();
    hits.push_back('{roc: 1, dcol: 30, pix: 5, ph: 600});
    hits.push_back('{roc: 2, dcol: 3, pix: 7, ph: 700});
    push_event(q, 201, 2, hits);
    expq.push_back(word(7, 28, 0, 0, 201));
    expq.push_back(word(7, 2, 3, 7, 700 >> 2));
    expq.push_back(word(7, 30, 4, 1, 201));
    colq.push_back(7);
    play(q);
    chk(n_err[ERR_INVALID] == 1, "invalid reported");
    chk(expq.size() == 0, "invalid event");
    // time-out: header, then the trailer never comes
    q.delete();
    repeat (3) q.push_back(UB);
    q.push_back(BLACK);
    repeat (4) q.push_back(lv(1));
    // a link stuck sending chip headers: no hit, no trailer
    repeat (110) begin q.push_back(UB); q.push_back(BLACK); q.push_back(BLACK); end
    expq.push_back(word(7, 28, 0, 0, 85));
    expq.push_back(word(7, 30, 8, 0, 85));
    play(q);
    chk(n_err[ERR_IN_TMO] == 1, "time-out reported");
    chk(expq.size() == 0, "time-out event");
    // decoder is back in idle: a normal event works
    q.delete();
    random_hits(hits, 3, 2);
    push_event(q, 9, 2, hits);
    expect_event(expq, 7, 9, hits, 10);
    foreach (hits[i]) colq.push_back(2 * hits[i].dcol + hits[i].pix % 2);
    play(q);
    chk(expq.size() == 0 && colq.size() == 0, "event after time-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

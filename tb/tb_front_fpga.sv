`timescale 1ns/1ps
// tb_front_fpga: self-checking test of one front FPGA (nine inputs).
// Each input is driven from its own sampling clock (phases 0..8 x 1.6 ns) and
// carries a different pedestal shift (-80..+80 counts), which the pedestal
// loop must remove during the idle period before the first event: without it
// the address levels of the shifted inputs would decode wrongly. 25 triggers
// follow; each input gets an event with 0..8 hits on 4 chips, input 3 once a
// wrong event number and input 7 once too many hits (truncation). Both FIFO-2
// are read and their unpacked words compared with the expected group events.
// Afterwards the error memory must hold the truncation and mismatch reports
// and the histogram of input 2 must match its hits.
module tb_front_fpga;
  import fed_pkg::*;
  import tb_fed_pkg::*;
  localparam int N = 9;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] adc_clk = '0;
  sample_t [N-1:0] adc_data;
  levels_t thr;
  sample_t target = 10'(BLACK);
  logic trig_valid = 0;
  logic [7:0] trig_evn = 0;
  logic [1:0] f2_rd, f2_empty;
  bus_word_t [1:0] f2_data;
  logic [3:0] hist_sel = 4'd2;
  logic hist_clear = 0;
  logic [5:0] hist_addr = 0;
  logic [15:0] hist_data, err_lost;
  logic err_rd = 0, err_empty, critical, evn_match, evn_mismatch, oos, busy, trig_overflow;
  logic [31:0] err_data;
  logic [N-1:0] sync_lost;
  int checks = 0, failures = 0;
  int sq[N][$];
  logic [31:0] expq[2][$];
  int shift[N];
  int hist_ref[64];
  int n_mm = 0, n_crit = 0;

  front_fpga #(.FIRST_CH(6'd10), .MAX_HITS(6), .IN_TIMEOUT(2048), .GRP_TIMEOUT(4000)) dut (.*);

  always #12.5 clk = ~clk;
  for (genvar i = 0; i < N; i++) begin : g_in
    initial begin #(1.6 * i); forever #12.5 adc_clk[i] = ~adc_clk[i]; end
    always @(posedge adc_clk[i]) begin
      int v;
      v = (sq[i].size() != 0) ? sq[i].pop_front() : BLACK;
      v += shift[i];
      adc_data[i] <= sample_t'(v < 0 ? 0 : (v > 1023 ? 1023 : v));
    end
  end

  initial begin
    #40000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // FIFO-2 readers: pop whenever not empty, compare unpacked words
  assign f2_rd = ~f2_empty;
  always @(posedge clk) if (rst_n) begin
    if (evn_mismatch) n_mm++;
    if (critical) n_crit++;
    for (int g = 0; g < 2; g++) if (!f2_empty[g]) begin
      if (f2_data[g].hi_v) begin
        chk(expq[g].size() != 0 && f2_data[g].data[63:32] == expq[g][0], $sformatf("group %0d word %h exp %h", g, f2_data[g].data[63:32], expq[g].size() ? expq[g][0] : 0));
        if (expq[g].size() != 0) void'(expq[g].pop_front());
      end
      if (f2_data[g].lo_v) begin
        chk(expq[g].size() != 0 && f2_data[g].data[31:0] == expq[g][0], $sformatf("group %0d word %h exp %h", g, f2_data[g].data[31:0], expq[g].size() ? expq[g][0] : 0));
        if (expq[g].size() != 0) void'(expq[g].pop_front());
      end
    end
  end

  initial begin
    hit_s hits[$];
    logic [31:0] blk[$];
    int q[$];
    int evn_in;
    thr.ub = 250; thr.lvl = {10'd800, 10'd700, 10'd600, 10'd500, 10'd400};
    for (int i = 0; i < N; i++) shift[i] = (i - 4) * 20;
    foreach (hist_ref[c]) hist_ref[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);   // idle black: pedestal loops settle
    for (int e = 1; e <= 25; e++) begin
      @(negedge clk); trig_valid = 1; trig_evn = 8'(e);
      @(negedge clk); trig_valid = 0;
      for (int i = 0; i < N; i++) begin
        evn_in = (i == 3 && e == 10) ? e + 1 : e;
        random_hits(hits, (i == 7 && e == 5) ? 9 : $urandom_range(0, 6), 4);
        q.delete();
        push_idle(q, $urandom_range(2, 30));
        push_event(q, evn_in, 4, hits);
        blk.delete();
        expect_event(blk, 10 + i, evn_in, hits, 6);
        foreach (blk[k]) begin
          expq[i < 5 ? 0 : 1].push_back(blk[k]);
          if (k == 0 && evn_in != e) expq[0].push_back(word(10 + i, 29, 5, 0, e));
        end
        if (i == 2) foreach (hits[h]) if (h < 6) hist_ref[2 * hits[h].dcol + hits[h].pix % 2]++;
        foreach (q[k]) sq[i].push_back(q[k]);
      end
      for (int w = 0; w < 3000 && (expq[0].size() != 0 || expq[1].size() != 0); w++) @(negedge clk);
      chk(expq[0].size() == 0 && expq[1].size() == 0, $sformatf("event %0d built", e));
    end
    chk(n_mm == 1 && n_crit == 0, "one mismatch, not critical");
    chk(sync_lost == 0, "no ADC sample lost");
    // error memory: truncation (code 1) of input 17 in event 5, mismatch (code 5) of input 13
    begin
      int n_trunc = 0, n_evn = 0;
      while (!err_empty) begin
        @(negedge clk);
        if (err_data[31:28] == 4'd1 && err_data[27:22] == 6'd17 && err_data[21:14] == 8'd5) n_trunc++;
        if (err_data[31:28] == 4'd5 && err_data[27:22] == 6'd13 && !err_data[13]) n_evn++;
        err_rd = 1; @(negedge clk); err_rd = 0;
      end
      chk(n_trunc == 1 && n_evn == 1, $sformatf("error memory entries %0d %0d", n_trunc, n_evn));
    end
    for (int c = 0; c < 52; c++) begin
      hist_addr = 6'(c); #1;
      chk(hist_data == 16'(hist_ref[c]), $sformatf("histogram column %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

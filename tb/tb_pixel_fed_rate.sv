`timescale 1ns/1ps
// tb_pixel_fed_rate: trigger-rate test of the whole board at default sizes.
//
// Two sustained loads are run, one after the other:
//   1. 100 kHz triggers (one every 800 clocks of 12.5 ns = 10 us) with about
//      20 hits per link and event (15..25, random) on 16 readout chips;
//   2. 300 kHz triggers (one every 267 clocks = 3.3 us) with short events of
//      0..4 hits per link on 16 readout chips.
// Then a burst of 16 triggers 0.5 us apart, during which input 1 holds back
// all its data and sends its 16 events only after the other inputs have sent
// theirs, as a readout chip with a full event buffer would: the inputs are
// 16 events apart (measured at the FIFO-1 writes of inputs 1 and 2), and all
// 16 fragments must still be complete and correct.
// All 36 links send their event right after each trigger, each on its own
// sampling-clock phase and with its own pedestal shift. Each S-Link fragment
// is checked word for word against a reference built independently from the
// generated hits: event number, the 32-bit words of all 36 links in order,
// the length field and a clean trailer. The test also checks that the board
// keeps up without throttling: TTS stays READY during the whole run, every
// fragment leaves the board within a fixed latency of its trigger (25 us at
// 100 kHz, 10 us at 300 kHz). The S-Link is always ready here; the S-Link
// load of each phase is printed.
module tb_pixel_fed_rate;
  import fed_pkg::*;
  import tb_fed_pkg::*;

  localparam int NI = 36, NROC = 16;
  localparam int N1 = 30, GAP1 = 800;   // 100 kHz phase
  localparam int N2 = 60, GAP2 = 267;   // 300 kHz phase
  localparam int N3 = 16, GAP3 = 40;   // skew burst
  localparam int NE = N1 + N2 + N3;

  logic clk = 0, rst_n = 0;
  logic [35:0] adc_clk = '0;
  sample_t [35:0] adc_data;
  logic ttc_l1a = 0;
  logic [11:0] ttc_bx = 0;
  logic slink_lff_n = 1, slink_uctrl_n, slink_uwen_n;
  logic [63:0] slink_ud;
  logic [3:0] tts;
  logic [1:0] vme_ds_n = 2'b11;
  logic vme_write_n = 1;
  logic [23:0] vme_addr = '0;
  logic [31:0] vme_data_in = '0, vme_data_out;
  logic vme_data_oe, vme_dtack_n;
  logic [35:0][3:0] adc_phase;
  logic [35:0][7:0] dc_dac;

  pixel_fed dut (.*);

  int checks = 0, failures = 0;
  int sq[NI][$];
  int shift[NI];
  logic [31:0] expq[NE+1][$];   // expected 32-bit words per event
  realtime t_trig[NE+1];
  int n_frag = 0, not_ready = 0, words_sent = 0;
  realtime max_lat1 = 0, max_lat2 = 0;
  logic [63:0] fragq[$];
  bit running = 0, frag_open = 0;
  int held[$];   // input 1's data held back during the burst
  int skew_max = 0;

  always #6.25 clk = ~clk;
  for (genvar i = 0; i < NI; i++) begin : g_link
    initial begin #(1.6 * (i % 16)); forever #12.5 adc_clk[i] = ~adc_clk[i]; end
    always @(posedge adc_clk[i]) begin
      int v;
      v = (sq[i].size() != 0) ? sq[i].pop_front() : BLACK;
      v += shift[i];
      adc_data[i] <= sample_t'(v < 0 ? 0 : (v > 1023 ? 1023 : v));
    end
  end

  initial begin
    #5000000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // fragment check against the reference
  task automatic check_fragment(logic [63:0] f[$]);
    logic [31:0] got[$];
    int e;
    realtime lat;
    e = int'(f[0][55:32]);
    n_frag++;
    chk(e == n_frag, $sformatf("fragment %0d in order (event %0d)", n_frag, e));
    if (e < 1 || e > NE) return;
    for (int k = 1; k < f.size() - 1; k++) begin
      got.push_back(f[k][63:32]);
      if (f[k][31:0] != 0) got.push_back(f[k][31:0]);
    end
    chk(got.size() == expq[e].size(), $sformatf("event %0d: %0d words, expected %0d", e, got.size(), expq[e].size()));
    for (int k = 0; k < got.size() && k < expq[e].size(); k++)
      chk(got[k] == expq[e][k], $sformatf("event %0d word %0d: %h expected %h", e, k, got[k], expq[e][k]));
    chk(f[f.size() - 1][55:32] == 24'(f.size()), $sformatf("event %0d length field", e));
    chk(f[f.size() - 1][12] == 1'b0, $sformatf("event %0d: no error words", e));
    lat = $realtime - t_trig[e];
    if (e <= N1) begin if (lat > max_lat1) max_lat1 = lat; end
    else if (e <= N1 + N2 && lat > max_lat2) max_lat2 = lat;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (running && tts != TTS_READY) not_ready++;
    if (!slink_uwen_n) begin
      words_sent++;
      if (!slink_uctrl_n && slink_ud[63:60] == 4'h5) begin
        chk(!frag_open, "header inside a fragment");
        frag_open = 1;
        fragq.delete();
      end
      fragq.push_back(slink_ud);
      if (!slink_uctrl_n && slink_ud[63:60] == 4'hA) begin
        frag_open = 0;
        check_fragment(fragq);
      end
    end
  end

  task automatic send_event(int e, int hmin, int hmax, bit hold = 0);
    hit_s hits[$];
    int q[$];
    @(negedge clk);
    ttc_l1a = 1; ttc_bx = 12'($urandom);
    t_trig[e] = $realtime;
    @(negedge clk);
    ttc_l1a = 0;
    expq[e].delete();
    for (int i = 0; i < NI; i++) begin
      random_hits(hits, $urandom_range(hmin, hmax), NROC);
      expect_event(expq[e], i + 1, e, hits, 64);
      q.delete();
      push_idle(q, $urandom_range(1, 6));
      push_event(q, e, NROC, hits);
      if (hold && i == 0) foreach (q[k]) held.push_back(q[k]);
      else foreach (q[k]) sq[i].push_back(q[k]);
    end
  endtask

  // event number in the last header word written into FIFO-1 of inputs 1 and 2
  int last_hdr[2] = '{0, 0};
  for (genvar i = 0; i < 2; i++) begin : g_skew
    always @(posedge clk) if (rst_n && dut.g_front[0].u_front.f1_wr[i] &&
                              dut.g_front[0].u_front.f1_wdata[i][25:21] == 5'd28) begin
      last_hdr[i] = int'(dut.g_front[0].u_front.f1_wdata[i][7:0]);
      if (last_hdr[1] - last_hdr[0] > skew_max && i == 1) skew_max = last_hdr[1] - last_hdr[0];
    end
  end

  initial begin
    int w0, t0, w1, t1;
    for (int i = 0; i < NI; i++) shift[i] = ((i % 9) - 4) * 10;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (800) @(negedge clk);   // pedestal loops settle
    running = 1;
    w0 = words_sent; t0 = int'($realtime);
    for (int e = 1; e <= N1; e++) begin
      send_event(e, 15, 25);
      repeat (GAP1 - 2) @(negedge clk);
    end
    w1 = words_sent; t1 = int'($realtime);
    $display("100 kHz phase: S-Link load %0d%%", 100 * (w1 - w0) * 125 / (10 * (t1 - t0)));
    for (int e = N1 + 1; e <= N1 + N2; e++) begin
      send_event(e, 0, 4);
      repeat (GAP2 - 2) @(negedge clk);
    end
    $display("300 kHz phase: S-Link load %0d%%", 100 * (words_sent - w1) * 125 / (10 * (int'($realtime) - t1)));
    for (int e = N1 + N2 + 1; e <= NE; e++) begin
      send_event(e, 0, 4, 1);
      repeat (GAP3 - 2) @(negedge clk);
    end
    // release input 1 once the other inputs have sent all 16 events
    for (int t = 0; t < 10000 && sq[1].size() != 0; t++) @(negedge clk);
    repeat (40) @(negedge clk);
    foreach (held[k]) sq[0].push_back(held[k]);
    for (int t = 0; t < 20000 && n_frag < NE; t++) @(negedge clk);
    running = 0;
    chk(n_frag == NE, $sformatf("%0d fragments received of %0d", n_frag, NE));
    chk(not_ready == 0, $sformatf("TTS stayed READY (%0d cycles not)", not_ready));
    chk(max_lat1 < 25000.0, $sformatf("100 kHz latency %0t below 25 us", max_lat1));
    chk(max_lat2 < 10000.0, $sformatf("300 kHz latency %0t below 10 us", max_lat2));
    chk(skew_max == N3, $sformatf("inputs 1 and 2 were %0d events apart", skew_max));
    $display("latency: 100 kHz %0.1f us, 300 kHz %0.1f us", max_lat1 / 1000.0, max_lat2 / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

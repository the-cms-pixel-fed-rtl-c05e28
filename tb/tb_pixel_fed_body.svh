// tb_pixel_fed_body.svh: end-to-end test of pixel_fed, shared by the
// reduced-size test (tb_pixel_fed) and the default-size test
// (tb_pixel_fed_full). The including module defines FULL, IN_TMO, MAX_H and
// the DUT instance.
//
// Stimulus: 36 links, each on its own sampling clock (phases in 1.6 ns steps)
// and with its own pedestal shift (-60..+60 counts) that the pedestal loops
// must remove. Triggers are counted from 1. Phases:
//   A  events 1..8   random hits; input 7 once above MAX_HITS (truncation),
//                    input 20 once silent (group time-out, error word)
//   B  events 9..13  input 12 sends a wrong event number four times in a row
//                    (TTS must show OUT_OF_SYNC), then recovers (READY)
//   C  event 14      input 30 stops in the middle of the event (processor
//                    time-out, critical: TTS ERROR, cleared over VME)
//   D  events 15..28 large events while the S-Link reports full for a long
//                    time: FIFO-3 and FIFO-2 fill, TTS BUSY. Events 15..21
//                    are sent in spite of BUSY with a noisy input 4, whose
//                    FIFO-1 then fills: its processor drops hits (reduced
//                    events). Then the trigger source waits for BUSY to go
//                    and the link frees up.
// Checking: every S-Link fragment is parsed back into 32-bit words and
// compared input by input with the reference (a reduced block must keep a
// prefix of its hits and flag REDUCED in a trailer that counts the hits kept).
// Over VME: registers (including the per-input phase and offset DAC
// settings), error memory of front FPGA 0 (truncation of input 7),
// histogram of input 3, the FIFO-3 spy, event counters. Each mechanism is
// counted and must have happened at least once (BUSY and reduced events only
// in the reduced-size test, whose buffers are small enough to fill).

  import fed_pkg::*;
  import tb_fed_pkg::*;

  localparam int NI = 36, NE = 28, MAXE = 32;

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

  int checks = 0, failures = 0;
  int sq[NI][$];
  int shift[NI];
  // reference, per event and input: mode 0 normal, 1 silent, 2 wrong number, 3 stuck
  int r_mode[MAXE+1][NI], r_evn[MAXE+1][NI], r_h0[MAXE+1][NI], r_hn[MAXE+1][NI];
  int r_bx[MAXE+1];
  hit_s allh[$];
  int hist_ref[64];
  // mechanism counters
  int m_trunc = 0, m_silent = 0, m_mismatch = 0, m_reduced = 0, m_stuck = 0;
  int m_oos = 0, m_error = 0, m_busy = 0, m_warn = 0, m_lff = 0, m_shifted = 0;
  int n_frag = 0;
  logic [63:0] fragq[$];
  bit frag_open = 0;

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
    #(FULL ? 60000000 : 40000000);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit stopping = 0;
  task automatic chk(bit ok, string what);
    if (stopping) return;
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
    if (failures >= 100) begin   // broken beyond doubt: stop early
      stopping = 1;
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (tts == TTS_OOS)   m_oos++;
    if (tts == TTS_ERROR) m_error++;
    if (tts == TTS_BUSY)  m_busy++;
    if (tts == TTS_WARN)  m_warn++;
  end

  // ---------------- VME master ----------------
  semaphore vme_lock = new(1);
  task automatic vme(bit wr, logic [15:0] a, logic [31:0] wd, output logic [31:0] rd);
    vme_lock.get(1);
    @(negedge clk);
    vme_addr = {6'h04, a, 2'b00}; vme_write_n = !wr; vme_data_in = wd;
    repeat (2) @(negedge clk);
    vme_ds_n = 2'b00;
    rd = 'x;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      if (!vme_dtack_n) break;
    end
    chk(!vme_dtack_n, "VME acknowledge");
    rd = vme_data_out;
    vme_ds_n = 2'b11;
    for (int t = 0; t < 50 && !vme_dtack_n; t++) @(negedge clk);
    repeat (2) @(negedge clk);
    vme_lock.put(1);
  endtask

  // ---------------- S-Link receiver and fragment checker ----------------
  task automatic check_fragment(logic [63:0] f[$]);
    logic [31:0] w[$];
    int e, p, len;
    n_frag++;
    e = n_frag;
    chk(f[0][63:56] == 8'h51 && f[0][55:32] == 24'(e) && f[0][31:20] == 12'(r_bx[e]) &&
        f[0][19:8] == 12'h028, $sformatf("fragment %0d header %h", e, f[0]));
    len = f.size();
    chk(f[len-1][63:60] == 4'hA && f[len-1][55:32] == 24'(len), $sformatf("fragment %0d trailer length", e));
    for (int k = 1; k < len - 1; k++) begin
      w.push_back(f[k][63:32]);
      if (f[k][31:0] != 0) w.push_back(f[k][31:0]);
    end
    p = 0;
    for (int i = 0; i < NI; i++) begin
      int ch = i + 1, nexp, nkept;
      logic [31:0] t;
      if (r_mode[e][i] == 1) begin
        chk(p < w.size() && w[p][25:16] == {5'd29, 5'd6}, $sformatf("ev %0d in %0d time-out word", e, ch));
        p++;
        continue;
      end
      chk(p < w.size() && w[p] == word(ch, 28, 0, 0, r_evn[e][i]), $sformatf("ev %0d in %0d header %h", e, ch, p < w.size() ? w[p] : 0));
      p++;
      if (r_mode[e][i] == 2) begin
        chk(p < w.size() && w[p] == word(ch, 29, 5, 0, e), $sformatf("ev %0d in %0d mismatch word", e, ch));
        p++;
      end
      nexp = r_hn[e][i] > MAX_H ? MAX_H : r_hn[e][i];
      if (r_mode[e][i] == 3) nexp = 0;
      nkept = 0;
      while (p < w.size() && w[p][25:21] != 5'd30 && nkept < nexp) begin
        hit_s h = allh[r_h0[e][i] + nkept];
        chk(w[p] == word(ch, h.roc, h.dcol, h.pix, h.ph >> 2), $sformatf("ev %0d in %0d hit %0d", e, ch, nkept));
        p++; nkept++;
      end
      t = (p < w.size()) ? w[p] : 0;
      p++;
      chk(t[25:21] == 5'd30 && t[31:26] == 6'(ch) && t[7:0] == 8'(r_evn[e][i]) && t[15:8] == 8'(nkept),
          $sformatf("ev %0d in %0d trailer %h", e, ch, t));
      if (nkept < nexp) begin
        chk(t[16 + TS_REDUCED], "hits missing only in reduced events");
        m_reduced++;
      end else if (t[16 + TS_REDUCED]) m_reduced++;
      if (r_mode[e][i] == 3) chk(t[16 + TS_TIMEOUT], "stuck link closed by time-out");
      else if (r_hn[e][i] > MAX_H && !t[16 + TS_REDUCED]) chk(t[16 + TS_TRUNC], "truncation flagged");
      if (t[16 + TS_TRUNC]) m_trunc++;
    end
    chk(p == w.size(), $sformatf("fragment %0d fully consumed (%0d of %0d)", e, p, w.size()));
  endtask

  always @(posedge clk) if (rst_n) begin
    if (!slink_lff_n) m_lff++;
    if (!slink_uwen_n) begin
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

  // ---------------- stimulus ----------------
  task automatic send_event(int e, int nhit_max, int nroc);
    hit_s hits[$];
    int q[$];
    @(negedge clk);
    ttc_l1a = 1; ttc_bx = 12'($urandom); r_bx[e] = ttc_bx;
    @(negedge clk);
    ttc_l1a = 0;
    for (int i = 0; i < NI; i++) begin
      int mode = 0, evn = e, nh;
      if (i == 19 && e == 5) mode = 1;
      if (i == 11 && e >= 9 && e <= 12) mode = 2;
      if (i == 29 && e == 14) mode = 3;
      nh = (i == 6 && e == 3) ? MAX_H + 3 : $urandom_range(0, nhit_max);
      if (i == 3 && e >= 15 && e <= 21) nh = MAX_H + 5;   // a noisy input
      if (mode == 2) evn = e + 100;
      random_hits(hits, nh, nroc);
      r_mode[e][i] = mode; r_evn[e][i] = evn & 255; r_h0[e][i] = allh.size(); r_hn[e][i] = nh;
      foreach (hits[h]) allh.push_back(hits[h]);
      if (mode == 1) continue;
      if (mode == 2) m_mismatch++;
      if (mode == 1) m_silent++;
      if (shift[i] != 0) m_shifted++;
      q.delete();
      push_idle(q, $urandom_range(2, 20));
      if (mode == 3) begin
        m_stuck++;
        repeat (3) q.push_back(UB);
        q.push_back(BLACK);
        for (int s = 3; s >= 0; s--) q.push_back(lv((evn >> (2 * s)) & 3));
        repeat (IN_TMO / 3 + 20) begin q.push_back(UB); q.push_back(BLACK); q.push_back(BLACK); end
      end else push_event(q, evn, nroc, hits);
      if (i == 2 && mode != 3) foreach (hits[h]) if (h < MAX_H) hist_ref[2 * hits[h].dcol + hits[h].pix % 2]++;
      foreach (q[k]) sq[i].push_back(q[k]);
    end
    m_silent += (e == 5);
  endtask

  task automatic wait_frags(int n, int limit);
    for (int t = 0; t < limit && n_frag < n; t++) @(negedge clk);
    chk(n_frag >= n, $sformatf("%0d fragments received (%0d)", n, n_frag));
  endtask

  initial begin
    logic [31:0] rd;
    int n_trunc_err;
    for (int i = 0; i < NI; i++) shift[i] = ((i % 7) - 3) * 20;
    foreach (hist_ref[c]) hist_ref[c] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // registers: read back defaults, set the pedestal target, arm the FIFO-3 spy
    vme(0, 16'h0002, 0, rd); chk(rd == 250, "ultra-black threshold register");
    vme(1, 16'h0001, 32'(BLACK), rd);
    vme(0, 16'h0001, 0, rd); chk(rd == BLACK, "target register");
    vme(1, 16'h0008, 2, rd);     // histogram of the third input of each front FPGA
    // per-input clock phase and offset DAC settings
    chk(adc_phase == '0 && dc_dac == {36{8'h80}}, "phase and offset DAC defaults");
    vme(1, 16'h0305, 9, rd);
    vme(1, 16'h0363, 32'hA5, rd);
    vme(1, 16'h0324, 3, rd);     // input 37 does not exist: ignored
    vme(0, 16'h0305, 0, rd); chk(rd == 9, "phase register read back");
    vme(0, 16'h0363, 0, rd); chk(rd == 32'hA5, "offset DAC register read back");
    chk(adc_phase[5] == 4'd9 && dc_dac[35] == 8'hA5, "settings reach their outputs");
    chk(adc_phase[4] == 0 && adc_phase[6] == 0 && dc_dac[34] == 8'h80, "other inputs unchanged");
    vme(1, 16'h0000, 32'h40, rd); // arm spy 2 (FIFO-3 input)
    repeat (800) @(negedge clk);  // pedestal loops settle on the idle black level

    // phase A
    // (event 6 waits until event 5 has timed out on its silent input, or the
    // builder would take event 6's block of that input for event 5)
    for (int e = 1; e <= 5; e++) send_event(e, 6, 4);
    wait_frags(5, 200000);
    for (int e = 6; e <= 8; e++) send_event(e, 6, 4);
    wait_frags(8, 200000);
    // phase B: out of sync, then back
    for (int e = 9; e <= 13; e++) begin
      send_event(e, 3, 2);
      wait_frags(e, 200000);
      repeat (40) @(negedge clk);
      if (e == 12) chk(tts == TTS_OOS, "OUT_OF_SYNC after four mismatches");
      if (e == 13) chk(tts == TTS_READY, "READY after resynchronisation");
    end
    // phase C: a link stops mid-event
    send_event(14, 3, 2);
    wait_frags(14, 200000);
    repeat (40) @(negedge clk);
    chk(tts == TTS_ERROR, "ERROR after a dead link");
    vme(1, 16'h0000, 1, rd);
    repeat (4) @(negedge clk);
    chk(tts == TTS_READY, "error cleared over VME");
    // phase D: S-Link blocked while large events arrive
    // Events 15..21 are sent regardless of BUSY, with a noisy input 4, so
    // that its FIFO-1 fills; from then on the trigger source honours BUSY,
    // as the central trigger control does.
    @(negedge clk); slink_lff_n = 0;
    for (int e = 15; e <= NE; e++) begin
      if (e > 21) for (int t = 0; t < 6000 && tts == TTS_BUSY; t++) @(negedge clk);
      if (e > 21 && tts == TTS_BUSY) begin
        @(negedge clk); slink_lff_n = 1;   // link frees up
      end
      if (e > 21) for (int t = 0; t < 40000 && tts == TTS_BUSY; t++) @(negedge clk);
      send_event(e, MAX_H - 2, 4);
      repeat (300) @(negedge clk);
    end
    repeat (6000) @(negedge clk);
    @(negedge clk); slink_lff_n = 1;
    wait_frags(NE, 800000);
    repeat (100) @(negedge clk);

    // VME read-out
    vme(0, 16'h0011, 0, rd); chk(rd == NE, "trigger counter");
    vme(0, 16'h0012, 0, rd); chk(rd == NE, "events built");
    vme(0, 16'h0010, 0, rd); chk(rd[3:0] == TTS_READY, "status register TTS");
    vme(0, 16'h0013, 0, rd); chk(rd == 0, "no ADC sample lost");
    n_trunc_err = 0;
    for (int k = 0; k < 300; k++) begin
      vme(0, 16'h0020, 0, rd);
      if (rd == 0) break;
      if (rd[31:28] == 4'd1 && rd[27:22] == 6'd7 && rd[21:14] == 8'd3) n_trunc_err++;
    end
    chk(n_trunc_err == 1, "truncation in the error memory");
    for (int c = 0; c < 52; c++) begin
      vme(0, 16'h0100 + 16'(c), 0, rd);
      chk(rd == 32'(hist_ref[c]), $sformatf("histogram column %0d: %0d expected %0d", c, rd, hist_ref[c]));
    end
    vme(0, 16'h0208, 0, rd); chk(rd[31:0] == {12'(r_bx[1]), 12'h028, 4'h1, 4'h0}, "spy: low half of the first header");
    vme(0, 16'h0209, 0, rd); chk(rd == {8'h51, 24'd1}, "spy: high half of the first header");
    vme(0, 16'h020a, 0, rd); chk(rd[0] == 0 && rd[2] == 1, "spy: control flag, pop");
    vme(0, 16'h0209, 0, rd); chk(rd[31:26] == 6'd1, "spy: next word is data of input 1");

    // mechanisms
    $display("mechanisms: shifted=%0d trunc=%0d silent=%0d mismatch=%0d stuck=%0d reduced=%0d oos=%0d error=%0d busy=%0d warn=%0d lff=%0d frags=%0d",
             m_shifted, m_trunc, m_silent, m_mismatch, m_stuck, m_reduced, m_oos, m_error, m_busy, m_warn, m_lff, n_frag);
    chk(m_shifted > 0, "pedestal correction used");
    chk(m_trunc > 0, "truncation happened");
    chk(m_silent > 0, "group time-out happened");
    chk(m_mismatch > 0 && m_oos > 0, "event number mismatch and OUT_OF_SYNC happened");
    chk(m_stuck > 0 && m_error > 0, "processor time-out and ERROR happened");
    chk(m_lff > 0, "S-Link back-pressure happened");
    if (!FULL) begin
      chk(m_reduced > 0, "reduced events happened");
      chk(m_busy > 0, "BUSY happened");
      chk(m_warn > 0, "WARNING happened");
    end
    chk(n_frag == NE, "one fragment per trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

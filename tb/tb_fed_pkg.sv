// tb_fed_pkg: stimulus and reference model shared by the FED testbenches.
//
// Builds the analogue sample stream of one readout link for an event (as a
// list of 10-bit ADC values) and, independently of the RTL, the 32-bit words
// the input processor must write for it. Level coding used by the tests:
// ultra-black 100, black 450, address level k = 350 + 100*k (k = 0..5), with
// the default decode thresholds ub 250 and boundaries 400, 500, 600, 700, 800.
package tb_fed_pkg;

  localparam int UB    = 100;
  localparam int BLACK = 450;

  typedef struct {
    int roc;    // 1..nroc
    int dcol;   // 0..25
    int pix;    // 0..215
    int ph;     // 10-bit pulse height sample
  } hit_s;

  function automatic int lv(int k);
    return 350 + 100 * k;
  endfunction

  function automatic void push_idle(ref int q[$], input int n);
    for (int i = 0; i < n; i++) q.push_back(BLACK);
  endfunction

  // one event: hits must be ordered by roc
  function automatic void push_event(ref int q[$], input int evn, input int nroc, input hit_s hits[$]);
    int h = 0;
    repeat (3) q.push_back(UB);
    q.push_back(BLACK);
    for (int s = 3; s >= 0; s--) q.push_back(lv((evn >> (2 * s)) & 3));
    for (int r = 1; r <= nroc; r++) begin
      q.push_back(UB); q.push_back(BLACK); q.push_back(BLACK);   // ROC header
      while (h < hits.size() && hits[h].roc == r) begin
        q.push_back(lv(hits[h].dcol / 6));
        q.push_back(lv(hits[h].dcol % 6));
        q.push_back(lv(hits[h].pix / 36));
        q.push_back(lv((hits[h].pix / 6) % 6));
        q.push_back(lv(hits[h].pix % 6));
        q.push_back(hits[h].ph);
        h++;
      end
    end
    q.push_back(UB); q.push_back(UB);
    repeat (4) q.push_back(BLACK);
  endfunction

  function automatic logic [31:0] word(int chan, int roc, int dcol, int pix, int adc);
    return {6'(chan), 5'(roc), 5'(dcol), 8'(pix), 8'(adc)};
  endfunction

  // expected FIFO-1 words of one event (no reduction)
  function automatic void expect_event(ref logic [31:0] q[$], input int chan, input int evn,
                                       input hit_s hits[$], input int max_hits);
    int n = 0;
    q.push_back(word(chan, 28, 0, 0, evn & 255));
    foreach (hits[i]) begin
      if (n == max_hits) begin
        q.push_back(word(chan, 30, 1, n, evn & 255));   // truncated
        return;
      end
      q.push_back(word(chan, hits[i].roc, hits[i].dcol, hits[i].pix, hits[i].ph >> 2));
      n++;
    end
    q.push_back(word(chan, 30, 0, n, evn & 255));
  endfunction

  function automatic void random_hits(ref hit_s hits[$], input int nhits, input int nroc);
    hit_s h;
    int rocs[$];
    hits.delete();
    for (int i = 0; i < nhits; i++) rocs.push_back($urandom_range(1, nroc));
    rocs.sort();
    foreach (rocs[i]) begin
      h.roc  = rocs[i];
      h.dcol = $urandom_range(0, 25);
      h.pix  = $urandom_range(0, 215);
      h.ph   = $urandom_range(260, 940);
      hits.push_back(h);
    end
  endfunction
endpackage

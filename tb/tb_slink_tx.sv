`timescale 1ns/1ps
// tb_slink_tx: self-checking test of the S-Link sender.
// A queue stands for FIFO-3. Fragments (control header, data, control trailer
// marked last) are sent while the link-full input is toggled at random. Every
// word written (uwen_n low) must be the next word in order with uctrl_n low
// exactly for control words; nothing is read while the link is full; with the
// link free the sender must write one word per 12.5 ns clock (80 MHz, 640 MB/s).
module tb_slink_tx;
  import fed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic f3_empty, f3_rd, lff_n = 1, uctrl_n, uwen_n;
  f3_word_t f3_data;
  logic [63:0] ud;
  logic [31:0] words, frags;
  int checks = 0, failures = 0;
  f3_word_t srcq[$], expq[$];
  int n_frag = 0, n_stall = 0;

  slink_tx dut (.*);

  always #6.25 clk = ~clk;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  assign f3_empty = srcq.size() == 0;
  assign f3_data  = f3_empty ? '0 : srcq[0];

  always @(posedge clk) if (rst_n) begin
    if (f3_rd) begin
      chk(lff_n, "no read while link full");
      void'(srcq.pop_front());
    end
    if (!lff_n) n_stall++;
    if (!uwen_n) begin
      chk(expq.size() != 0 && ud == expq[0].data && uctrl_n == !expq[0].ctrl, "S-Link word");
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    f3_word_t w;
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      automatic int n = $urandom_range(20, 40);
      for (int i = 0; i <= n + 1; i++) begin
        w.ctrl = (i == 0 || i == n + 1);
        w.last = (i == n + 1);
        w.data = {$urandom, $urandom};
        srcq.push_back(w); expq.push_back(w);
      end
      n_frag++;
    end
    // congested link
    for (int c = 0; c < 400; c++) begin
      @(negedge clk); lff_n = $urandom_range(0, 2) != 0;
    end
    @(negedge clk); lff_n = 1;
    // free link: full rate
    if (srcq.size() == 0) begin
      failures++; $display("FAIL link drained during congestion");
    end
    t0 = words;
    repeat (20) @(negedge clk);
    t1 = words;
    chk(t1 - t0 == 20 || srcq.size() == 0, $sformatf("one word per clock (%0d)", t1 - t0));
    for (int w = 0; w < 2000 && srcq.size() != 0; w++) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(expq.size() == 0, "all words sent");
    chk(frags == 32'(n_frag), "fragments counted");
    chk(n_stall > 0, "link full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

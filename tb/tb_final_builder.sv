`timescale 1ns/1ps
// tb_final_builder: self-checking test of the final event builder.
// Eight FIFO-2 are modelled as queues. For each of 30 triggers every FIFO-2
// receives 0..5 full entries and a closing entry (one word or none, flagged
// eoe; some events carry an error flag). The FIFO-3 stream is compared with
// the expected fragment: header (event number, bunch crossing, source id),
// the data words in FIFO-2 order, trailer (length incl. header and trailer,
// error status, TTS state). FIFO-3 full is toggled at random; no write may
// happen while it is high. Bus A must carry FIFO-2 0..3, bus B 4..7.
module tb_final_builder;
  import fed_pkg::*;
  logic clk = 0, rst_n = 0;
  logic trig_valid = 0;
  logic [23:0] trig_evn = 0;
  logic [11:0] trig_bx = 0;
  logic [7:0] f2_empty, f2_rd;
  bus_word_t [7:0] f2_data;
  logic [3:0] tts_state = TTS_READY;
  logic f3_wr, f3_full = 0, trig_overflow;
  f3_word_t f3_data;
  logic [1:0] bus_valid;
  bus_word_t [1:0] bus_data;
  logic [31:0] events_built;
  int checks = 0, failures = 0;
  bus_word_t f2q[8][$];
  f3_word_t expq[$];
  int n_bus[2] = '{0, 0}, n_full = 0;

  final_builder #(.N_F2(8), .SOURCE_ID(12'h123)) dut (.*);

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
    for (int i = 0; i < 8; i++) begin
      f2_empty[i] = f2q[i].size() == 0;
      f2_data[i]  = f2_empty[i] ? '0 : f2q[i][0];
    end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 8; i++) if (f2_rd[i]) begin
      chk(bus_valid[i / 4] && bus_data[i / 4] == f2q[i][0], "entry on the right bus");
      n_bus[i / 4]++;
      void'(f2q[i].pop_front());
    end
    if (f3_full) n_full++;
    if (f3_wr) begin
      chk(expq.size() != 0 && f3_data == expq[0], $sformatf("FIFO-3 word %h", f3_data));
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end
  // full is sampled by the builder one cycle before its registered write
  logic f3_full_q;
  always @(posedge clk) begin
    if (rst_n && f3_wr) chk(!f3_full_q, "no write while full");
    f3_full_q <= f3_full;
  end
  always @(negedge clk) f3_full <= ($urandom_range(0, 99) < 20);

  initial begin
    bus_word_t b;
    int len, n, has_err;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 1; e <= 30; e++) begin
      @(negedge clk);
      trig_valid = 1; trig_evn = 24'(e * 1001); trig_bx = 12'($urandom);
      expq.push_back('{ctrl: 1, last: 0, data: {4'h5, 4'h1, trig_evn, trig_bx, 12'h123, 4'h1, 4'h0}});
      len = 1; has_err = 0;
      for (int i = 0; i < 8; i++) begin
        n = $urandom_range(0, 5);
        for (int j = 0; j <= n; j++) begin
          b.data = {$urandom, $urandom};
          b.eoe = (j == n);
          b.has_err = $urandom_range(0, 30) == 0;
          b.hi_v = (j < n) || $urandom_range(0, 1);
          b.lo_v = (j < n);
          if (!b.hi_v) b.has_err = 0;
          f2q[i].push_back(b);
          if (b.has_err) has_err = 1;
          if (b.hi_v) begin
            expq.push_back('{ctrl: 0, last: 0, data: b.lo_v ? b.data : {b.data[63:32], 32'd0}});
            len++;
          end
        end
      end
      expq.push_back('{ctrl: 1, last: 1, data: {4'hA, 4'h0, 24'(len + 1), 16'h0, 3'b0, 1'(has_err), 4'h0, tts_state, 4'h0}});
      @(negedge clk);
      trig_valid = 0;
      for (int w = 0; w < 2000 && expq.size() != 0; w++) @(negedge clk);
      chk(expq.size() == 0, $sformatf("fragment %0d complete", e));
      if (e == 15) tts_state = TTS_BUSY;
    end
    chk(events_built == 30, "events counted");
    chk(n_bus[0] > 0 && n_bus[1] > 0 && n_full > 0, "both buses and back-pressure used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

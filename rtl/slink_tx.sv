// slink_tx: S-Link sender side, on the 80 MHz main clock.
//
// Reads fragments from FIFO-3 (show-ahead) and writes one 64-bit
// word per clock to the link: 80 MHz x 8 bytes = 640 MB/s, the link rate the
// board is built for. A word is sent only while the link is not full (lff_n
// high). uctrl_n marks header and trailer words, uwen_n is the write strobe;
// the outputs are registered. words/frags count what was sent. The signal
// names and active-low polarities are those of the S-Link sender interface;
// the counters are this design's.
module slink_tx
  import fed_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        f3_empty,
  input  f3_word_t    f3_data,
  output logic        f3_rd,
  input  logic        lff_n,
  output logic [63:0] ud,
  output logic        uctrl_n,
  output logic        uwen_n,
  output logic [31:0] words,
  output logic [31:0] frags
);
  assign f3_rd = !f3_empty && lff_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ud      <= '0;
      uctrl_n <= 1'b1;
      uwen_n  <= 1'b1;
      words   <= '0;
      frags   <= '0;
    end else begin
      uwen_n <= !f3_rd;
      if (f3_rd) begin
        ud      <= f3_data.data;
        uctrl_n <= !f3_data.ctrl;
        words   <= words + 1'b1;
        if (f3_data.last) frags <= frags + 1'b1;
      end
    end
  end
endmodule

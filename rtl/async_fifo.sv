// async_fifo: dual-clock FIFO with Gray-coded pointers and a show-ahead read.
//
// Serves (16 entries of 10 bits, set by adc_sync) as the clock-domain crossing
// of each ADC input from its phase-shifted sampling clock to the main clock.
// The parameter defaults are only generic defaults; the document gives no
// size for this buffer. Each side keeps a binary and a Gray pointer; the Gray
// pointer crosses to the other clock through two flip-flops, so full and empty
// are pessimistic by up to two cycles but never wrong. wlevel is the fill level
// seen from the write side, used for busy and warning decisions.
module async_fifo #(
  parameter int WIDTH      = 10,
  parameter int DEPTH_LOG2 = 4
) (
  input  logic                  wclk,
  input  logic                  wrst_n,
  input  logic                  wr_en,
  input  logic [WIDTH-1:0]      wr_data,
  output logic                  full,
  output logic [DEPTH_LOG2:0]   wlevel,
  input  logic                  rclk,
  input  logic                  rrst_n,
  input  logic                  rd_en,
  output logic [WIDTH-1:0]      rd_data,
  output logic                  empty
);
  localparam int DEPTH = 1 << DEPTH_LOG2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[DEPTH_LOG2] = g[DEPTH_LOG2];
    for (int i = DEPTH_LOG2 - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];
  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2;   // read pointer seen in the write domain
  ptr_t wgray_r1, wgray_r2;   // write pointer seen in the read domain
  ptr_t rbin_w;

  // write side
  assign rbin_w = gray2bin(rgray_w2);
  assign wlevel = wbin - rbin_w;
  assign full   = (wlevel == ptr_t'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[DEPTH_LOG2-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[DEPTH_LOG2-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule

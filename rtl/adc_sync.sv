// adc_sync: brings the samples of one ADC input into the main clock domain.
//
// Every input is sampled at 40 MHz with its own clock, whose phase is tuned in
// 1.6 ns steps to the best sampling point, so its samples arrive at an
// arbitrary phase to the main clock. This block writes every sample into a
// small dual-clock FIFO (async_fifo, 16 entries, Gray-coded pointers) on
// adc_clk and reads it on the main clock whenever it is not empty. The main
// clock must be at least as fast as the sampling clock; with the 80 MHz main
// clock of this design a sample comes out on about every other cycle, marked
// by sample_valid, a few cycles after it was taken. lost is a sticky flag set
// when a sample arrived while the FIFO was full (sampling clock faster than
// the main clock). The document asks for the synchronisation; doing it with a
// FIFO is this design's choice.
module adc_sync
#(
  parameter int ADC_BITS   = 10,
  parameter int DEPTH_LOG2 = 4
) (
  input  logic                adc_clk,
  input  logic [ADC_BITS-1:0] adc_data,
  input  logic                clk,
  input  logic                rst_n,
  output logic [ADC_BITS-1:0] sample,
  output logic                sample_valid,
  output logic                lost
);
  logic                full, empty, rd_en;
  logic [ADC_BITS-1:0] head;
  logic                wr_lost;
  logic                wr_lost_s1, wr_lost_s2;
  logic [DEPTH_LOG2:0] wlevel_unused;

  async_fifo #(.WIDTH(ADC_BITS), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
    .wclk(adc_clk), .wrst_n(rst_n), .wr_en(1'b1), .wr_data(adc_data),
    .full(full), .wlevel(wlevel_unused),
    .rclk(clk), .rrst_n(rst_n), .rd_en(rd_en), .rd_data(head), .empty(empty)
  );

  // write side: a sample arriving while full is lost
  always_ff @(posedge adc_clk or negedge rst_n) begin
    if (!rst_n) wr_lost <= 1'b0;
    else if (full) wr_lost <= 1'b1;
  end

  assign rd_en = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample       <= '0;
      sample_valid <= 1'b0;
      lost         <= 1'b0;
      wr_lost_s1   <= 1'b0;
      wr_lost_s2   <= 1'b0;
    end else begin
      wr_lost_s1   <= wr_lost;
      wr_lost_s2   <= wr_lost_s1;
      sample_valid <= rd_en;
      if (rd_en) sample <= head;
      if (wr_lost_s2) lost <= 1'b1;
    end
  end
endmodule

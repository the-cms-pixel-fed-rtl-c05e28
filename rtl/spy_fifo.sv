// spy_fifo: snapshot memory on a data path, read out by the control bus.
//
// The data path is never stalled by it. Writing arm clears the memory and
// starts a capture: every word the monitored path transfers (mon_valid) is
// copied until the memory is full, then capture stops (full stays high) so the
// stored words are a contiguous record starting at the arm point. The control
// bus pops words with rd_en from the show-ahead head rd_data. Spy memories on
// the path into FIFO-3 are in the document; their capture policy and depth are
// this design's.
module spy_fifo #(
  parameter int WIDTH      = 66,
  parameter int DEPTH_LOG2 = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm,
  input  logic             mon_valid,
  input  logic [WIDTH-1:0] mon_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             capturing
);
  localparam int DEPTH = 1 << DEPTH_LOG2;

  logic [WIDTH-1:0]    mem [DEPTH];
  logic [DEPTH_LOG2:0] wptr, rptr;

  assign full    = (wptr == (DEPTH_LOG2+1)'(DEPTH));
  assign empty   = (rptr == wptr);
  assign rd_data = mem[rptr[DEPTH_LOG2-1:0]];

  always_ff @(posedge clk) begin
    if (capturing && mon_valid && !full) mem[wptr[DEPTH_LOG2-1:0]] <= mon_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      capturing <= 1'b0;
    end else if (arm) begin
      wptr      <= '0;
      rptr      <= '0;
      capturing <= 1'b1;
    end else begin
      if (capturing && mon_valid && !full) wptr <= wptr + 1'b1;
      if (capturing && mon_valid && wptr == (DEPTH_LOG2+1)'(DEPTH - 1)) capturing <= 1'b0;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end
  end
endmodule

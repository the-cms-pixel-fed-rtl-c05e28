// sync_fifo: single-clock FIFO with a show-ahead read port.
//
// Used for the per-input FIFO-1 (event blocks of one link), the eight FIFO-2
// (events of a group of 4 or 5 links), FIFO-3 (the multi-event store before
// the S-Link: 65,536 x 66 bits in the top level, about 100 events of average
// size), the trigger queues and the error and spy memories. The head word is on rd_data whenever empty is low; rd_en pops
// it. A write and a read in the same cycle are allowed. nearly_full rises when
// the fill level reaches NEARLY_FULL, so a writer that checks it between
// blocks has room for the rest of a block. Depths are this design's choice.
// Writes while full and reads while empty are ignored (and flagged by
// assertions).
module sync_fifo #(
  parameter int WIDTH       = 32,
  parameter int DEPTH_LOG2  = 10,
  parameter int NEARLY_FULL = 896
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [WIDTH-1:0]      wr_data,
  input  logic                  rd_en,
  output logic [WIDTH-1:0]      rd_data,
  output logic                  empty,
  output logic                  full,
  output logic                  nearly_full,
  output logic [DEPTH_LOG2:0]   level
);
  localparam int DEPTH = 1 << DEPTH_LOG2;

  logic [WIDTH-1:0]    mem [DEPTH];
  logic [DEPTH_LOG2:0] wptr, rptr;
  logic                do_wr, do_rd;

  assign level       = wptr - rptr;
  assign empty       = (wptr == rptr);
  assign full        = (level == (DEPTH_LOG2+1)'(DEPTH));
  assign nearly_full = (level >= (DEPTH_LOG2+1)'(NEARLY_FULL));
  assign do_wr       = wr_en && !full;
  assign do_rd       = rd_en && !empty;
  assign rd_data     = mem[rptr[DEPTH_LOG2-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[DEPTH_LOG2-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("sync_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("sync_fifo: read while empty");
endmodule

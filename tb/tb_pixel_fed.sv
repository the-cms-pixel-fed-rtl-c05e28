`timescale 1ns/1ps
// tb_pixel_fed: end-to-end test of the whole board at reduced buffer sizes
// (FIFO-1 64 words, FIFO-2 16 entries, FIFO-3 64 entries), small enough for
// a blocked S-Link to fill every buffer level and force BUSY and reduced
// events. The test itself is described in tb_pixel_fed_body.svh.
module tb_pixel_fed;
  localparam bit FULL   = 0;
  localparam int IN_TMO = 400;
  localparam int MAX_H  = 10;

`include "tb_pixel_fed_body.svh"

  pixel_fed #(
    .F1_DEPTH_LOG2(6), .F2_DEPTH_LOG2(4), .F3_DEPTH_LOG2(6), .SPY_DEPTH_LOG2(4),
    .MAX_HITS(MAX_H), .IN_TIMEOUT(IN_TMO), .GRP_TIMEOUT(3000)
  ) dut (.*);
endmodule

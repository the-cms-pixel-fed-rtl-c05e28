`timescale 1ns/1ps
// tb_pixel_fed_full: end-to-end test of the whole board with every parameter
// at its default (65,536-entry FIFO-3, 64 hits per input and event). The
// buffers are too deep for the test to fill, so BUSY and reduced events are
// not required here; everything else of tb_pixel_fed_body.svh is checked.
module tb_pixel_fed_full;
  localparam bit FULL   = 1;
  localparam int IN_TMO = 2048;
  localparam int MAX_H  = 64;

`include "tb_pixel_fed_body.svh"

  pixel_fed dut (.*);
endmodule

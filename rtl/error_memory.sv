// error_memory: stores error reports for readout over the control bus.
//
// Up to N_SRC blocks report errors (fed_pkg::err_t). Each cycle the report of
// the lowest-numbered active source is stored as one 32-bit entry:
//   [31:28] error code  [27:22] input number  [21:14] event number
//   [13] critical       [12:0]  time stamp (main-clock cycles / 256)
// Reports that collide with it, or arrive while the memory is full, are
// counted in lost. critical pulses when a critical report is stored, which
// the TTS logic turns into an ERROR state. Error words in the data stream are
// inserted by the reporting blocks themselves. Storing errors with input and
// event number and forwarding critical ones follow the document; the entry
// layout, fixed priority and depth are this design's.
module error_memory
  import fed_pkg::*;
#(
  parameter int N_SRC      = 11,
  parameter int DEPTH_LOG2 = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  err_t [N_SRC-1:0]  err,
  input  logic              rd_en,
  output logic [31:0]       rd_data,
  output logic              empty,
  output logic [15:0]       lost,
  output logic              critical
);
  logic        wr, full, nf_unused;
  logic [31:0] entry;
  logic [20:0] tstamp;
  logic [$clog2(N_SRC+1)-1:0] n_active;
  err_t        sel;
  logic [DEPTH_LOG2:0] level_unused;

  always_comb begin
    sel      = '0;
    n_active = '0;
    for (int i = N_SRC - 1; i >= 0; i--) begin
      if (err[i].valid) begin
        sel      = err[i];
        n_active = n_active + 1'b1;
      end
    end
  end

  assign wr    = sel.valid && !full;
  assign entry = {sel.code, sel.chan, sel.evn, sel.critical, tstamp[20:8]};

  sync_fifo #(.WIDTH(32), .DEPTH_LOG2(DEPTH_LOG2), .NEARLY_FULL(1 << DEPTH_LOG2)) u_mem (
    .clk, .rst_n, .wr_en(wr), .wr_data(entry), .rd_en(rd_en && !empty),
    .rd_data(rd_data), .empty(empty), .full(full), .nearly_full(nf_unused),
    .level(level_unused));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstamp   <= '0;
      lost     <= '0;
      critical <= 1'b0;
    end else begin
      tstamp   <= tstamp + 1'b1;
      critical <= wr && sel.critical;
      if (n_active != 0) begin
        // all active reports but the stored one are lost
        if (lost != 16'hffff) lost <= lost + 16'(n_active) - 16'(wr);
      end
    end
  end
endmodule

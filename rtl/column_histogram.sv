// column_histogram: hit count per pixel column of one input.
//
// Every decoded hit of the selected input (hit_valid, hit_col 0..N_COLS-1)
// increments its column's counter; counters saturate. clear empties all bin_cnt,
// one bin per cycle (clearing is high meanwhile, hits are ignored). The bin_cnt
// are read combinationally at rd_addr. A column histogram is named in the
// document; 52 columns (the readout chip's 26 double columns) and 16-bit
// counters are this design's.
module column_histogram #(
  parameter int N_COLS   = 52,
  parameter int CNT_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hit_valid,
  input  logic [5:0]          hit_col,
  input  logic                clear,
  output logic                clearing,
  input  logic [5:0]          rd_addr,
  output logic [CNT_BITS-1:0] rd_data
);
  logic [CNT_BITS-1:0] bin_cnt [N_COLS];
  logic [5:0]          clr_idx;

  assign rd_data = (rd_addr < 6'(N_COLS)) ? bin_cnt[rd_addr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;   // clear after reset
      clr_idx  <= '0;
      for (int i = 0; i < N_COLS; i++) bin_cnt[i] <= '0;
    end else if (clear) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      bin_cnt[clr_idx] <= '0;
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == 6'(N_COLS - 1)) clearing <= 1'b0;
    end else if (hit_valid && hit_col < 6'(N_COLS) && bin_cnt[hit_col] != '1) begin
      bin_cnt[hit_col] <= bin_cnt[hit_col] + 1'b1;
    end
  end
endmodule

// front_fpga: one of the four front processing FPGAs, serving nine inputs.
//
// Per input: adc_sync (ADC clock to main clock), baseline_adjust (pedestal to
// the programmed target), input_processor (decoding into event blocks) and
// its FIFO-1. The inputs are split into two groups, GROUP0 inputs (default 5)
// and the rest (4); each group has a group_builder that moves one event at a
// time from its FIFO-1 into the group's FIFO-2, checking event numbers. One
// column_histogram counts the hits of the input chosen by hist_sel, and one
// error_memory collects the reports of all nine processors and both group
// builders. The FIFO-2 heads go to the final builder. The nine inputs per FPGA
// and the FIFO-2 per 4 or 5 inputs are the document's; depths and the split of
// groups are this design's. Inputs are numbered FIRST_CH + i.
// busy is high while any FIFO-1 is nearly full or a processor is reducing.
module front_fpga
  import fed_pkg::*;
#(
  parameter logic [5:0] FIRST_CH      = 6'd1,
  parameter int         N_CH          = 9,
  parameter int         GROUP0        = 5,
  parameter int         F1_DEPTH_LOG2 = 10,
  parameter int         F2_DEPTH_LOG2 = 10,
  parameter int         MAX_HITS      = 64,
  parameter int         IN_TIMEOUT    = 2048,
  parameter int         GRP_TIMEOUT   = 8192
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CH-1:0]            adc_clk,
  input  sample_t [N_CH-1:0]         adc_data,
  input  levels_t                    thr,
  input  sample_t                    target,
  input  logic                       trig_valid,
  input  logic [7:0]                 trig_evn,
  input  logic [1:0]                 f2_rd,
  output logic [1:0]                 f2_empty,
  output bus_word_t [1:0]            f2_data,
  input  logic [3:0]                 hist_sel,
  input  logic                       hist_clear,
  input  logic [5:0]                 hist_addr,
  output logic [15:0]                hist_data,
  input  logic                       err_rd,
  output logic [31:0]                err_data,
  output logic                       err_empty,
  output logic [15:0]                err_lost,
  output logic                       critical,
  output logic                       evn_match,
  output logic                       evn_mismatch,
  output logic                       oos,
  output logic                       busy,
  output logic [N_CH-1:0]            sync_lost,
  output logic                       trig_overflow
);
  localparam int F1_DEPTH = 1 << F1_DEPTH_LOG2;
  localparam int F2_DEPTH = 1 << F2_DEPTH_LOG2;
  localparam int GROUP1   = N_CH - GROUP0;

  sample_t   [N_CH-1:0] s_sync, s_corr;
  logic      [N_CH-1:0] f1_full, v_sync, v_corr, black_v, hit_v, p_busy, f1_nf, f1_wr, f1_rd, f1_empty;
  logic      [N_CH-1:0][5:0] hit_col;
  fed_word_t [N_CH-1:0] f1_wdata, f1_rdata;
  err_t      [N_CH+1:0] errs;

  for (genvar i = 0; i < N_CH; i++) begin : g_in
    logic signed [ADC_BITS:0] offset_unused;
    logic [F1_DEPTH_LOG2:0]   f1_level_unused;

    adc_sync #(.ADC_BITS(ADC_BITS)) u_sync (
      .adc_clk(adc_clk[i]), .adc_data(adc_data[i]), .clk, .rst_n,
      .sample(s_sync[i]), .sample_valid(v_sync[i]), .lost(sync_lost[i]));

    baseline_adjust #(.ADC_BITS(ADC_BITS)) u_base (
      .clk, .rst_n, .in_valid(v_sync[i]), .in_sample(s_sync[i]),
      .black_valid(black_v[i]), .target, .out_valid(v_corr[i]),
      .out_sample(s_corr[i]), .offset(offset_unused));

    input_processor #(.CHANNEL(FIRST_CH + 6'(i)), .MAX_HITS(MAX_HITS), .TIMEOUT(IN_TIMEOUT)) u_proc (
      .clk, .rst_n, .in_valid(v_corr[i]), .in_sample(s_corr[i]), .thr,
      .fifo_nearly_full(f1_nf[i]), .fifo_full(f1_full[i]), .wr_en(f1_wr[i]), .wr_data(f1_wdata[i]),
      .black_valid(black_v[i]), .hit_valid(hit_v[i]), .hit_col(hit_col[i]),
      .busy(p_busy[i]), .err(errs[i]));

    sync_fifo #(.WIDTH(32), .DEPTH_LOG2(F1_DEPTH_LOG2), .NEARLY_FULL(F1_DEPTH - F1_DEPTH / 8)) u_fifo1 (
      .clk, .rst_n, .wr_en(f1_wr[i]), .wr_data(f1_wdata[i]), .rd_en(f1_rd[i]),
      .rd_data(f1_rdata[i]), .empty(f1_empty[i]), .full(f1_full[i]),
      .nearly_full(f1_nf[i]), .level(f1_level_unused));
  end

  // two groups, each with its builder and FIFO-2
  logic [1:0]      f2_wr, f2_nf, f2_full_unused, mt, mm, go, tov;
  bus_word_t [1:0] f2_wdata;
  logic [F2_DEPTH_LOG2:0] f2_level_unused [2];

  group_builder #(.N_IN(GROUP0), .TIMEOUT(GRP_TIMEOUT)) u_grp0 (
    .clk, .rst_n, .trig_valid, .trig_evn,
    .f1_empty(f1_empty[GROUP0-1:0]), .f1_data(f1_rdata[GROUP0-1:0]), .f1_rd(f1_rd[GROUP0-1:0]),
    .f2_wr(f2_wr[0]), .f2_data(f2_wdata[0]), .f2_nearly_full(f2_nf[0]),
    .evn_match(mt[0]), .evn_mismatch(mm[0]), .oos(go[0]), .err(errs[N_CH]), .trig_overflow(tov[0]));

  group_builder #(.N_IN(GROUP1), .TIMEOUT(GRP_TIMEOUT)) u_grp1 (
    .clk, .rst_n, .trig_valid, .trig_evn,
    .f1_empty(f1_empty[N_CH-1:GROUP0]), .f1_data(f1_rdata[N_CH-1:GROUP0]), .f1_rd(f1_rd[N_CH-1:GROUP0]),
    .f2_wr(f2_wr[1]), .f2_data(f2_wdata[1]), .f2_nearly_full(f2_nf[1]),
    .evn_match(mt[1]), .evn_mismatch(mm[1]), .oos(go[1]), .err(errs[N_CH+1]), .trig_overflow(tov[1]));

  for (genvar g = 0; g < 2; g++) begin : g_f2
    sync_fifo #(.WIDTH($bits(bus_word_t)), .DEPTH_LOG2(F2_DEPTH_LOG2), .NEARLY_FULL(F2_DEPTH - 4)) u_fifo2 (
      .clk, .rst_n, .wr_en(f2_wr[g]), .wr_data(f2_wdata[g]), .rd_en(f2_rd[g]),
      .rd_data(f2_data[g]), .empty(f2_empty[g]), .full(f2_full_unused[g]),
      .nearly_full(f2_nf[g]), .level(f2_level_unused[g]));
  end

  // column histogram of the selected input
  logic       h_clearing_unused;
  logic       h_valid;
  logic [5:0] h_col;
  always_comb begin
    h_valid = 1'b0;
    h_col   = '0;
    for (int i = 0; i < N_CH; i++)
      if (hist_sel == 4'(i)) begin
        h_valid = hit_v[i];
        h_col   = hit_col[i];
      end
  end
  column_histogram #(.N_COLS(N_COLS), .CNT_BITS(16)) u_hist (
    .clk, .rst_n, .hit_valid(h_valid), .hit_col(h_col), .clear(hist_clear),
    .clearing(h_clearing_unused), .rd_addr(hist_addr), .rd_data(hist_data));

  error_memory #(.N_SRC(N_CH + 2)) u_err (
    .clk, .rst_n, .err(errs), .rd_en(err_rd), .rd_data(err_data),
    .empty(err_empty), .lost(err_lost), .critical);

  assign evn_match     = |mt;
  assign evn_mismatch  = |mm;
  assign oos           = |go;
  assign busy          = |p_busy || |f1_nf;
  assign trig_overflow = |tov;
endmodule

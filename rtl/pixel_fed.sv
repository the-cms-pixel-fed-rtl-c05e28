// pixel_fed: front-end driver of the pixel detector readout (top level).
//
// 36 analogue optical inputs, digitised by external 10-bit ADCs with one
// phase-adjusted sampling clock each, enter four front_fpga blocks of nine
// inputs. They decode the hits, buffer them per input (FIFO-1) and per group
// of 4 or 5 inputs (eight FIFO-2), checking each input's event number against
// the trigger's. The final_builder collects each event from the eight FIFO-2
// over two 64+4-bit buses into FIFO-3, a store for about 100 average events,
// and slink_tx sends it at one 64-bit word per clock.
// tts_control reports READY/WARNING/BUSY/OUT_OF_SYNC/ERROR. A VME slave gives
// access to the registers below through a local bus.
//
// Clock: one 80 MHz main clock runs all logic, so events are built and sent
// at the S-Link rate (80 MHz x 64 bit); the 40 MHz ADC samples enter through
// adc_sync and arrive on about every other cycle.
// Triggers: each ttc_l1a pulse (one clock) is one trigger; its event number
// is counted here from 1, its bunch crossing is ttc_bx. The TTC receiver, the
// ADCs, offset DACs and clock phase shifters are outside this design.
//
// Local-bus register map (longword address = VME address[17:2]):
//   0x0000 W   control: bit0 clear TTS error, bit1 clear histograms,
//              bits 4..6 arm spy 0..2
//   0x0001 RW  pedestal target          0x0002 RW  ultra-black threshold
//   0x0003..0x0007 RW  address level boundaries 0..4
//   0x0008 RW  histogram input select (0..8 within each front FPGA)
//   0x0010 R   status: [3:0] TTS, [4] busy, [5] FIFO-3 warning,
//              [9:6] trigger queue overflow, [31:16] FIFO-3 level / 2
//   0x0011 R   triggers received        0x0012 R   events built
//   0x0013 R   ADC synchroniser lost flags of inputs 1..32
//   0x0020+f R pop error memory of front FPGA f (0 if empty)
//   0x0024+f R lost error reports of front FPGA f
//   0x0100+64*f+c R  histogram of front FPGA f, column c
//   0x0200+4*s R spy s (0: bus A, 1: bus B, 2: FIFO-3 input): +0 data[31:0],
//              +1 data[63:32], +2 {flags, empty} and pop
//   0x0300+i RW sampling clock phase of input i+1 (0..15, 1.6 ns steps)
//   0x0340+i RW offset DAC setting of input i+1 (8 bits, default 0x80)
// The phase shifters and offset DACs themselves are board parts outside this
// design; adc_phase and dc_dac carry their settings.
// The structure (4 x 9 inputs, eight FIFO-2, two 64+4-bit buses, FIFO-3,
// S-Link, TTS, VME with input filter) follows the document; the register map,
// buffer depths and the event counter are this design's.
module pixel_fed
  import fed_pkg::*;
#(
  parameter int F1_DEPTH_LOG2  = 10,
  parameter int F2_DEPTH_LOG2  = 10,
  parameter int F3_DEPTH_LOG2  = 16,
  parameter int SPY_DEPTH_LOG2 = 9,
  parameter int MAX_HITS       = 64,
  parameter int IN_TIMEOUT     = 2048,
  parameter int GRP_TIMEOUT    = 8192
) (
  input  logic               clk,        // 80 MHz main clock
  input  logic               rst_n,      // asynchronous reset
  input  logic [35:0]        adc_clk,
  input  sample_t [35:0]     adc_data,
  input  logic               ttc_l1a,
  input  logic [11:0]        ttc_bx,
  input  logic               slink_lff_n,
  output logic [63:0]        slink_ud,
  output logic               slink_uctrl_n,
  output logic               slink_uwen_n,
  output logic [3:0]         tts,
  input  logic [1:0]         vme_ds_n,
  input  logic               vme_write_n,
  input  logic [23:0]        vme_addr,
  input  logic [31:0]        vme_data_in,
  output logic [31:0]        vme_data_out,
  output logic               vme_data_oe,
  output logic               vme_dtack_n,
  output logic [35:0][3:0]   adc_phase,  // sampling clock phase per input, 1.6 ns steps
  output logic [35:0][7:0]   dc_dac      // analogue offset DAC setting per input
);
  localparam int N_FRONT  = 4;
  localparam int N_CH     = 9;
  localparam int F3_DEPTH = 1 << F3_DEPTH_LOG2;

  // ---------------- registers ----------------
  levels_t     thr;
  sample_t     target;
  logic [3:0]  hist_sel;
  logic [23:0] evn_cnt;
  logic        tts_clear, hist_clear;
  logic [2:0]  spy_arm;

  logic [15:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata;
  logic        lb_we, lb_re;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr.ub     <= 10'd250;
      thr.lvl[0] <= 10'd400;
      thr.lvl[1] <= 10'd500;
      thr.lvl[2] <= 10'd600;
      thr.lvl[3] <= 10'd700;
      thr.lvl[4] <= 10'd800;
      target     <= 10'd450;
      hist_sel   <= '0;
      tts_clear  <= 1'b0;
      hist_clear <= 1'b0;
      spy_arm    <= '0;
      evn_cnt    <= '0;
    end else begin
      tts_clear  <= 1'b0;
      hist_clear <= 1'b0;
      spy_arm    <= '0;
      if (ttc_l1a) evn_cnt <= evn_cnt + 1'b1;
      if (lb_we) begin
        case (lb_addr)
          16'h0000: begin
            tts_clear  <= lb_wdata[0];
            hist_clear <= lb_wdata[1];
            spy_arm    <= lb_wdata[6:4];
          end
          16'h0001: target     <= lb_wdata[9:0];
          16'h0002: thr.ub     <= lb_wdata[9:0];
          16'h0003: thr.lvl[0] <= lb_wdata[9:0];
          16'h0004: thr.lvl[1] <= lb_wdata[9:0];
          16'h0005: thr.lvl[2] <= lb_wdata[9:0];
          16'h0006: thr.lvl[3] <= lb_wdata[9:0];
          16'h0007: thr.lvl[4] <= lb_wdata[9:0];
          16'h0008: hist_sel   <= lb_wdata[3:0];
          default: ;
        endcase
      end
    end
  end

  // per-input settings for the board's clock phase shifters and offset DACs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_phase <= '0;
      dc_dac    <= {36{8'h80}};
    end else if (lb_we && lb_addr[15:7] == 9'h006 && lb_addr[5:0] < 6'd36) begin
      if (!lb_addr[6]) adc_phase[lb_addr[5:0]] <= lb_wdata[3:0];
      else             dc_dac[lb_addr[5:0]]    <= lb_wdata[7:0];
    end
  end

  // ---------------- front FPGAs ----------------
  logic      [N_FRONT-1:0][1:0]  f2_rd_f, f2_empty_f;
  bus_word_t [N_FRONT-1:0][1:0]  f2_data_f;
  logic      [N_FRONT-1:0][15:0] hist_data, err_lost;
  logic      [N_FRONT-1:0][31:0] err_data;
  logic      [N_FRONT-1:0]       err_rd, err_empty, crit_f, match_f, mism_f, oos_f, busy_f, tov_f;
  logic      [N_FRONT-1:0][N_CH-1:0] lost_f;

  for (genvar f = 0; f < N_FRONT; f++) begin : g_front
    front_fpga #(
      .FIRST_CH(6'(1 + N_CH * f)), .N_CH(N_CH), .GROUP0(5),
      .F1_DEPTH_LOG2(F1_DEPTH_LOG2), .F2_DEPTH_LOG2(F2_DEPTH_LOG2),
      .MAX_HITS(MAX_HITS), .IN_TIMEOUT(IN_TIMEOUT), .GRP_TIMEOUT(GRP_TIMEOUT)
    ) u_front (
      .clk, .rst_n,
      .adc_clk(adc_clk[N_CH*f +: N_CH]), .adc_data(adc_data[N_CH*f +: N_CH]),
      .thr, .target, .trig_valid(ttc_l1a), .trig_evn(8'(evn_cnt + 1'b1)),
      .f2_rd(f2_rd_f[f]), .f2_empty(f2_empty_f[f]), .f2_data(f2_data_f[f]),
      .hist_sel, .hist_clear, .hist_addr(lb_addr[5:0]), .hist_data(hist_data[f]),
      .err_rd(err_rd[f]), .err_data(err_data[f]), .err_empty(err_empty[f]),
      .err_lost(err_lost[f]), .critical(crit_f[f]), .evn_match(match_f[f]),
      .evn_mismatch(mism_f[f]), .oos(oos_f[f]), .busy(busy_f[f]), .sync_lost(lost_f[f]),
      .trig_overflow(tov_f[f]));
  end

  // ---------------- final builder and FIFO-3 ----------------
  logic      [7:0] f2_empty, f2_rd;
  bus_word_t [7:0] f2_data;
  always_comb begin
    for (int f = 0; f < N_FRONT; f++) begin
      for (int g = 0; g < 2; g++) begin
        f2_empty[2*f+g]   = f2_empty_f[f][g];
        f2_data[2*f+g]    = f2_data_f[f][g];
        f2_rd_f[f][g]     = f2_rd[2*f+g];
      end
    end
  end

  logic            f3_wr, f3_full_unused, f3_empty, f3_rd, fb_tov;
  f3_word_t        f3_wdata, f3_rdata;
  logic [F3_DEPTH_LOG2:0] f3_level;
  logic [1:0]      bus_valid;
  bus_word_t [1:0] bus_data;
  logic [31:0]     events_built;

  // the builder's write is registered: stop it two entries before full
  logic f3_almost_full;
  assign f3_almost_full = f3_level >= (F3_DEPTH_LOG2+1)'(F3_DEPTH - 2);

  final_builder #(.N_F2(8)) u_builder (
    .clk, .rst_n, .trig_valid(ttc_l1a), .trig_evn(evn_cnt + 1'b1), .trig_bx(ttc_bx),
    .f2_empty, .f2_data, .f2_rd, .tts_state(tts),
    .f3_wr, .f3_data(f3_wdata), .f3_full(f3_almost_full),
    .bus_valid, .bus_data, .trig_overflow(fb_tov), .events_built);

  logic f3_nf_unused;
  sync_fifo #(.WIDTH($bits(f3_word_t)), .DEPTH_LOG2(F3_DEPTH_LOG2),
              .NEARLY_FULL(F3_DEPTH - 2)) u_fifo3 (
    .clk, .rst_n, .wr_en(f3_wr), .wr_data(f3_wdata), .rd_en(f3_rd),
    .rd_data(f3_rdata), .empty(f3_empty), .full(f3_full_unused),
    .nearly_full(f3_nf_unused), .level(f3_level));

  logic [31:0] sl_words_unused, sl_frags_unused;
  slink_tx u_slink (
    .clk, .rst_n, .f3_empty, .f3_data(f3_rdata), .f3_rd, .lff_n(slink_lff_n),
    .ud(slink_ud), .uctrl_n(slink_uctrl_n), .uwen_n(slink_uwen_n),
    .words(sl_words_unused), .frags(sl_frags_unused));

  // ---------------- spy memories ----------------
  localparam int SPW = $bits(bus_word_t);
  logic [2:0]           spy_valid, spy_rd, spy_empty, spy_full_unused, spy_cap_unused;
  logic [2:0][SPW-1:0]  spy_in, spy_out;
  assign spy_valid = {f3_wr, bus_valid};
  assign spy_in[0] = bus_data[0];
  assign spy_in[1] = bus_data[1];
  assign spy_in[2] = SPW'(f3_wdata);
  for (genvar s = 0; s < 3; s++) begin : g_spy
    spy_fifo #(.WIDTH(SPW), .DEPTH_LOG2(SPY_DEPTH_LOG2)) u_spy (
      .clk, .rst_n, .arm(spy_arm[s]), .mon_valid(spy_valid[s]), .mon_data(spy_in[s]),
      .rd_en(spy_rd[s]), .rd_data(spy_out[s]), .empty(spy_empty[s]),
      .full(spy_full_unused[s]), .capturing(spy_cap_unused[s]));
  end

  // ---------------- TTS ----------------
  logic f3_busy, f3_warn;
  assign f3_busy = f3_level >= (F3_DEPTH_LOG2+1)'(F3_DEPTH - F3_DEPTH / 8);
  assign f3_warn = f3_level >= (F3_DEPTH_LOG2+1)'(F3_DEPTH / 2);
  logic match_unused, mism_unused;
  assign match_unused = |match_f;
  assign mism_unused  = |mism_f;
  tts_control u_tts (
    .clk, .rst_n, .busy_in(|busy_f || f3_busy), .warn_in(f3_warn), .oos_in(|oos_f),
    .critical(|crit_f || |tov_f || fb_tov),   // dead link or lost trigger
    .clear(tts_clear), .tts);

  // ---------------- VME ----------------
  vme_slave #(.BOARD_ADDR(6'h04)) u_vme (
    .clk, .rst_n, .vme_ds_n, .vme_write_n, .vme_addr, .vme_data_in,
    .vme_data_out, .vme_data_oe, .vme_dtack_n,
    .lb_addr, .lb_wdata, .lb_we, .lb_re, .lb_rdata);

  logic [31:0] trig_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_cnt <= '0;
    else if (ttc_l1a) trig_cnt <= trig_cnt + 1'b1;
  end

  // local-bus read multiplexer (combinational; pops happen on lb_re)
  always_comb begin
    lb_rdata = '0;
    err_rd   = '0;
    spy_rd   = '0;
    case (lb_addr[15:8])
      8'h00: begin
        unique case (lb_addr[7:0]) inside
          8'h01: lb_rdata = 32'(target);
          8'h02: lb_rdata = 32'(thr.ub);
          8'h03: lb_rdata = 32'(thr.lvl[0]);
          8'h04: lb_rdata = 32'(thr.lvl[1]);
          8'h05: lb_rdata = 32'(thr.lvl[2]);
          8'h06: lb_rdata = 32'(thr.lvl[3]);
          8'h07: lb_rdata = 32'(thr.lvl[4]);
          8'h08: lb_rdata = 32'(hist_sel);
          8'h10: lb_rdata = {16'(f3_level >> 1), 6'd0, (tov_f | {3'b0, fb_tov}), f3_warn, |busy_f, tts};
          8'h11: lb_rdata = trig_cnt;
          8'h12: lb_rdata = events_built;
          8'h13: lb_rdata = 32'({lost_f[3][4:0], lost_f[2], lost_f[1], lost_f[0]});
          [8'h20:8'h23]: begin
            lb_rdata = err_empty[lb_addr[1:0]] ? 32'd0 : err_data[lb_addr[1:0]];
            err_rd[lb_addr[1:0]] = lb_re;
          end
          [8'h24:8'h27]: lb_rdata = 32'(err_lost[lb_addr[1:0]]);
          default: ;
        endcase
      end
      8'h01: lb_rdata = 32'(hist_data[lb_addr[7:6]]);
      8'h03: begin
        if (!lb_addr[7] && lb_addr[5:0] < 6'd36)
          lb_rdata = lb_addr[6] ? 32'(dc_dac[lb_addr[5:0]]) : 32'(adc_phase[lb_addr[5:0]]);
      end
      8'h02: begin
        if (lb_addr[3:2] != 2'd3) begin
          case (lb_addr[1:0])
            2'd0: lb_rdata = spy_out[lb_addr[3:2]][31:0];
            2'd1: lb_rdata = spy_out[lb_addr[3:2]][63:32];
            2'd2: begin
              lb_rdata = {27'd0, spy_out[lb_addr[3:2]][SPW-1:64], spy_empty[lb_addr[3:2]]};
              spy_rd[lb_addr[3:2]] = lb_re;
            end
            default: ;
          endcase
        end
      end
      default: ;
    endcase
  end
endmodule

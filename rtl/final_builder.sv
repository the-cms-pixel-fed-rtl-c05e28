// final_builder: builds the final event fragment into FIFO-3.
//
// For every trigger (queued with its 24-bit event number and 12-bit bunch
// crossing) it writes a header word, then reads the event's entries from the
// eight FIFO-2 in turn until each has delivered its eoe entry, and closes the
// fragment with a trailer word. The FIFO-2 are reached over two 64+4-bit
// collection buses, bus A for FIFO-2 0..3 and bus B for 4..7; each bus is the
// 4:1 selection of its FIFO-2 heads and is exposed (bus_valid/bus_data) for the
// spy memories. Entries with two words are written as they are; an entry with
// one word is written with a zero lower half; an empty closing entry is not
// written. Header and trailer follow the CMS common data format:
//   header  [63:60]=5 [59:56]=event type 1 [55:32]=event number
//           [31:20]=bunch crossing [19:8]=source id [7:4]=format version
//   trailer [63:60]=A [55:32]=fragment length in 64-bit words (header and
//           trailer included) [15:12]=event status (bit 0: error words
//           present) [7:4]=TTS state
// The CRC field of the trailer is left zero. Header and trailer words are
// marked as S-Link control words, the trailer also as last. The two buses of
// 64+4 bits and the eight FIFO-2 follow the document; the bus assignment, the
// order and the word formats are this design's.
// Timing: one FIFO-3 write per cycle; stalls while FIFO-3 is full.
module final_builder
  import fed_pkg::*;
#(
  parameter int          N_F2            = 8,
  parameter logic [11:0] SOURCE_ID       = 12'h028,
  parameter int          TRIG_DEPTH_LOG2 = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  trig_valid,
  input  logic [23:0]           trig_evn,
  input  logic [11:0]           trig_bx,
  input  logic [N_F2-1:0]       f2_empty,
  input  bus_word_t [N_F2-1:0]  f2_data,
  output logic [N_F2-1:0]       f2_rd,
  input  logic [3:0]            tts_state,
  output logic                  f3_wr,
  output f3_word_t              f3_data,
  input  logic                  f3_full,
  output logic [1:0]            bus_valid,
  output bus_word_t [1:0]       bus_data,
  output logic                  trig_overflow,
  output logic [31:0]           events_built
);
  localparam int HALF = N_F2 / 2;
  typedef enum logic [1:0] {B_IDLE, B_HDR, B_DATA, B_TRL} bstate_t;

  bstate_t                  state;
  logic [$clog2(N_F2)-1:0]  k;
  logic [23:0]              evn, len;
  logic [11:0]              bx;
  logic                     any_err;

  logic        tq_empty, tq_full, tq_rd, tq_nf_unused;
  logic [35:0] tq_data;
  logic [TRIG_DEPTH_LOG2:0] tq_level_unused;
  sync_fifo #(.WIDTH(36), .DEPTH_LOG2(TRIG_DEPTH_LOG2), .NEARLY_FULL((1 << TRIG_DEPTH_LOG2) - 1)) u_trigq (
    .clk, .rst_n, .wr_en(trig_valid && !tq_full), .wr_data({trig_evn, trig_bx}),
    .rd_en(tq_rd), .rd_data(tq_data), .empty(tq_empty), .full(tq_full),
    .nearly_full(tq_nf_unused), .level(tq_level_unused));
  assign trig_overflow = trig_valid && tq_full;

  // the two collection buses
  logic      sel_b;
  bus_word_t cur;
  logic      cur_ok;
  logic [$clog2(N_F2)-1:0] k_in_bus;
  assign k_in_bus = k % ($bits(k))'(HALF);
  assign sel_b = (k >= ($bits(k))'(HALF));
  always_comb begin
    bus_data[0] = f2_data[k_in_bus];
    bus_data[1] = f2_data[($bits(k))'(HALF) + k_in_bus];
    cur         = bus_data[sel_b];
  end
  assign cur_ok = state == B_DATA && !f2_empty[k] && !f3_full;
  assign bus_valid[0] = cur_ok && !sel_b;
  assign bus_valid[1] = cur_ok && sel_b;
  assign tq_rd = state == B_IDLE && !tq_empty;

  always_comb begin
    f2_rd = '0;
    if (cur_ok) f2_rd[k] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= B_IDLE;
      k            <= '0;
      evn          <= '0;
      bx           <= '0;
      len          <= '0;
      any_err      <= 1'b0;
      f3_wr        <= 1'b0;
      f3_data      <= '0;
      events_built <= '0;
    end else begin
      f3_wr <= 1'b0;
      case (state)
        B_IDLE:
          if (!tq_empty) begin
            {evn, bx} <= tq_data;
            state     <= B_HDR;
          end
        B_HDR:
          if (!f3_full) begin
            f3_wr   <= 1'b1;
            f3_data <= '{ctrl: 1'b1, last: 1'b0,
                         data: {4'h5, 4'h1, evn, bx, SOURCE_ID, 4'h1, 4'h0}};
            len     <= 24'd1;
            any_err <= 1'b0;
            k       <= '0;
            state   <= B_DATA;
          end
        B_DATA:
          if (cur_ok) begin
            if (cur.hi_v) begin
              f3_wr   <= 1'b1;
              f3_data <= '{ctrl: 1'b0, last: 1'b0,
                           data: cur.lo_v ? cur.data : {cur.data[63:32], 32'd0}};
              len     <= len + 1'b1;
            end
            if (cur.has_err) any_err <= 1'b1;
            if (cur.eoe) begin
              if (k == ($bits(k))'(N_F2 - 1)) state <= B_TRL;
              else k <= k + 1'b1;
            end
          end
        B_TRL:
          if (!f3_full) begin
            f3_wr   <= 1'b1;
            f3_data <= '{ctrl: 1'b1, last: 1'b1,
                         data: {4'hA, 4'h0, len + 24'd1, 16'h0000, 3'b000, any_err, 4'h0, tts_state, 4'h0}};
            events_built <= events_built + 1'b1;
            state   <= B_IDLE;
          end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule

// group_builder: moves one event of a group of inputs from FIFO-1 to FIFO-2.
//
// Each FIFO-2 collects the data of 4 or 5 inputs. For every trigger (queued
// with the low eight bits of its TTC event number) this block visits its
// inputs in order. For each input it waits until that input's FIFO-1 holds
// data; if nothing arrives within TIMEOUT cycles it writes an error word
// (code GRP_TMO) instead and goes on. Otherwise it copies the event block up
// to and including the trailer word. The event number in the block's header
// is compared with the trigger's: a mismatch adds an error word right after
// the header, a report to the error memory and a mismatch pulse for the TTS
// logic; an input whose event number was wrong in OOS_LIMIT events in a row
// raises oos until its number matches again; a match gives a match pulse. Words are packed two per 64+4-bit
// FIFO-2 entry (bus_word_t); the last entry of the event carries eoe, and may
// hold one word or none. The event-number check after waiting for all inputs
// follows the document; the visiting order, the time-out and the packing are
// this design's choices.
// Neither error of this block is critical, so err.critical is always 0.
// Timing: at most one 32-bit word per cycle; copying stalls while FIFO-2 is
// nearly full, so its NEARLY_FULL margin must be at least 2 entries.
module group_builder
  import fed_pkg::*;
#(
  parameter int N_IN            = 5,
  parameter int TIMEOUT         = 8192,
  parameter int TRIG_DEPTH_LOG2 = 5,
  parameter int OOS_LIMIT       = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  trig_valid,
  input  logic [7:0]            trig_evn,
  input  logic [N_IN-1:0]       f1_empty,
  input  fed_word_t [N_IN-1:0]  f1_data,
  output logic [N_IN-1:0]       f1_rd,
  output logic                  f2_wr,
  output bus_word_t             f2_data,
  input  logic                  f2_nearly_full,
  output logic                  evn_match,
  output logic                  evn_mismatch,
  output logic                  oos,
  output err_t                  err,
  output logic                  trig_overflow
);
  typedef enum logic [1:0] {G_IDLE, G_WAIT, G_COPY, G_FLUSH} gstate_t;

  gstate_t                      state;
  logic [$clog2(N_IN)-1:0]      idx;
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  logic [7:0]                   evn;
  logic                         pend_err;
  logic [5:0]                   hdr_chan;   // input number of the mismatching header
  logic                         half_v;     // a word waits in the upper half
  logic [31:0]                  half_w;
  logic                         half_err;

  // trigger queue
  logic       tq_empty, tq_full, tq_rd, tq_nf_unused;
  logic [7:0] tq_evn;
  logic [TRIG_DEPTH_LOG2:0] tq_level_unused;
  sync_fifo #(.WIDTH(8), .DEPTH_LOG2(TRIG_DEPTH_LOG2), .NEARLY_FULL((1 << TRIG_DEPTH_LOG2) - 1)) u_trigq (
    .clk, .rst_n, .wr_en(trig_valid && !tq_full), .wr_data(trig_evn),
    .rd_en(tq_rd), .rd_data(tq_evn), .empty(tq_empty), .full(tq_full),
    .nearly_full(tq_nf_unused), .level(tq_level_unused));
  assign trig_overflow = trig_valid && tq_full;

  fed_word_t cur;
  assign cur = f1_data[idx];

  // per input: consecutive events with a wrong event number
  logic [N_IN-1:0][$clog2(OOS_LIMIT+1)-1:0] miss_cnt;
  always_comb begin
    oos = 1'b0;
    for (int i = 0; i < N_IN; i++)
      if (miss_cnt[i] == ($bits(miss_cnt[i]))'(OOS_LIMIT)) oos = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_cnt <= '0;
    else if (evn_match) miss_cnt[idx] <= '0;
    else if (evn_mismatch && miss_cnt[idx] != ($bits(miss_cnt[idx]))'(OOS_LIMIT))
      miss_cnt[idx] <= miss_cnt[idx] + 1'b1;
  end

  // one word to push this cycle
  logic        push, push_err, last_in;
  fed_word_t   push_w;
  logic        timed_out;
  assign last_in   = (idx == ($bits(idx))'(N_IN - 1));
  assign timed_out = (timer == ($bits(timer))'(TIMEOUT));

  always_comb begin
    push     = 1'b0;
    push_err = 1'b0;
    push_w   = '0;
    f1_rd    = '0;
    tq_rd    = 1'b0;
    err      = '0;
    err.evn  = evn;
    err.chan = cur.chan;
    evn_match    = 1'b0;
    evn_mismatch = 1'b0;
    case (state)
      G_WAIT:
        if (!f2_nearly_full && f1_empty[idx] && timed_out) begin
          push     = 1'b1;
          push_err = 1'b1;
          push_w   = '{chan: 6'd0, roc: ROC_ERR, dcol: 5'(ERR_GRP_TMO), pix: 8'(idx), adc: evn};
          err.valid = 1'b1;
          err.code  = ERR_GRP_TMO;
          err.chan  = 6'd0;
        end
      G_COPY:
        if (!f2_nearly_full) begin
          if (pend_err) begin
            push     = 1'b1;
            push_err = 1'b1;
            push_w   = '{chan: hdr_chan, roc: ROC_ERR, dcol: 5'(ERR_EVN), pix: 8'd0, adc: evn};
          end else if (!f1_empty[idx]) begin
            push       = 1'b1;
            push_w     = cur;
            f1_rd[idx] = 1'b1;
            if (cur.roc == ROC_HDR) begin
              if (cur.adc != evn) begin
                evn_mismatch = 1'b1;
                err.valid    = 1'b1;
                err.code     = ERR_EVN;
                err.evn      = cur.adc;
              end else evn_match = 1'b1;
            end
          end
        end
      default: ;
    endcase
    if (state == G_IDLE && !tq_empty) tq_rd = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= G_IDLE;
      idx      <= '0;
      timer    <= '0;
      evn      <= '0;
      pend_err <= 1'b0;
      hdr_chan <= '0;
      half_v   <= 1'b0;
      half_w   <= '0;
      half_err <= 1'b0;
      f2_wr    <= 1'b0;
      f2_data  <= '0;
    end else begin
      f2_wr <= 1'b0;
      // packing of pushed words into 64+4-bit entries
      if (push) begin
        if (half_v) begin
          f2_wr    <= 1'b1;
          f2_data  <= '{hi_v: 1'b1, lo_v: 1'b1, eoe: 1'b0, has_err: half_err || push_err,
                        data: {half_w, push_w}};
          half_v   <= 1'b0;
          half_err <= 1'b0;
        end else begin
          half_v   <= 1'b1;
          half_w   <= push_w;
          half_err <= push_err;
        end
      end
      case (state)
        G_IDLE:
          if (!tq_empty) begin
            evn   <= tq_evn;
            idx   <= '0;
            timer <= '0;
            state <= G_WAIT;
          end
        G_WAIT:
          if (!f1_empty[idx]) begin
            state <= G_COPY;
          end else if (timed_out) begin
            if (!f2_nearly_full) begin
              timer <= '0;
              if (last_in) state <= G_FLUSH;
              else idx <= idx + 1'b1;
            end
          end else timer <= timer + 1'b1;
        G_COPY:
          if (!f2_nearly_full) begin
            if (pend_err) pend_err <= 1'b0;
            else if (!f1_empty[idx]) begin
              if (cur.roc == ROC_HDR && cur.adc != evn) begin
                pend_err <= 1'b1;
                hdr_chan <= cur.chan;
              end
              if (cur.roc == ROC_TRL) begin
                timer <= '0;
                if (last_in) state <= G_FLUSH;
                else begin
                  idx   <= idx + 1'b1;
                  state <= G_WAIT;
                end
              end
            end
          end
        G_FLUSH: begin
          // close the event: a lone word or an empty entry carries eoe
          // (no push happens in this state)
          f2_wr    <= 1'b1;
          f2_data  <= '{hi_v: half_v, lo_v: 1'b0, eoe: 1'b1, has_err: half_err,
                        data: {half_w, 32'd0}};
          half_v   <= 1'b0;
          half_err <= 1'b0;
          state    <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end
endmodule

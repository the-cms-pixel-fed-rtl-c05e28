// input_processor: the data processor of one optical input.
//
// It decodes the analogue readout stream of one link, already synchronised and
// pedestal-corrected, and writes one event block per trigger into FIFO-1. The
// pixel address of a hit comes as five symbols of six pulse-height levels
// (two for the double column, three for the pixel in it), followed by the
// pulse height of the hit. The stream layout read here is the usual one of the
// CMS pixel readout chain (this design's reading, the document only fixes the
// five six-level symbols):
//   idle           black level (these samples feed the pedestal loop)
//   event header   3 x ultra-black, black, 4 symbols = event number (2 bits each)
//   per chip       ultra-black, black, last-DAC          -> next ROC number
//   per hit        dcol1 dcol0 pix2 pix1 pix0 (base 6), pulse height
//   event trailer  2 x ultra-black, 2 x black, 2 status samples
// Output words (fed_pkg::fed_word_t): a header word with the event number,
// one word per hit, a trailer word with status flags and the hit count.
// Rules: an event with more than MAX_HITS hits is cut: the trailer is written
// at once (status TRUNC) and the rest of the stream up to its trailer is skipped. When FIFO-1
// reports nearly full, hits are dropped and only header and trailer are kept
// (status REDUCED); busy is high while that lasts. An address outside the
// chip is dropped (status INVALID). If the trailer does not come within
// TIMEOUT samples the block is closed with status TIMEOUT. Each of these
// sends a report to the error memory. A word that finds FIFO-1 completely
// full (the trigger source ignored busy) is lost. The time-out, a link that stopped
// in the middle of an event, is reported as critical. Truncation, reduction, busy and error
// memory follow the document; limits and status codes are this design's.
// The input-number field of every word is the CHANNEL parameter, so those
// six output bits are constant in each instance.
// Timing: one sample in per valid strobe, at most one FIFO-1 word out per cycle, in
// the cycle the deciding sample arrives (combinational from in_sample).
module input_processor
  import fed_pkg::*;
#(
  parameter logic [5:0] CHANNEL  = 6'd1,
  parameter int         MAX_HITS = 64,
  parameter int         TIMEOUT  = 2048
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sample_t    in_sample,
  input  levels_t    thr,
  input  logic       fifo_nearly_full,
  input  logic       fifo_full,
  output logic       wr_en,
  output fed_word_t  wr_data,
  output logic       black_valid,
  output logic       hit_valid,
  output logic [5:0] hit_col,
  output logic       busy,
  output err_t       err
);
  typedef enum logic [2:0] {S_IDLE, S_EVN, S_DATA, S_UB1, S_LASTDAC, S_TRL, S_SKIP} state_t;

  state_t      state;
  logic [1:0]  ubcnt;
  logic [2:0]  symcnt;
  logic [2:0]  sym [5];
  logic        closed;   // trailer already written (truncated event)
  logic [7:0]  evn;
  logic [4:0]  roc;
  logic [7:0]  nhits;
  logic [4:0]  status;
  logic        reduced;
  logic [$clog2(TIMEOUT+1)-1:0] timer;

  logic        is_ub;
  logic [2:0]  lvl;
  logic [5:0]  dcol_full;
  logic [7:0]  pix_full;
  logic        addr_ok;

  assign is_ub = in_sample < thr.ub;
  always_comb begin
    lvl = '0;
    for (int k = 0; k < 5; k++) if (in_sample >= thr.lvl[k]) lvl = 3'(k + 1);
  end
  // in S_DATA with symcnt==5 the current sample is the pulse height
  assign dcol_full = 6'(sym[0]) * 6'd6 + 6'(sym[1]);
  assign pix_full  = 8'(sym[2]) * 8'd36 + 8'(sym[3]) * 8'd6 + 8'(sym[4]);
  assign addr_ok   = dcol_full < 6'(N_DCOL) && roc != 5'd0 && roc < 5'd25;

  function automatic fed_word_t mk(logic [4:0] r, logic [4:0] d, logic [7:0] p, logic [7:0] a);
    mk = '{chan: CHANNEL, roc: r, dcol: d, pix: p, adc: a};
  endfunction

  // decisions for the current sample
  logic hit_done, trunc_now, drop_reduced, timeout_now;
  assign hit_done     = in_valid && state == S_DATA && !is_ub && symcnt == 3'd5;
  assign drop_reduced = reduced || fifo_nearly_full;
  assign trunc_now    = hit_done && addr_ok && !drop_reduced && nhits == 8'(MAX_HITS);
  assign timeout_now  = in_valid && state != S_IDLE && state != S_EVN &&
                        timer == ($bits(timer))'(TIMEOUT);

  logic wr_req;
  assign wr_en = wr_req && !fifo_full;   // a word that finds FIFO-1 full is lost

  always_comb begin
    wr_req      = 1'b0;
    wr_data     = '0;
    black_valid = 1'b0;
    hit_valid   = 1'b0;
    hit_col     = {dcol_full[4:0], pix_full[0]};
    err         = '0;
    err.chan    = CHANNEL;
    err.evn     = evn;
    if (in_valid) begin
      if (timeout_now) begin
        if (!closed) begin
          wr_req  = 1'b1;
          wr_data = mk(ROC_TRL, status | 5'(1 << TS_TIMEOUT), nhits, evn);
        end
        err.valid    = 1'b1;
        err.critical = 1'b1;   // the link stopped in the middle of an event
        err.code     = ERR_IN_TMO;
      end else begin
        case (state)
          S_IDLE: black_valid = !is_ub && ubcnt != 2'd3;
          S_EVN:
            if (symcnt == 3'd3) begin
              wr_req  = 1'b1;
              wr_data = mk(ROC_HDR, 5'd0, 8'd0, {evn[5:0], lvl[1:0]});
              err.evn   = {evn[5:0], lvl[1:0]};
              err.valid = fifo_nearly_full;
              err.code  = ERR_REDUCED;
            end
          S_DATA:
            if (hit_done) begin
              if (!addr_ok) begin
                err.valid = !status[TS_INVALID];
                err.code  = ERR_INVALID;
              end else if (drop_reduced) begin
                err.valid = !reduced;
                err.code  = ERR_REDUCED;
              end else if (trunc_now) begin
                wr_req    = 1'b1;
                wr_data   = mk(ROC_TRL, status | 5'(1 << TS_TRUNC), nhits, evn);
                err.valid = 1'b1;
                err.code  = ERR_TRUNC;
              end else begin
                wr_req    = 1'b1;
                wr_data   = mk(roc, dcol_full[4:0], pix_full, in_sample[9:2]);
                hit_valid = 1'b1;
              end
            end
          S_TRL:
            if (symcnt == 3'd3 && !closed) begin
              wr_req  = 1'b1;
              wr_data = mk(ROC_TRL, status, nhits, evn);
            end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ubcnt   <= '0;
      symcnt  <= '0;
      evn     <= '0;
      roc     <= '0;
      nhits   <= '0;
      status  <= '0;
      reduced <= 1'b0;
      timer   <= '0;
      busy    <= 1'b0;
      closed  <= 1'b0;
      for (int i = 0; i < 5; i++) sym[i] <= '0;
    end else if (in_valid) begin
      if (state == S_IDLE || state == S_EVN) timer <= '0;
      else timer <= timer + 1'b1;
      busy <= reduced || fifo_nearly_full;
      if (timeout_now) begin
        state   <= S_IDLE;
        ubcnt   <= '0;
        reduced <= 1'b0;
      end else begin
        case (state)
          S_IDLE:
            if (is_ub) begin
              if (ubcnt != 2'd3) ubcnt <= ubcnt + 1'b1;
            end else if (ubcnt == 2'd3) begin
              state  <= S_EVN;
              symcnt <= '0;
              ubcnt  <= '0;
            end else begin
              ubcnt <= '0;
            end
          S_EVN: begin
            evn    <= {evn[5:0], lvl[1:0]};
            symcnt <= symcnt + 1'b1;
            if (symcnt == 3'd3) begin
              state   <= S_DATA;
              symcnt  <= '0;
              roc     <= '0;
              nhits   <= '0;
              status  <= '0;
              closed  <= 1'b0;
              reduced <= fifo_nearly_full;
              if (fifo_nearly_full) status[TS_REDUCED] <= 1'b1;
            end
          end
          S_DATA:
            if (is_ub) begin
              state <= S_UB1;
            end else if (symcnt == 3'd5) begin
              symcnt <= '0;
              if (!addr_ok) status[TS_INVALID] <= 1'b1;
              else if (drop_reduced) begin
                reduced <= 1'b1;
                status[TS_REDUCED] <= 1'b1;
              end else if (trunc_now) begin
                state  <= S_SKIP;
                ubcnt  <= '0;
                closed <= 1'b1;
              end else if (nhits != 8'hff) nhits <= nhits + 1'b1;
            end else begin
              sym[symcnt] <= lvl;
              symcnt <= symcnt + 1'b1;
            end
          S_UB1:
            if (is_ub) begin
              state  <= S_TRL;
              symcnt <= '0;
            end else begin
              state <= S_LASTDAC;
              if (roc != 5'd31) roc <= roc + 1'b1;
            end
          S_LASTDAC: begin
            state  <= S_DATA;
            symcnt <= '0;
          end
          S_TRL: begin
            symcnt <= symcnt + 1'b1;
            if (symcnt == 3'd3) begin
              state   <= S_IDLE;
              ubcnt   <= '0;
              reduced <= 1'b0;
            end
          end
          S_SKIP:
            // wait for the two ultra-black samples that open the trailer
            if (is_ub) begin
              if (ubcnt == 2'd1) begin
                state  <= S_TRL;
                symcnt <= '0;
                ubcnt  <= '0;
              end else ubcnt <= ubcnt + 1'b1;
            end else ubcnt <= '0;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

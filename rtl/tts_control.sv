// tts_control: state reported to the trigger throttling system (TTS).
//
// The board must either keep up with the trigger rate or tell the central
// control to slow down. This block encodes that as the 4-bit TTS code, chosen
// by priority: ERROR (a critical error was reported; sticky until cleared by
// the control bus), OUT_OF_SYNC (an input's event number has been wrong in
// several events in a row, as reported by the group builders on oos_in), BUSY (a buffer is nearly full), WARNING (the
// event store is filling up), else READY. The busy and alarm behaviour follow
// the document; the codes are the CMS convention. Output registered, one cycle after its cause.
module tts_control
  import fed_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       busy_in,
  input  logic       warn_in,
  input  logic       oos_in,
  input  logic       critical,
  input  logic       clear,
  output logic [3:0] tts
);
  logic err_sticky;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_sticky <= 1'b0;
      tts        <= TTS_READY;
    end else begin
      if (clear) err_sticky <= 1'b0;
      else if (critical) err_sticky <= 1'b1;

      if (err_sticky)   tts <= TTS_ERROR;
      else if (oos_in)  tts <= TTS_OOS;
      else if (busy_in) tts <= TTS_BUSY;
      else if (warn_in) tts <= TTS_WARN;
      else              tts <= TTS_READY;
    end
  end
endmodule

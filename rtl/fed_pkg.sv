// fed_pkg: types and constants shared by the pixel front-end driver (FED).
//
// The FED digitises the analogue readout of 36 optical links, decodes the
// pixel hits of each link into 32-bit words, builds one event fragment from
// all links and ships it over the 64-bit S-Link. This package holds the word
// formats used between the blocks:
//   * fed_word_t  - the 32-bit data word of FIFO-1 (channel, ROC, double
//                   column, pixel, pulse height). Event header, trailer and
//                   error words reuse the layout with reserved ROC codes.
//   * bus_word_t  - the 64+4-bit entry of FIFO-2 and of the two collection
//                   buses: two 32-bit words plus four control bits.
//   * err_t       - an error report sent to the error memory.
//   * levels_t    - the thresholds used to decode the analogue levels.
// The 64+4 bus width, the 10-bit ADC and the five address symbols in six
// levels are the design's published figures; the field layouts and the
// reserved codes are this implementation's choice (they follow the usual CMS
// pixel conventions).
package fed_pkg;

  localparam int ADC_BITS   = 10;
  localparam int N_LEVELS   = 6;    // pulse-height steps per address symbol
  localparam int N_ADDR_SYM = 5;    // 2 double-column + 3 pixel symbols
  localparam int N_DCOL     = 26;   // double columns on a readout chip
  localparam int N_COLS     = 52;   // pixel columns on a readout chip

  typedef logic [ADC_BITS-1:0] sample_t;

  // Reserved ROC codes marking non-hit words in the 32-bit word stream
  localparam logic [4:0] ROC_HDR = 5'd28;  // event header, adc field = event number
  localparam logic [4:0] ROC_ERR = 5'd29;  // error word, dcol field = error code
  localparam logic [4:0] ROC_TRL = 5'd30;  // trailer, dcol = status, pix = hit count

  typedef struct packed {
    logic [5:0] chan;   // input number 1..36
    logic [4:0] roc;    // readout chip 1..24 or reserved code
    logic [4:0] dcol;   // double column 0..25
    logic [7:0] pix;    // pixel index in the double column 0..215
    logic [7:0] adc;    // pulse height (upper 8 ADC bits)
  } fed_word_t;

  // Trailer status bits (dcol field of a trailer word)
  localparam int TS_TRUNC   = 0;  // more hits than allowed: stream truncated
  localparam int TS_REDUCED = 1;  // FIFO-1 nearly full: hits dropped
  localparam int TS_INVALID = 2;  // undecodable address seen
  localparam int TS_TIMEOUT = 3;  // trailer never came

  typedef enum logic [3:0] {
    ERR_NONE     = 4'd0,
    ERR_TRUNC    = 4'd1,
    ERR_REDUCED  = 4'd2,
    ERR_INVALID  = 4'd3,
    ERR_IN_TMO   = 4'd4,   // input processor: no trailer
    ERR_EVN      = 4'd5,   // event number differs from the trigger's
    ERR_GRP_TMO  = 4'd6    // input delivered nothing in time
  } err_code_t;

  typedef struct packed {
    logic       valid;
    logic       critical;
    err_code_t  code;
    logic [5:0] chan;
    logic [7:0] evn;
  } err_t;

  // 64+4-bit entry of FIFO-2 and of the collection buses
  typedef struct packed {
    logic        hi_v;     // data[63:32] holds a word
    logic        lo_v;     // data[31:0] holds a word
    logic        eoe;      // last entry of this group's event
    logic        has_err;  // an error word is in this entry
    logic [63:0] data;
  } bus_word_t;

  // FIFO-3 entry: S-Link control flag, end of fragment, 64-bit data
  typedef struct packed {
    logic        ctrl;
    logic        last;
    logic [63:0] data;
  } f3_word_t;

  typedef struct packed {
    sample_t              ub;    // below this: ultra-black
    sample_t [4:0]        lvl;   // ascending boundaries of the six address levels
  } levels_t;

  // TTS state codes sent to the trigger control system
  localparam logic [3:0] TTS_READY = 4'b1000;
  localparam logic [3:0] TTS_BUSY  = 4'b0100;
  localparam logic [3:0] TTS_OOS   = 4'b0010;
  localparam logic [3:0] TTS_WARN  = 4'b0001;
  localparam logic [3:0] TTS_ERROR = 4'b1100;


endpackage

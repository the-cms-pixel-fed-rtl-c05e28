// baseline_adjust: automatic pedestal correction of one input.
//
// The analogue optical link drifts with temperature, which moves the black
// (pedestal) level of the signal and with it every decoding threshold. This
// block adds a signed offset to every sample so that the black level sits at
// the programmed target. The decoder marks the samples it sees as idle black
// level (black_valid, in the same cycle as out_valid). Over each window of
// 2**STEP_LOG2 such samples the block sums the error of the corrected level
// against the target; at the end of the window, if the mean error exceeds TOL
// counts, the offset is moved by that mean. The loop so converges within one
// or two windows and ignores noise below TOL. Correcting digitally, the window
// and the dead band are this design's choices; the document only asks that
// the pedestal be adjusted automatically to a pre-defined value.
// Timing: out_sample is in_sample + offset, clamped, one cycle later.
module baseline_adjust
#(
  parameter int ADC_BITS  = 10,
  parameter int TOL       = 4,
  parameter int STEP_LOG2 = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [ADC_BITS-1:0] in_sample,
  input  logic                black_valid,
  input  logic [ADC_BITS-1:0] target,
  output logic                out_valid,
  output logic [ADC_BITS-1:0] out_sample,
  output logic signed [ADC_BITS:0] offset
);
  localparam int ACC_BITS = ADC_BITS + STEP_LOG2 + 2;
  localparam int MAXV     = (1 << ADC_BITS) - 1;

  logic signed [ACC_BITS-1:0] acc, acc_next, mean;
  logic [STEP_LOG2-1:0]       cnt;
  logic signed [ADC_BITS+1:0] corr;

  assign corr = $signed({2'b00, in_sample}) + offset;
  assign acc_next = acc + ACC_BITS'($signed({1'b0, out_sample}) - $signed({1'b0, target}));
  assign mean = acc_next >>> STEP_LOG2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
      offset     <= '0;
      acc        <= '0;
      cnt        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (corr < $signed((ADC_BITS+2)'(0))) out_sample <= '0;
        else if (corr > $signed((ADC_BITS+2)'(MAXV))) out_sample <= ADC_BITS'(MAXV);
        else out_sample <= corr[ADC_BITS-1:0];
      end
      if (black_valid && out_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) begin
          acc <= '0;
          if (mean > $signed(ACC_BITS'(TOL)) || mean < -$signed(ACC_BITS'(TOL))) offset <= offset - (ADC_BITS+1)'(mean);
        end else begin
          acc <= acc_next;
        end
      end
    end
  end
endmodule

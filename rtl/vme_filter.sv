// vme_filter: synchroniser and spike filter for VME input lines.
//
// The board's VME lines (data strobes, address, data, write) run near fast
// signals and can pick up crosstalk. Each bit is first synchronised to the
// board clock by two flip-flops; the filtered output then follows the
// synchronised value only after it has differed from the output for STABLE
// consecutive clocks, so pulses shorter than STABLE clocks are removed. The
// delay is 2 + STABLE clocks. Filtering these inputs is from the document;
// the filter length is this design's.
module vme_filter #(
  parameter int WIDTH  = 1,
  parameter int STABLE = 3,
  parameter logic [WIDTH-1:0] INIT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  localparam int CB = $clog2(STABLE + 1);
  logic [WIDTH-1:0] s1, s2;
  logic [CB-1:0]    cnt [WIDTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= INIT;
      s2 <= INIT;
      q  <= INIT;
      for (int i = 0; i < WIDTH; i++) cnt[i] <= '0;
    end else begin
      s1 <= d;
      s2 <= s1;
      for (int i = 0; i < WIDTH; i++) begin
        if (s2[i] == q[i]) cnt[i] <= '0;
        else if (cnt[i] == CB'(STABLE - 1)) begin
          q[i]   <= s2[i];
          cnt[i] <= '0;
        end else cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end
endmodule

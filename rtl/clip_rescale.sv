// clip_rescale: trims the IDFT output to the DAC's physical resolution.
//
// Each of the NS samples is divided by 2^SHIFT with rounding (add half an LSB,
// arithmetic shift) and then saturated to the signed OUT_W-bit range
// [-2^(OUT_W-1), 2^(OUT_W-1)-1]. The rescaling is a power of two and the clip
// level is the DAC's full scale; both are this design's choice, made so that
// with the default table amplitude about 95 % of the samples fall inside the
// DAC window (the document targets an optimum of 93 %). clip[i] flags a sample
// that was saturated.
//
// Timing: registered, one clock of latency, one vector of NS samples per clock.
// Output is two's complement.
module clip_rescale #(
  parameter int NS    = 128,
  parameter int IN_W  = 14,
  parameter int OUT_W = 6,
  parameter int SHIFT = 5
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  din  [NS],
  output logic signed [OUT_W-1:0] dout [NS],
  output logic [NS-1:0]           clip
);

  localparam int RW = IN_W + 1;
  localparam logic signed [RW-1:0] MAXV = RW'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [RW-1:0] MINV = RW'(-(1 <<< (OUT_W - 1)));

  always_ff @(posedge clk) begin
    logic signed [RW-1:0] r;
    for (int i = 0; i < NS; i++) begin
      r = (RW'(din[i]) + RW'(1 <<< (SHIFT - 1))) >>> SHIFT;
      if (r > MAXV) begin
        dout[i] <= MAXV[OUT_W-1:0];
        clip[i] <= 1'b1;
      end else if (r < MINV) begin
        dout[i] <= MINV[OUT_W-1:0];
        clip[i] <= 1'b1;
      end else begin
        dout[i] <= r[OUT_W-1:0];
        clip[i] <= 1'b0;
      end
    end
  end

endmodule

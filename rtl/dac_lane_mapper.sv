// dac_lane_mapper: distributes the samples of one FPGA clock over the serial
// lanes that feed the DAC.
//
// The DAC takes DAC_W bits per sample through MUX-to-1 multiplexers, so it has
// DAC_W * MUX input lines (24 for 6 bits and 4:1), each driven by one FPGA
// high-speed transmitter. Sample s of the clock (s = 0 first in time) goes to
// multiplexer input m = s mod MUX in time slot t = s / MUX. Lane
// b*MUX + m therefore carries bit b of samples m, m+MUX, m+2*MUX, ...;
// bit t of its LW-bit parallel word (LW = NS/MUX = 32) is the bit of time
// slot t, with bit 0 leaving the serializer first. This bit and lane order is
// this design's choice; only the lane count, lane rate and the 4:1
// multiplexing are given.
//
// Timing: registered, one clock of latency.
module dac_lane_mapper #(
  parameter int NS    = 128,
  parameter int DAC_W = 6,
  parameter int MUX   = 4,
  parameter int LANES = DAC_W * MUX,
  parameter int LW    = NS / MUX
) (
  input  logic                    clk,
  input  logic signed [DAC_W-1:0] samples [NS],
  output logic [LANES-1:0][LW-1:0] lanes
);

  always_ff @(posedge clk)
    for (int b = 0; b < DAC_W; b++)
      for (int m = 0; m < MUX; m++)
        for (int t = 0; t < LW; t++)
          lanes[b*MUX + m][t] <= samples[t*MUX + m][b];

  initial assert (LANES == DAC_W * MUX && LW * MUX == NS)
    else $error("dac_lane_mapper: inconsistent lane parameters");

endmodule

// ofdm_tx: real-time OFDM transmitter, digital part.
//
// Two ofdm_fpga_channel instances run in lock step from the same clock and
// reset, each with an identically seeded PRBS, so they modulate the same
// 16QAM data: channel I (PART = 0) computes the real part of the OFDM signal
// for the in-phase DAC, channel Q (PART = 1) the imaginary part for the
// quadrature DAC. Per 218.75 MHz clock each channel emits 128 6-bit samples
// (two 64-subcarrier OFDM symbols) on 24 lanes of 32 bits, i.e. 24 x 7 Gbit/s
// into a 4:1-multiplexing 28 GSa/s DAC. With 58 data subcarriers of 4 bits
// and 437.5 M symbols/s the line rate is 101.5 Gbit/s.
//
// Each channel has its own table write port, as each FPGA is loaded by its
// own controller; bank_sel is common so that both switch to new tables
// (e.g. a new pre-equalisation) on the same symbol.
//
// The serial transmitters, the DACs, the laser and the optical modulator are
// outside this module: lanes_i / lanes_q are the parallel words handed to the
// serializers. Latency from reset release to the first valid lane word is 10
// clocks (see ofdm_fpga_channel).
module ofdm_tx
  import ofdm_pkg::*;
#(
  parameter int N     = N_SC,
  parameter int LW    = LUT_W,
  parameter int BANKS = LUT_BANKS,
  parameter int LANES = DAC_W * DAC_MUX,
  parameter int LANEW = PAR * N_SC / DAC_MUX
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(BANKS)-1:0]     bank_sel,
  // table write port, in-phase FPGA
  input  logic                         wr_i_en,
  input  logic [$clog2(N)-1:0]         wr_i_k,
  input  logic [$clog2(BANKS)-1:0]     wr_i_bank,
  input  logic [1:0]                   wr_i_base,
  input  logic [$clog2(N)-1:0]         wr_i_phase,
  input  logic signed [LW-1:0]         wr_i_data,
  // table write port, quadrature FPGA
  input  logic                         wr_q_en,
  input  logic [$clog2(N)-1:0]         wr_q_k,
  input  logic [$clog2(BANKS)-1:0]     wr_q_bank,
  input  logic [1:0]                   wr_q_base,
  input  logic [$clog2(N)-1:0]         wr_q_phase,
  input  logic signed [LW-1:0]         wr_q_data,
  // serializer words for the in-phase and quadrature DACs
  output logic [LANES-1:0][LANEW-1:0]  lanes_i,
  output logic [LANES-1:0][LANEW-1:0]  lanes_q,
  output logic [7:0]                   clip_count_i,
  output logic [7:0]                   clip_count_q
);

  ofdm_fpga_channel #(.PART(0), .N(N), .LW(LW), .BANKS(BANKS)) u_fpga_i (
    .clk, .rst_n, .bank_sel,
    .wr_en(wr_i_en), .wr_k(wr_i_k), .wr_bank(wr_i_bank), .wr_base(wr_i_base),
    .wr_phase(wr_i_phase), .wr_data(wr_i_data),
    .lanes(lanes_i), .clip_count(clip_count_i)
  );

  ofdm_fpga_channel #(.PART(1), .N(N), .LW(LW), .BANKS(BANKS)) u_fpga_q (
    .clk, .rst_n, .bank_sel,
    .wr_en(wr_q_en), .wr_k(wr_q_k), .wr_bank(wr_q_bank), .wr_base(wr_q_base),
    .wr_phase(wr_q_phase), .wr_data(wr_q_data),
    .lanes(lanes_q), .clip_count(clip_count_q)
  );

endmodule

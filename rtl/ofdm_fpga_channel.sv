// ofdm_fpga_channel: the signal processing of one transmitter FPGA.
//
// One channel computes one part of the complex OFDM signal: PART = 0 gives
// the real part (in-phase DAC), PART = 1 the imaginary part (quadrature DAC).
// Per clock it produces PAR = 2 complete OFDM symbols of N = 64 samples,
// i.e. 128 DAC samples, which at 218.75 MHz is the DAC's 28 GSa/s:
//
//   prbs_gen -> subcarrier allocation -> PAR x idft_core -> clip_rescale
//            -> dac_lane_mapper -> lanes (to the 24 serial transmitters)
//
// Subcarrier allocation: the PRBS word of a clock holds PAR * 58 * 4 bits.
// Symbol p (p = 0 is earlier in time) and data subcarrier d (d-th data
// subcarrier in ascending k) take the four consecutive bits starting at
// 4*(p*58 + d), the first of them as the symbol's MSB. This order is this
// design's choice.
//
// LUT reconfiguration: the write port and bank_sel go to both IDFT cores, so
// both symbol slots always use the same tables (see idft_lut).
//
// Timing: the PRBS word of clock t is on the lanes at clock t + 9
// (1 IDFT table read + 6 adder stages + 1 clip + 1 lane register). The first
// valid lane word follows reset release by 10 clocks. clip_count is the
// number of samples of the same lane word that were saturated.
module ofdm_fpga_channel
  import ofdm_pkg::*;
#(
  parameter int          PART  = 0,
  parameter int          N     = N_SC,
  parameter int          NPAR  = PAR,
  parameter int          LW    = LUT_W,
  parameter int          BANKS = LUT_BANKS,
  parameter int          SCALE = LUT_SCALE,
  parameter int          SHIFT = CLIP_SHIFT,
  parameter int          DW    = DAC_W,
  parameter int          MUX   = DAC_MUX,
  parameter logic [14:0] SEED  = 15'h7fff
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [$clog2(BANKS)-1:0]          bank_sel,
  input  logic                              wr_en,
  input  logic [$clog2(N)-1:0]              wr_k,
  input  logic [$clog2(BANKS)-1:0]          wr_bank,
  input  logic [1:0]                        wr_base,
  input  logic [$clog2(N)-1:0]              wr_phase,
  input  logic signed [LW-1:0]              wr_data,
  output logic [DW*MUX-1:0][NPAR*N/MUX-1:0] lanes,
  output logic [$clog2(NPAR*N+1)-1:0]       clip_count
);

  localparam int W     = LW + $clog2(N);
  localparam int NS    = NPAR * N;
  localparam int ND    = n_data(N);
  localparam int NBITS = NPAR * ND * BITS_SYM;

  logic [NBITS-1:0]      bits;
  logic [N-1:0][3:0]     sym [NPAR];
  logic signed [W-1:0]   x [NPAR][N];
  logic signed [W-1:0]   xs [NS];
  logic signed [DW-1:0]  ds [NS];
  logic [NS-1:0]         clip;

  prbs_gen #(.NBITS(NBITS), .SEED(SEED)) u_prbs (.clk, .rst_n, .bits);

  always_comb
    for (int p = 0; p < NPAR; p++)
      for (int k = 0; k < N; k++) begin
        sym[p][k] = '0;
        if (sc_type(k, N) == SC_DATA)
          for (int i = 0; i < 4; i++)
            sym[p][k][3-i] = bits[4*(p*ND + data_index(k, N)) + i];
      end

  for (genvar p = 0; p < NPAR; p++) begin : g_core
    idft_core #(
      .N(N), .LW(LW), .W(W), .BANKS(BANKS), .SCALE(SCALE), .PART(PART)
    ) u_idft (
      .clk, .rst_n, .sym(sym[p]), .bank_sel,
      .wr_en, .wr_k, .wr_bank, .wr_base, .wr_phase, .wr_data,
      .x(x[p])
    );
    for (genvar n = 0; n < N; n++) begin : g_s
      assign xs[p*N + n] = x[p][n];
    end
  end

  clip_rescale #(.NS(NS), .IN_W(W), .OUT_W(DW), .SHIFT(SHIFT)) u_clip (
    .clk, .din(xs), .dout(ds), .clip
  );

  dac_lane_mapper #(.NS(NS), .DAC_W(DW), .MUX(MUX)) u_map (
    .clk, .samples(ds), .lanes
  );

  always_ff @(posedge clk)
    clip_count <= ($bits(clip_count))'($countones(clip));

endmodule

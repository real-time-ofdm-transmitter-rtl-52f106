// idft_core: multiplier-less N-point inverse DFT for one signal part.
//
// Computes x_n = Re{ sum_k X_k e^(j 2 pi k n / N) } (PART = 0, in-phase
// channel) or Im{...} (PART = 1, quadrature channel) for one OFDM symbol per
// clock. The modulated-subcarrier waveforms come from look-up tables
// (idft_lut), so the transform is table reads plus a binary adder tree
// (idft_adder_tree) of log2(N) stages; no multiplication happens at run time.
// The pilot tones and the empty DC/Nyquist subcarriers are fixed by the
// subcarrier plan in ofdm_pkg; sym[k] is only used for data subcarriers.
//
// Timing: the symbol on sym at clock t gives x at clock t + 1 + log2(N)
// (7 clocks for N = 64). A new symbol can enter every clock.
// The LUT write port and bank_sel are passed to idft_lut unchanged.
module idft_core
  import ofdm_pkg::*;
#(
  parameter int          N     = N_SC,
  parameter int          LW    = LUT_W,
  parameter int          W     = LUT_W + $clog2(N_SC),
  parameter int          BANKS = LUT_BANKS,
  parameter int          SCALE = LUT_SCALE,
  parameter int          PART  = 0,
  parameter logic [3:0]  PILOT = PILOT_SYM
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N-1:0][3:0]             sym,
  input  logic [$clog2(BANKS)-1:0]      bank_sel,
  input  logic                          wr_en,
  input  logic [$clog2(N)-1:0]          wr_k,
  input  logic [$clog2(BANKS)-1:0]      wr_bank,
  input  logic [1:0]                    wr_base,
  input  logic [$clog2(N)-1:0]          wr_phase,
  input  logic signed [LW-1:0]          wr_data,
  output logic signed [W-1:0]           x [N]
);

  logic signed [W-1:0] contrib [N][N];

  idft_lut #(
    .N(N), .LW(LW), .W(W), .BANKS(BANKS), .SCALE(SCALE), .PART(PART), .PILOT(PILOT)
  ) u_lut (
    .clk, .rst_n, .sym, .bank_sel,
    .wr_en, .wr_k, .wr_bank, .wr_base, .wr_phase, .wr_data,
    .contrib
  );

  idft_adder_tree #(.N(N), .W(W)) u_tree (
    .clk, .contrib, .x
  );

endmodule

// idft_lut: the per-subcarrier waveform look-up tables of the LUT-based IDFT.
//
// Every data subcarrier k has a table of N_BASE = M/4 modulated waveforms, one
// per 16QAM point of the first quadrant, each N entries long and indexed by
// phase: entry phi of base b is round(SCALE * Re{X_b e^(j 2 pi phi/N)}) (or
// Im{} when PART = 1). For a symbol {quadrant r, base b} the contribution of
// subcarrier k to time sample n is entry (k*n + r*N/4) mod N of base b: the
// quadrant rotation is only a pointer offset, so no multiplier is needed and
// only a quarter of the constellation is stored.
//
// Only the first N/GCD(N,k) samples of subcarrier k are read, because the
// contribution repeats with that period; the following adder tree relies on
// this. The four pilot tones are constant, so their sum over the N samples
// is a single pre-computed ROM that enters at the first pilot's position; the
// other pilot positions and DC/Nyquist contribute zero.
//
// Reconfiguration: there are BANKS complete table sets. A write port
// (wr_en, wr_k, wr_bank, wr_base, wr_phase, wr_data) loads any entry while the
// design runs; bank_sel chooses the active set. bank_sel is registered, so a
// change applies to the symbol presented on the next clock (one clock, about
// 4.6 ns at 218.75 MHz). Writes must go to the inactive bank (asserted).
// Reset loads every bank with the unequalised waveforms.
//
// Timing: contrib for the symbol on sym appears one clock later.
// contrib[k][n] is valid for n < N/GCD(N,k) and zero elsewhere.
// sym[k] of non-data subcarriers is ignored.
module idft_lut
  import ofdm_pkg::*;
#(
  parameter int          N         = N_SC,
  parameter int          LW        = LUT_W,
  parameter int          W         = LUT_W + $clog2(N_SC),
  parameter int          BANKS     = LUT_BANKS,
  parameter int          SCALE     = LUT_SCALE,
  parameter int          PART      = 0,
  parameter logic [3:0]  PILOT     = PILOT_SYM
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
  output logic signed [W-1:0]           contrib [N][N]
);

  localparam int LOGN = $clog2(N);
  localparam int NB   = N_BASE;

  // Unequalised waveform set, loaded into every bank at reset.
  function automatic logic [NB*N*LW-1:0] make_init();
    logic [NB*N*LW-1:0] t;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < N; p++)
        t[(b*N+p)*LW +: LW] = LW'(lut_value(PART, b, p, N, SCALE));
    return t;
  endfunction

  // Sum of the pilot tones for each time sample n.
  function automatic logic [N*W-1:0] make_pilot();
    logic [N*W-1:0] t;
    int acc;
    for (int n = 0; n < N; n++) begin
      acc = 0;
      for (int k = 0; k < N; k++)
        if (sc_type(k, N) == SC_PILOT)
          acc += sym_value(PART, PILOT, (k * n) % N, N, SCALE);
      t[n*W +: W] = W'(acc);
    end
    return t;
  endfunction

  localparam logic [NB*N*LW-1:0] INIT_TBL  = make_init();
  localparam logic [N*W-1:0]     PILOT_ROM = make_pilot();
  localparam int                 PILOT_K   = first_pilot(N);

  logic signed [LW-1:0]       mem [N][BANKS][NB][N];
  logic [$clog2(BANKS)-1:0]   bank_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank_q <= '0;
      for (int k = 0; k < N; k++)
        for (int bk = 0; bk < BANKS; bk++)
          for (int b = 0; b < NB; b++)
            for (int p = 0; p < N; p++)
              mem[k][bk][b][p] <= INIT_TBL[(b*N+p)*LW +: LW];
    end else begin
      bank_q <= bank_sel;
      if (wr_en)
        mem[wr_k][wr_bank][wr_base][wr_phase] <= wr_data;
    end
  end

  // Table read: one registered read per (subcarrier, sample within period).
  always_ff @(posedge clk) begin
    logic [LOGN-1:0] ph;
    for (int k = 0; k < N; k++)
      for (int n = 0; n < N; n++) begin
        ph = LOGN'(k * n) + LOGN'(sym[k][3:2]) * LOGN'(N / 4);
        if (sc_type(k, N) == SC_DATA && n < sc_period(k, N))
          contrib[k][n] <= W'(mem[k][bank_q][sym[k][1:0]][ph]);
        else if (k == PILOT_K)
          contrib[k][n] <= PILOT_ROM[n*W +: W];
        else
          contrib[k][n] <= '0;
      end
  end

  // Runtime reloads go to the bank that is not being read.
  a_write_inactive: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> wr_bank != bank_q)
    else $error("idft_lut: write to the active LUT bank %0d", bank_q);

endmodule

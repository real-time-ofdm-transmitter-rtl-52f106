// ofdm_pkg: constants, types and elaboration-time functions shared by the
// OFDM transmitter.
//
// The transmitter builds each OFDM symbol with a multiplier-less inverse DFT:
// every data subcarrier k owns a look-up table of pre-computed modulated
// waveforms Re{X e^(j 2 pi phi/N)} (or Im{...} for the quadrature channel),
// and the time samples are sums of table entries. The numbers below are the
// document's configuration: N = 64 subcarriers, 16QAM, 58 data subcarriers,
// pilots on k = 7, 21, 43, 57, DC and Nyquist left empty, two symbols per
// FPGA clock, 6-bit DACs fed by 24 lanes behind a 4:1 multiplexer.
//
// Design choices that the document leaves open and that are fixed here:
//  * A 4-bit 16QAM symbol is {quadrant[1:0], base[1:0]}. The base point in
//    the first quadrant is a + jb with a = base[0] ? 3 : 1, b = base[1] ? 3 : 1;
//    the transmitted point is j^quadrant * (a + jb). Only the four base points
//    are stored (M/4 waveforms); the quadrant becomes a pointer offset of
//    quadrant * N/4 into the table.
//  * Table entries are 8-bit two's complement, round(SCALE * value) with
//    SCALE = 29, so the largest point (3+3j, |X| = 4.24) reaches +/-123.
//  * Pilot symbol: 3+3j on all four pilot subcarriers.
//  * sin/cos are computed at elaboration time with a Q30 Taylor series, so
//    no table file is needed.
package ofdm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int N_SC       = 64;   // IDFT points / subcarriers
  localparam int BITS_SYM   = 4;    // log2(M), 16QAM
  localparam int N_BASE     = 4;    // M/4 stored waveforms per subcarrier
  localparam int LUT_W      = 8;    // table entry width ("effective 8 bit")
  localparam int LUT_SCALE  = 29;   // table amplitude per constellation unit
  localparam int LUT_BANKS  = 2;    // reloadable table sets
  localparam int PAR        = 2;    // IDFT cores (symbols) per FPGA clock
  localparam int DAC_W      = 6;    // DAC resolution
  localparam int DAC_MUX    = 4;    // DAC on-board multiplexer ratio
  localparam int CLIP_SHIFT = 5;    // rescaling: divide by 2^5 before clipping
  localparam logic [3:0] PILOT_SYM = 4'b0011;  // 3 + 3j

  typedef enum logic [1:0] {SC_NULL = 2'd0, SC_DATA = 2'd1, SC_PILOT = 2'd2} sc_type_e;

  // ------------------------------------------------- subcarrier allocation
  // Pilots sit at k = 7, 21, N-21, N-7 (positions 7, 21, -21, -7); k = 0 (DC)
  // and k = N/2 (Nyquist) carry nothing; every other subcarrier carries data.
  function automatic sc_type_e sc_type(int k, int n);
    if (k == 0 || k == n / 2) return SC_NULL;
    if (k == 7 || k == 21 || k == n - 21 || k == n - 7) return SC_PILOT;
    return SC_DATA;
  endfunction

  function automatic int first_pilot(int n);
    for (int k = 0; k < n; k++)
      if (sc_type(k, n) == SC_PILOT) return k;
    return 0;
  endfunction

  function automatic int n_data(int n);
    int c = 0;
    for (int k = 0; k < n; k++)
      if (sc_type(k, n) == SC_DATA) c++;
    return c;
  endfunction

  // Ordinal of data subcarrier k among the data subcarriers (ascending k).
  function automatic int data_index(int k, int n);
    int c = 0;
    for (int i = 0; i < k; i++)
      if (sc_type(i, n) == SC_DATA) c++;
    return c;
  endfunction

  // Sample period of subcarrier k in an n-point IDFT: n / GCD(n, k); 1 for DC.
  function automatic int sc_period(int k, int n);
    int a = n;
    int b = k;
    int t;
    if (k == 0) return 1;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return n / a;
  endfunction

  // ------------------------------------------------ fixed-point sin / cos
  localparam longint PI_Q30 = 64'sd3373259426;   // round(pi * 2^30)

  // sin(2 pi i / n) in Q30, n a multiple of 4.
  function automatic longint sin_q30(int i, int n);
    longint x, x2, term, s, c;
    int q, j, quarter;
    quarter = n / 4;
    j = ((i % n) + n) % n;
    q = j / quarter;
    j = j % quarter;
    x = (2 * PI_Q30 * longint'(j)) / longint'(n);
    x2 = (x * x) >>> 30;
    s = x;
    term = x;
    for (int t = 1; t <= 7; t++) begin
      term = -(((term * x2) >>> 30) / longint'((2 * t) * (2 * t + 1)));
      s += term;
    end
    c = 64'sd1 <<< 30;
    term = c;
    for (int t = 1; t <= 7; t++) begin
      term = -(((term * x2) >>> 30) / longint'((2 * t - 1) * (2 * t)));
      c += term;
    end
    case (q)
      0:       return s;
      1:       return c;
      2:       return -s;
      default: return -c;
    endcase
  endfunction

  function automatic longint cos_q30(int i, int n);
    return sin_q30(i + n / 4, n);
  endfunction

  // Table entry: round(scale * Re{(a + jb) e^(j 2 pi phi / n)}) for part 0,
  // the same with Im{} for part 1. base selects a + jb as described above.
  function automatic int lut_value(int part, int base, int phi, int n, int scale);
    longint a, b, c, s, v;
    a = (base & 1) != 0 ? 3 : 1;
    b = (base & 2) != 0 ? 3 : 1;
    c = cos_q30(phi, n);
    s = sin_q30(phi, n);
    v = (part == 0) ? (a * c - b * s) : (a * s + b * c);
    v = longint'(scale) * v + (64'sd1 <<< 29);
    return int'(v >>> 30);
  endfunction

  // Table entry for a full 4-bit symbol {quadrant, base}: the quadrant is a
  // phase offset of quadrant * n/4 table positions.
  function automatic int sym_value(int part, logic [3:0] sym, int phi, int n, int scale);
    return lut_value(part, int'(sym[1:0]), phi + int'(sym[3:2]) * (n / 4), n, scale);
  endfunction

endpackage

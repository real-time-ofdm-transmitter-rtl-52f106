// tb_ofdm_model_pkg: reference model used by the testbenches.
//
// Everything here is computed independently of the RTL: the subcarrier plan
// is restated, the table entries use real-valued $cos/$sin, and the clipping
// uses real-valued floor division.
package tb_ofdm_model_pkg;

  localparam int    N     = 64;
  localparam int    SCALE = 29;
  localparam real   PI    = 3.14159265358979323846;

  function automatic bit is_pilot(int k);
    return k == 7 || k == 21 || k == 43 || k == 57;
  endfunction

  function automatic bit is_data(int k);
    return !(k == 0 || k == 32 || is_pilot(k));
  endfunction

  function automatic int data_ord(int k);
    int c = 0;
    for (int i = 1; i < k; i++) if (is_data(i)) c++;
    return c;
  endfunction

  function automatic int period(int k);
    int g = 1;
    if (k == 0) return 1;
    for (int d = 1; d <= N; d++)
      if (k % d == 0 && N % d == 0) g = d;
    return N / g;
  endfunction

  // round(SCALE * gain * Re/Im{(a + jb) e^(j (2 pi phi / N + rot))})
  function automatic int ref_entry(int part, int base, int phi, real gain = 1.0, real rot = 0.0);
    real a, b, th, v;
    a  = (base & 1) ? 3.0 : 1.0;
    b  = (base & 2) ? 3.0 : 1.0;
    th = 2.0 * PI * real'(phi) / real'(N) + rot;
    v  = (part == 0) ? (a * $cos(th) - b * $sin(th)) : (a * $sin(th) + b * $cos(th));
    return $rtoi($floor(real'(SCALE) * gain * v + 0.5));
  endfunction

  // Pilot tones (3+3j, base 3) summed at sample n.
  function automatic int pilot_sum(int part, int n);
    int acc = 0;
    for (int k = 0; k < N; k++)
      if (is_pilot(k)) acc += ref_entry(part, 3, (k * n) % N);
    return acc;
  endfunction

  // Unquantised part of X e^(j 2 pi k n/N) for a 4-bit symbol, times SCALE.
  function automatic real ideal_term(int part, logic [3:0] s, int k, int n);
    real a, b, re, im, th, xr, xi;
    a  = s[0] ? 3.0 : 1.0;
    b  = s[1] ? 3.0 : 1.0;
    re = a; im = b;
    for (int q = 0; q < int'(s[3:2]); q++) begin   // multiply by j
      xr = -im; xi = re; re = xr; im = xi;
    end
    th = 2.0 * PI * real'(k * n) / real'(N);
    return real'(SCALE) * ((part == 0) ? (re * $cos(th) - im * $sin(th))
                                       : (re * $sin(th) + im * $cos(th)));
  endfunction

  // Divide by 2^shift with rounding to nearest, saturate to signed w bits.
  function automatic int clip_ref(int x, int shift, int w);
    int r;
    r = $rtoi($floor(real'(x) / real'(1 << shift) + 0.5));
    if (r > (1 << (w - 1)) - 1) r = (1 << (w - 1)) - 1;
    if (r < -(1 << (w - 1)))    r = -(1 << (w - 1));
    return r;
  endfunction

  // Bit-true model of one transmitter clock: serial PRBS, subcarrier
  // allocation, table sums, clipping and lane mapping, for both parts.
  class tx_model;
    localparam int ND = 58, PARS = 2, NS = 128, NBITS = PARS * ND * 4;
    logic [15:1]       r;
    bit                bits [NBITS];
    logic [3:0]        sym [PARS][N];
    int                tbl [2][N][2][4][N];   // [part][k][bank][base][phase]
    int                samp [2][NS];
    logic [31:0]       lanes [2][24];
    int                nclip [2];
    int                quad_seen [4];

    function new();
      r = '1;
      for (int part = 0; part < 2; part++)
        for (int k = 0; k < N; k++)
          for (int bk = 0; bk < 2; bk++)
            for (int b = 0; b < 4; b++)
              for (int p = 0; p < N; p++) tbl[part][k][bk][b][p] = ref_entry(part, b, p);
    endfunction

    // next PRBS word and the symbols it selects
    function void next_word();
      for (int i = 0; i < NBITS; i++) begin
        bits[i] = r[15] ^ r[14];
        r = {r[14:1], r[15] ^ r[14]};
      end
      for (int p = 0; p < PARS; p++)
        for (int k = 0; k < N; k++) begin
          sym[p][k] = '0;
          if (is_data(k)) begin
            for (int i = 0; i < 4; i++) sym[p][k][3-i] = bits[4 * (p * ND + data_ord(k)) + i];
            quad_seen[sym[p][k][3:2]]++;
          end
        end
    endfunction

    // expected DAC samples and lane words of the current word
    function void compute(int bank);
      for (int part = 0; part < 2; part++) begin
        nclip[part] = 0;
        for (int p = 0; p < PARS; p++)
          for (int n = 0; n < N; n++) begin
            int acc = pilot_sum(part, n);
            int c;
            for (int k = 0; k < N; k++)
              if (is_data(k))
                acc += tbl[part][k][bank][sym[p][k][1:0]][(k * n + 16 * int'(sym[p][k][3:2])) % N];
            c = clip_ref(acc, 5, 6);
            if (c != $rtoi($floor(real'(acc) / 32.0 + 0.5))) nclip[part]++;
            samp[part][p * N + n] = c;
          end
        for (int l = 0; l < 24; l++)
          for (int t = 0; t < 32; t++)
            lanes[part][l][t] = 1'((samp[part][4 * t + l % 4] >> (l / 4)) & 1);
      end
    endfunction
  endclass

endpackage

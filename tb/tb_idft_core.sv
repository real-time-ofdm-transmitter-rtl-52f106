// tb_idft_core: two IDFT cores, one per signal part (real and imaginary),
// fed with a new random 16QAM symbol vector every clock. Each output sample
// is checked (a) exactly against the sum of real-valued, rounded table
// entries and (b) against the unquantised IDFT of Eq. x_n = sum X_k e^(j2pi kn/N)
// within the rounding bound of 0.5 LSB per summed entry. Output must appear
// exactly 7 clocks after the symbol (1 table read + 6 adder stages). Finally
// bank 1 of subcarrier 9 is loaded with a scaled waveform at run time and
// bank_sel is switched; the new weights must show up on the next symbol.
module tb_idft_core;
  import tb_ofdm_model_pkg::*;
  localparam int W = 14, LAT = 7, CYCLES = 40, TOT = CYCLES + 300;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][3:0] sym;
  logic bank_sel = 0;
  logic wr_en = 0;
  logic [5:0] wr_k = 0, wr_phase = 0;
  logic wr_bank = 0;
  logic [1:0] wr_base = 0;
  logic signed [7:0] wr_data = 0;
  logic signed [W-1:0] xi [N], xq [N];
  int checks = 0, failures = 0;
  int hist_e [TOT][2][N];
  real hist_i [TOT][2][N];
  int tbl [N][2][4][N];        // part 0 tables, both banks (part 1 only bank 0 used)
  int bank_m = 0;

  idft_core #(.PART(0)) dut_i (.clk, .rst_n, .sym, .bank_sel, .wr_en, .wr_k, .wr_bank,
                               .wr_base, .wr_phase, .wr_data, .x(xi));
  idft_core #(.PART(1)) dut_q (.clk, .rst_n, .sym, .bank_sel(1'b0), .wr_en(1'b0), .wr_k,
                               .wr_bank(1'b1), .wr_base, .wr_phase, .wr_data, .x(xq));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs for the current symbol vector
  task automatic model(int c);
    for (int n = 0; n < N; n++)
      for (int part = 0; part < 2; part++) begin
        int acc = pilot_sum(part, n);
        real id = 0.0;
        for (int k = 0; k < N; k++) begin
          if (is_pilot(k)) id += ideal_term(part, 4'b0011, k, n);
          if (!is_data(k)) continue;
          if (part == 0)
            acc += tbl[k][bank_m][sym[k][1:0]][(k * n + 16 * int'(sym[k][3:2])) % N];
          else
            acc += ref_entry(1, int'(sym[k][1:0]), (k * n + 16 * int'(sym[k][3:2])) % N);
          id += ideal_term(part, sym[k], k, n);
        end
        hist_e[c][part][n] = acc;
        hist_i[c][part][n] = id;
      end
  endtask

  task automatic compare(int c, bit ideal_ok);
    for (int n = 0; n < N; n++)
      for (int part = 0; part < 2; part++) begin
        int got = (part == 0) ? int'(xi[n]) : int'(xq[n]);
        real d;
        checks++;
        if (got != hist_e[c][part][n]) begin
          failures++;
          if (failures < 10) $display("sym %0d part %0d n %0d: got %0d want %0d", c, part, n, got, hist_e[c][part][n]);
        end
        if (ideal_ok) begin
          d = real'(got) - hist_i[c][part][n];
          checks++;
          if (d > 31.0 || d < -31.0) begin
            failures++;
            if (failures < 10) $display("sym %0d part %0d n %0d: %0d vs ideal %f", c, part, n, got, hist_i[c][part][n]);
          end
        end
      end
  endtask

  initial begin
    int c = 0;
    for (int k = 0; k < N; k++)
      for (int bk = 0; bk < 2; bk++)
        for (int b = 0; b < 4; b++)
          for (int p = 0; p < N; p++) tbl[k][bk][b][p] = ref_entry(0, b, p);
    sym = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // streaming: one symbol per clock, output checked LAT clocks later
    for (c = 0; c < CYCLES + LAT; c++) begin
      for (int k = 0; k < N; k++) sym[k] = 4'($urandom);
      if (c < CYCLES) model(c);
      @(posedge clk); #1;
      if (c >= LAT - 1 && c - LAT + 1 < CYCLES) compare(c - LAT + 1, 1'b1);
    end
    // reload bank 1 of subcarrier 9 (part 0 core) with gain 0.5
    for (int b = 0; b < 4; b++)
      for (int p = 0; p < N; p++) begin
        wr_en = 1; wr_k = 9; wr_bank = 1; wr_base = 2'(b); wr_phase = 6'(p);
        wr_data = 8'(ref_entry(0, b, p, 0.5));
        tbl[9][1][b][p] = int'(wr_data);
        @(posedge clk); #1;
      end
    wr_en = 0;
    bank_sel = 1;
    // this symbol is read with the old bank, the following ones with bank 1
    for (int s = 0; s < 12 + LAT; s++) begin
      if (s < 12) begin
        for (int k = 0; k < N; k++) sym[k] = 4'($urandom);
        sym[9] = 4'(s);
        model(CYCLES + s);
      end
      @(posedge clk); #1;
      bank_m = 1;
      if (s >= LAT - 1 && s - LAT + 1 < 12) compare(CYCLES + s - LAT + 1, s == LAT - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

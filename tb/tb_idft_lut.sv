// tb_idft_lut: drives random 16QAM symbols and checks every table read
// against a table built with real-valued trigonometry: data subcarriers over
// their period (zero beyond), the pilot-sum ROM at k = 7, zero elsewhere.
// Then reloads bank 1 at run time with pre-equalised waveforms while bank 0
// is read (output must not change), switches bank_sel and checks that the
// switch applies to the symbol of the very next clock.
module tb_idft_lut;
  import tb_ofdm_model_pkg::*;
  localparam int W = 14;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][3:0] sym;
  logic bank_sel = 0;
  logic wr_en = 0;
  logic [5:0] wr_k = 0, wr_phase = 0;
  logic wr_bank = 0;
  logic [1:0] wr_base = 0;
  logic signed [7:0] wr_data = 0;
  logic signed [W-1:0] contrib [N][N];
  int checks = 0, failures = 0;
  int tbl [N][2][4][N];
  int bank_m = 0;

  idft_lut dut (.clk, .rst_n, .sym, .bank_sel, .wr_en, .wr_k, .wr_bank, .wr_base,
                .wr_phase, .wr_data, .contrib);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_val(int k, int n, int bank);
    int r = int'(sym[k][3:2]);
    int b = int'(sym[k][1:0]);
    if (is_data(k)) return (n < period(k)) ? tbl[k][bank][b][(k * n + 16 * r) % N] : 0;
    if (k == 7) return pilot_sum(0, n);
    return 0;
  endfunction

  // apply the current inputs for one clock and check the registered reads
  task automatic step();
    int e [N][N];
    for (int k = 0; k < N; k++)
      for (int n = 0; n < N; n++) e[k][n] = expect_val(k, n, bank_m);
    @(posedge clk); #1;
    for (int k = 0; k < N; k++)
      for (int n = 0; n < N; n++) begin
        checks++;
        if (int'(contrib[k][n]) != e[k][n]) begin
          failures++;
          if (failures < 10) $display("k %0d n %0d: got %0d want %0d", k, n, contrib[k][n], e[k][n]);
        end
      end
    if (wr_en) tbl[wr_k][wr_bank][wr_base][wr_phase] = int'(wr_data);
    bank_m = int'(bank_sel);
  endtask

  task automatic random_sym();
    for (int k = 0; k < N; k++) sym[k] = 4'($urandom);
  endtask

  initial begin
    for (int k = 0; k < N; k++)
      for (int bk = 0; bk < 2; bk++)
        for (int b = 0; b < 4; b++)
          for (int p = 0; p < N; p++) tbl[k][bk][b][p] = ref_entry(0, b, p);
    random_sym();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // plain reads, new symbols every clock
    for (int c = 0; c < 30; c++) begin
      random_sym();
      step();
    end
    // run-time reload of bank 1: gain 0.8 and a rotation for k = 5 and 62,
    // mixed with symbol traffic from bank 0
    foreach (tbl[k]) begin
      if (k != 5 && k != 62) continue;
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < N; p++) begin
          wr_en = 1; wr_k = 6'(k); wr_bank = 1; wr_base = 2'(b); wr_phase = 6'(p);
          wr_data = 8'(ref_entry(0, b, p, 0.8, 0.3 * real'(k)));
          random_sym();
          step();
        end
    end
    wr_en = 0;
    // bank switch: symbol of this clock still from bank 0, the next from bank 1
    random_sym();
    sym[5] = 4'b1101; sym[62] = 4'b0110;
    bank_sel = 1;
    step();
    for (int c = 0; c < 10; c++) begin
      random_sym();
      step();
    end
    checks++;
    if (bank_m != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ofdm_tx_evm: receiver-side check of the transmitter at its default size.
//
// The 6-bit I and Q samples are rebuilt from the lane words the way the DAC
// multiplexers do, each 64-sample symbol is transformed back with a
// real-valued forward DFT, X'_k = (1/64) sum_n (I_n + jQ_n) e^(-j2pi kn/64),
// and divided by the nominal gain 29/32 of tables and rescaling. Each data
// subcarrier is decided to the nearest 16QAM point and compared with the
// point that was sent. Only quantisation and clipping disturb the signal
// here; with the default clip level (about 94 % of samples inside the DAC
// range) clipping dominates. The test requires a symbol error rate below 1 %,
// an error-vector magnitude below 15 % and pilots within 0.5 of 3+3j, and
// reports the measured values.
module tb_ofdm_tx_evm;
  import tb_ofdm_model_pkg::*;
  localparam int  LAT = 10, WORDS = 80;
  localparam real GAIN = 29.0 / 32.0;

  logic clk = 0, rst_n = 0;
  logic [23:0][31:0] lanes_i, lanes_q;
  logic [7:0] clip_count_i, clip_count_q;
  int checks = 0, failures = 0;
  real cw [64][64], sw [64][64];
  real err_pow = 0.0, ref_pow = 0.0, pil_err = 0.0;
  int n_err = 0, n_sym = 0, n_inside = 0, n_samples = 0;
  tx_model m;

  ofdm_tx dut (.clk, .rst_n, .bank_sel(1'b0),
               .wr_i_en(1'b0), .wr_i_k('0), .wr_i_bank(1'b1), .wr_i_base('0), .wr_i_phase('0), .wr_i_data('0),
               .wr_q_en(1'b0), .wr_q_k('0), .wr_q_bank(1'b1), .wr_q_base('0), .wr_q_phase('0), .wr_q_data('0),
               .lanes_i, .lanes_q, .clip_count_i, .clip_count_q);

  always #5 clk = ~clk;

  initial begin
    repeat (WORDS + LAT + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample(logic [23:0][31:0] l, int s);
    logic signed [5:0] v;
    for (int b = 0; b < 6; b++) v[b] = l[b * 4 + s % 4][s / 4];
    return int'(v);
  endfunction

  function automatic real decide(real v);
    if (v < -2.0) return -3.0;
    if (v < 0.0)  return -1.0;
    if (v < 2.0)  return 1.0;
    return 3.0;
  endfunction

  initial begin
    for (int k = 0; k < 64; k++)
      for (int n = 0; n < 64; n++) begin
        cw[k][n] = $cos(2.0 * PI * real'(k * n) / 64.0);
        sw[k][n] = $sin(2.0 * PI * real'(k * n) / 64.0);
      end
    m = new();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (LAT) @(posedge clk);
    #1;
    for (int w = 0; w < WORDS; w++) begin
      m.next_word();
      for (int p = 0; p < 2; p++) begin
        int xi [64], xq [64];
        for (int n = 0; n < 64; n++) begin
          xi[n] = sample(lanes_i, p * 64 + n);
          xq[n] = sample(lanes_q, p * 64 + n);
          n_samples += 2;
          if (xi[n] > -32 && xi[n] < 31) n_inside++;
          if (xq[n] > -32 && xq[n] < 31) n_inside++;
        end
        for (int k = 1; k < 64; k++) begin
          real re, im, tr, ti;
          if (!is_data(k) && !is_pilot(k)) continue;
          re = 0.0; im = 0.0;
          for (int n = 0; n < 64; n++) begin
            re += real'(xi[n]) * cw[k][n] + real'(xq[n]) * sw[k][n];
            im += real'(xq[n]) * cw[k][n] - real'(xi[n]) * sw[k][n];
          end
          re = re / 64.0 / GAIN;
          im = im / 64.0 / GAIN;
          if (is_pilot(k)) begin
            pil_err += (re - 3.0) ** 2 + (im - 3.0) ** 2;
            continue;
          end
          // transmitted point j^q (a + jb)
          tr = m.sym[p][k][0] ? 3.0 : 1.0;
          ti = m.sym[p][k][1] ? 3.0 : 1.0;
          for (int q = 0; q < int'(m.sym[p][k][3:2]); q++) begin
            real t;
            t = tr; tr = -ti; ti = t;
          end
          if (decide(re) != tr || decide(im) != ti) begin
            n_err++;
            if (n_err < 4) $display("word %0d sym %0d k %0d: got (%f, %f) sent (%f, %f)", w, p, k, re, im, tr, ti);
          end
          err_pow += (re - tr) ** 2 + (im - ti) ** 2;
          ref_pow += tr * tr + ti * ti;
          n_sym++;
        end
      end
      @(posedge clk); #1;
    end
    begin
      real evm;
      evm = 100.0 * $sqrt(err_pow / ref_pow);
      $display("data symbols decoded        %0d", n_sym);
      $display("EVM over data subcarriers   %0.2f %%", evm);
      $display("pilot rms error             %0.3f", $sqrt(pil_err / real'(WORDS * 2 * 4)));
      $display("samples inside DAC range    %0.1f %%", 100.0 * real'(n_inside) / real'(n_samples));
      $display("symbol errors               %0d", n_err);
      checks++;
      if (n_sym < WORDS * 2 * 58) failures++;
      checks++;
      if (n_err * 100 > n_sym) failures++;
      checks++;
      if (evm > 15.0) failures++;
      checks++;
      if ($sqrt(pil_err / real'(WORDS * 2 * 4)) > 0.5) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ofdm_tx: end-to-end test of the transmitter at its default size.
//
// Both FPGA channels run from reset for a few hundred clocks; every lane word
// of the in-phase and the quadrature channel and both clip counts are
// compared with the bit-true model. The run covers:
//   * lock-step data: both channels modulate the same PRBS symbols,
//   * the full PRBS period (2^15 - 1 bits = 71 clocks) and its wrap,
//   * all four 16QAM quadrants (pointer offsets) and all four base points,
//   * clipping to the DAC range,
//   * a run-time reload of bank 1 with pre-equalised waveforms (gain 0.6 and
//     a phase rotation on the six subcarriers next to DC) through both write
//     ports while bank 0 is transmitted, with no word lost or altered,
//   * the bank switch, which must change the signal from the next symbol on.
// Throughput (one 24 x 32-bit word per channel per clock) and the 10-clock
// latency from reset release are checked by the cycle-exact comparison.
// Each mechanism that never occurs counts as a failure.
module tb_ofdm_tx;
  import tb_ofdm_model_pkg::*;
  localparam int LAT = 10;
  localparam int EQ_K [6] = '{1, 2, 3, 61, 62, 63};
  localparam int NWR = 6 * 4 * 64;
  localparam int SWITCH_EDGE = 20 + NWR + 10;
  localparam int EDGES = SWITCH_EDGE + 120;

  logic clk = 0, rst_n = 0;
  logic bank_sel = 0;
  logic wr_i_en = 0, wr_q_en = 0;
  logic [5:0] wr_i_k = 0, wr_i_phase = 0, wr_q_k = 0, wr_q_phase = 0;
  logic wr_i_bank = 0, wr_q_bank = 0;
  logic [1:0] wr_i_base = 0, wr_q_base = 0;
  logic signed [7:0] wr_i_data = 0, wr_q_data = 0;
  logic [23:0][31:0] lanes_i, lanes_q;
  logic [7:0] clip_count_i, clip_count_q;
  int checks = 0, failures = 0;
  int bank_at_edge [EDGES + 1];
  int n_words = 0, n_clip = 0, n_writes = 0, n_switch = 0, n_eq_effect = 0;
  tx_model m, m0;

  ofdm_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (EDGES + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mech(string name, int count);
    checks++;
    $display("%-32s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    m  = new();
    m0 = new();     // same data, tables never reloaded
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int e = 1; e <= EDGES; e++) begin
      wr_i_en = 0; wr_q_en = 0;
      if (e >= 20 && e < 20 + NWR) begin
        int w, k, b, p;
        w = e - 20;
        k = EQ_K[w / 256];
        b = (w / 64) % 4;
        p = w % 64;
        wr_i_en = 1; wr_i_k = 6'(k); wr_i_bank = 1; wr_i_base = 2'(b); wr_i_phase = 6'(p);
        wr_q_en = 1; wr_q_k = 6'(k); wr_q_bank = 1; wr_q_base = 2'(b); wr_q_phase = 6'(p);
        wr_i_data = 8'(ref_entry(0, b, p, 0.6, 0.2));
        wr_q_data = 8'(ref_entry(1, b, p, 0.6, 0.2));
        m.tbl[0][k][1][b][p] = int'(wr_i_data);
        m.tbl[1][k][1][b][p] = int'(wr_q_data);
        n_writes++;
      end
      if (e == SWITCH_EDGE) begin
        bank_sel = 1;
        n_switch++;
      end
      bank_at_edge[e] = int'(bank_sel);
      @(posedge clk); #1;
      if (e >= LAT) begin
        int bk;
        bk = bank_at_edge[e - LAT + 1];
        m.next_word();
        m.compute(bk);
        m0.next_word();
        m0.compute(0);
        n_words++;
        for (int l = 0; l < 24; l++) begin
          checks += 2;
          if (lanes_i[l] !== m.lanes[0][l]) begin
            failures++;
            if (failures < 10) $display("word %0d I lane %0d: got %h want %h", e - LAT, l, lanes_i[l], m.lanes[0][l]);
          end
          if (lanes_q[l] !== m.lanes[1][l]) begin
            failures++;
            if (failures < 10) $display("word %0d Q lane %0d: got %h want %h", e - LAT, l, lanes_q[l], m.lanes[1][l]);
          end
        end
        checks += 2;
        if (int'(clip_count_i) != m.nclip[0] || int'(clip_count_q) != m.nclip[1]) begin
          failures++;
          if (failures < 10) $display("word %0d clip counts %0d/%0d want %0d/%0d", e - LAT,
                                      clip_count_i, clip_count_q, m.nclip[0], m.nclip[1]);
        end
        n_clip += m.nclip[0] + m.nclip[1];
        if (bk == 1 && m.lanes[0] != m0.lanes[0]) n_eq_effect++;
      end
    end
    check_mech("lane words compared", n_words);
    check_mech("PRBS period wraps", n_words * 464 / 32767);
    check_mech("quadrant offset 0", m.quad_seen[0]);
    check_mech("quadrant offset 1", m.quad_seen[1]);
    check_mech("quadrant offset 2", m.quad_seen[2]);
    check_mech("quadrant offset 3", m.quad_seen[3]);
    check_mech("clipped samples", n_clip);
    check_mech("run-time table writes", n_writes);
    check_mech("bank switches", n_switch);
    check_mech("words changed by new tables", n_eq_effect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ofdm_fpga_channel: one quadrature-part FPGA channel (PART = 1) from reset
// on. Every lane word and clip count is compared with the bit-true model
// (serial PRBS, real-valued tables, clipping, lane order); the first word must
// appear exactly 10 clocks after reset release and one word must follow every
// clock (128 samples per clock). Midway, bank 1 of two subcarriers is loaded
// with pre-equalised waveforms and bank_sel is switched.
module tb_ofdm_fpga_channel;
  import tb_ofdm_model_pkg::*;
  localparam int WORDS = 100, LAT = 10;

  logic clk = 0, rst_n = 0;
  logic bank_sel = 0;
  logic wr_en = 0;
  logic [5:0] wr_k = 0, wr_phase = 0;
  logic wr_bank = 0;
  logic [1:0] wr_base = 0;
  logic signed [7:0] wr_data = 0;
  logic [23:0][31:0] lanes;
  logic [7:0] clip_count;
  int checks = 0, failures = 0, clipped = 0;
  int bank_at_edge [WORDS + LAT + 2];
  tx_model m;

  ofdm_fpga_channel #(.PART(1)) dut (.clk, .rst_n, .bank_sel, .wr_en, .wr_k, .wr_bank,
                                     .wr_base, .wr_phase, .wr_data, .lanes, .clip_count);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int e = 1; e < WORDS + LAT; e++) begin
      // run-time reload of bank 1 of k = 3 (phases 0..15 of all four bases)
      // while bank 0 is in use, then switch banks
      wr_en = 0;
      if (e >= 12 && e < 12 + 64) begin
        wr_en = 1; wr_k = 3; wr_bank = 1;
        wr_base = 2'((e - 12) / 16); wr_phase = 6'((e - 12) % 16);
        wr_data = 8'(ref_entry(1, int'(wr_base), int'(wr_phase), 0.7, 0.5));
        m.tbl[1][3][1][wr_base][wr_phase] = int'(wr_data);
      end
      if (e == 80) bank_sel = 1;
      bank_at_edge[e] = int'(bank_sel);
      @(posedge clk); #1;
      if (e >= LAT) begin
        m.next_word();
        m.compute(bank_at_edge[e - LAT + 1]);
        for (int l = 0; l < 24; l++) begin
          checks++;
          if (lanes[l] !== m.lanes[1][l]) begin
            failures++;
            if (failures < 10) $display("word %0d lane %0d: got %h want %h", e - LAT, l, lanes[l], m.lanes[1][l]);
          end
        end
        checks++;
        if (int'(clip_count) != m.nclip[1]) begin
          failures++;
          if (failures < 10) $display("word %0d clip count %0d want %0d", e - LAT, clip_count, m.nclip[1]);
        end
        clipped += m.nclip[1];
      end
    end
    $display("clipped samples: %0d", clipped);
    checks++;
    if (clipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

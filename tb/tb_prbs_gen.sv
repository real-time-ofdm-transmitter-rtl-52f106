// tb_prbs_gen: checks the parallel PRBS against a bit-serial LFSR
// (x^15 + x^14 + 1, seed all ones), the output timing after reset, and the
// 2^15 - 1 period of the sequence.
module tb_prbs_gen;
  localparam int NBITS  = 464;
  localparam int CYCLES = 80;
  localparam int PERIOD = 32767;

  logic clk = 0, rst_n = 0;
  logic [NBITS-1:0] bits;
  int checks = 0, failures = 0;
  bit seq [NBITS*CYCLES];

  prbs_gen #(.NBITS(NBITS)) dut (.clk, .rst_n, .bits);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:1] r;
    // serial reference sequence
    r = '1;
    for (int i = 0; i < NBITS*CYCLES; i++) begin
      seq[i] = r[15] ^ r[14];
      r = {r[14:1], r[15] ^ r[14]};
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;   // first clock with reset released: first word out
    for (int c = 0; c < CYCLES; c++) begin
      for (int i = 0; i < NBITS; i++) begin
        checks++;
        if (bits[i] !== seq[c*NBITS + i]) begin
          failures++;
          if (failures < 10) $display("cycle %0d bit %0d: got %0b want %0b", c, i, bits[i], seq[c*NBITS+i]);
        end
      end
      @(posedge clk); #1;
    end
    // the reference itself repeats after 2^15 - 1 bits and not earlier
    checks++;
    for (int i = PERIOD; i < NBITS*CYCLES; i++)
      if (seq[i] != seq[i - PERIOD]) begin failures++; break; end
    checks++;
    begin
      bit same = 1;
      for (int i = 0; i < 2000; i++) if (seq[i] != seq[i + PERIOD/7]) same = 0;
      if (same) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

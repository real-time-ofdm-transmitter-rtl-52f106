// tb_dac_lane_mapper: random sample vectors; the testbench rebuilds the
// sample stream the way the DAC's 4:1 multiplexers do (lane b*4+m, slot t ->
// bit b of sample 4t+m) and compares it with the input one clock earlier.
module tb_dac_lane_mapper;
  localparam int NS = 128, DAC_W = 6, MUX = 4, LANES = 24, LW = 32;

  logic clk = 0;
  logic signed [DAC_W-1:0] samples [NS];
  logic [LANES-1:0][LW-1:0] lanes;
  int checks = 0, failures = 0;
  logic [DAC_W-1:0] prev [NS];

  dac_lane_mapper #(.NS(NS), .DAC_W(DAC_W), .MUX(MUX)) dut (.clk, .samples, .lanes);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 100; c++) begin
      for (int i = 0; i < NS; i++) begin
        samples[i] = DAC_W'($urandom);
        prev[i] = samples[i];
      end
      @(posedge clk); #1;
      for (int s = 0; s < NS; s++) begin
        logic [DAC_W-1:0] r;
        for (int b = 0; b < DAC_W; b++) r[b] = lanes[b*MUX + (s % MUX)][s / MUX];
        checks++;
        if (r !== prev[s]) begin
          failures++;
          if (failures < 10) $display("sample %0d: got %h want %h", s, r, prev[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

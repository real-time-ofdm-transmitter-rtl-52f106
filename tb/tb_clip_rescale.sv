// tb_clip_rescale: random and corner-case samples through the rescale/clip
// stage, compared with real-valued rounding and saturation; checks the
// one-clock latency and the clip flags.
module tb_clip_rescale;
  import tb_ofdm_model_pkg::*;
  localparam int NS = 128, IN_W = 14, OUT_W = 6, SHIFT = 5;

  logic clk = 0;
  logic signed [IN_W-1:0]  din  [NS];
  logic signed [OUT_W-1:0] dout [NS];
  logic [NS-1:0]           clip;
  int checks = 0, failures = 0, nclip = 0;
  int prev [NS];

  clip_rescale #(.NS(NS), .IN_W(IN_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) dut (.clk, .din, .dout, .clip);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 200; c++) begin
      for (int i = 0; i < NS; i++) begin
        int v;
        case (c % 4)
          0: v = $urandom_range(0, 16383) - 8192;         // full range
          1: v = $urandom_range(0, 2047) - 1024;          // around the clip level
          2: v = (i % 2 ? 1 : -1) * (1008 + (i % 40));    // the rounding / clip edge
          default: v = $urandom_range(0, 63) - 32;        // small values
        endcase
        if (c == 0 && i < 4) v = (i == 0) ? 8191 : (i == 1) ? -8192 : (i == 2) ? 1007 : -1008;
        din[i] = IN_W'(v);
        prev[i] = v;
      end
      @(posedge clk); #1;
      for (int i = 0; i < NS; i++) begin
        int e;
        e = clip_ref(prev[i], SHIFT, OUT_W);
        checks++;
        if (int'(dout[i]) != e) begin
          failures++;
          if (failures < 10) $display("in %0d: got %0d want %0d", prev[i], dout[i], e);
        end
        checks++;
        if (clip[i] != (real'(prev[i]) / 32.0 + 0.5 >= 32.0 || real'(prev[i]) / 32.0 + 0.5 < -32.0)) begin
          failures++;
          if (failures < 10) $display("in %0d: clip flag %0b", prev[i], clip[i]);
        end
        if (clip[i]) nclip++;
      end
    end
    checks++;
    if (nclip == 0) failures++;
    $display("clipped samples: %0d", nclip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

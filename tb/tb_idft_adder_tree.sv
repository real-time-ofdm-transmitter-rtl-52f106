// tb_idft_adder_tree: random contributions (valid over each subcarrier's
// period, random garbage beyond it, which the tree must ignore) are summed
// and compared with a direct sum x[n] = sum_k c_k(n mod period_k), exactly
// log2(N) = 6 clocks later. A new vector enters every clock.
module tb_idft_adder_tree;
  import tb_ofdm_model_pkg::*;
  localparam int W = 14, LAT = 6, CYCLES = 60;

  logic clk = 0;
  logic signed [W-1:0] contrib [N][N];
  logic signed [W-1:0] x [N];
  int checks = 0, failures = 0;
  int exph [CYCLES+LAT][N];

  idft_adder_tree #(.N(N), .W(W)) dut (.clk, .contrib, .x);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e [N];
    for (int c = 0; c < CYCLES + LAT; c++) begin
      for (int k = 0; k < N; k++)
        for (int n = 0; n < N; n++)
          contrib[k][n] = (n < period(k)) ? W'($urandom_range(0, 255) - 128) : W'($urandom);
      for (int n = 0; n < N; n++) begin
        e[n] = 0;
        for (int k = 0; k < N; k++) e[n] += int'(contrib[k][n % period(k)]);
      end
      exph[c] = e;
      @(posedge clk); #1;
      if (c >= LAT - 1) begin
        e = exph[c - LAT + 1];
        for (int n = 0; n < N; n++) begin
          checks++;
          if (int'(x[n]) != e[n]) begin
            failures++;
            if (failures < 10) $display("cycle %0d n %0d: got %0d want %0d", c, n, x[n], e[n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

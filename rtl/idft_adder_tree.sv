// idft_adder_tree: sums the subcarrier contributions into the N time samples
// x[n] = sum_k c_k(n) with a pipelined binary adder tree of log2(N) stages,
// computing every partial sum only over the samples where it differs.
//
// Subcarrier k's contribution repeats with period N/GCD(N,k). The tree's
// leaves are therefore ordered by GCD group: group m holds the N/2^(m+1)
// subcarriers k = 2^m * odd, all with period P_m = N/2^m; the last group is
// k = 0 (period 1). Inside group m a plain binary tree forms S_m(n) for
// n < P_m only. The groups are then chained from the shortest period up:
//   U_Q(n) = c_0,   U_m(n) = S_m(n) + U_{m+1}(n mod P_m/2),   x(n) = U_0(n),
// which lines up exactly with the tree's log2(N) levels (S_m is ready after
// log2(N)-1-m stages, U_m after log2(N)-m). Only
//   P = 1 + sum_{k=1}^{N-1} N/GCD(N,k)
// leaves are read, about 2/3 of N^2 for large N (2731 of 4096 for N = 64),
// and the adders shrink in the same proportion.
//
// Interface: contrib[k][n] must hold subcarrier k's value for n < N/GCD(N,k);
// entries beyond the period are not read. x is registered; the sums for the
// contrib of clock t appear at clock t + log2(N). One symbol per clock.
// W must be wide enough for the sum of N leaves (no overflow handling).
module idft_adder_tree #(
  parameter int N = 64,
  parameter int W = 14
) (
  input  logic                clk,
  input  logic signed [W-1:0] contrib [N][N],
  output logic signed [W-1:0] x [N]
);

  localparam int Q = $clog2(N);

  // ucum[m][n] = U_m(n mod P_m), the periodic extension of each cumulative sum.
  logic signed [W-1:0] ucum [Q+1][N];

  for (genvar n = 0; n < N; n++) begin : g_dc
    assign ucum[Q][n] = contrib[0][0];
  end

  for (genvar m = 0; m < Q; m++) begin : g_grp
    localparam int L = N >> (m + 1);   // subcarriers in this group
    localparam int P = N >> m;         // their common sample period
    localparam int D = $clog2(L);      // tree levels inside the group

    logic signed [W-1:0] s [P];        // S_m(n)
    logic signed [W-1:0] u [P];        // U_m(n)

    if (D == 0) begin : g_single
      for (genvar n = 0; n < P; n++) begin : g_s
        assign s[n] = contrib[1 << m][n];
      end
    end else begin : g_tree
      // Level d holds L >> d nodes; node j of level 1 adds leaves 2j, 2j+1,
      // i.e. subcarriers (4j+1)*2^m and (4j+3)*2^m.
      logic signed [W-1:0] t [1:D][L/2][P];
      always_ff @(posedge clk)
        for (int d = 1; d <= D; d++)
          for (int j = 0; j < (L >> d); j++)
            for (int n = 0; n < P; n++)
              if (d == 1)
                t[d][j][n] <= contrib[(4*j+1) << m][n] + contrib[(4*j+3) << m][n];
              else
                t[d][j][n] <= t[d-1][2*j][n] + t[d-1][2*j+1][n];
      for (genvar n = 0; n < P; n++) begin : g_s
        assign s[n] = t[D][0][n];
      end
    end

    always_ff @(posedge clk)
      for (int n = 0; n < P; n++)
        u[n] <= s[n] + ucum[m+1][n];

    for (genvar n = 0; n < N; n++) begin : g_ext
      assign ucum[m][n] = u[n % P];
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_out
    assign x[n] = ucum[0][n];
  end

endmodule

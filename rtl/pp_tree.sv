// pp_tree -- accumulates the partial product rows into the final product.
//
// Row j (N+1 bits, two's complement) is sign extended to the 2N-bit product
// width and shifted left by 2j.  The negation correction bits negc[j] sit at
// bit 2j, positions no two rows share, so together they form one extra row.
// The K+1 rows are reduced level by level with 3:2 carry-save adders (a
// Wallace-style tree: each level turns every group of three rows into a sum
// and a carry row and passes the rest on) until two rows remain, which a
// carry-propagate adder sums.  All arithmetic is modulo 2^(2N); the true
// product of two N-bit two's complement numbers always fits.
//
// Interface: pp[j], negc[j] as produced by nr4sd_ppg; p (2N bits, signed) out.
// Combinational.  The method names only a partial product accumulation; the
// tree shape, full sign extension and final adder are this design's choice.
module pp_tree #(
  parameter int  N = 16,
  localparam int K = N / 2,
  localparam int W = 2 * N
) (
  input  logic [K-1:0][N:0] pp,
  input  logic [K-1:0]      negc,
  output logic signed [W-1:0] p
);

  localparam int ROWS = K + 1;

  // Rows left after a given number of 3:2 levels.
  function automatic int rows_after(int levels);
    int m = ROWS;
    for (int l = 0; l < levels; l++) m = m - m / 3;
    return m;
  endfunction

  function automatic int num_levels();
    int m = ROWS;
    int l = 0;
    while (m > 2) begin
      m = m - m / 3;
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  // Level 0: the K shifted, sign-extended rows and the correction row.
  logic [W-1:0] corr;
  always_comb begin
    corr = '0;
    for (int j = 0; j < K; j++) corr[2*j] = negc[j];
  end

  // g_st[l].r holds the rows after l carry-save levels; only the first
  // rows_after(l) of them carry data, the rest are tied to zero.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_st
    logic [W-1:0] r [ROWS];
    if (l == 0) begin : g_in
      for (genvar j = 0; j < K; j++) begin : g_row
        assign r[j] = W'({{(W-N-1){pp[j][N]}}, pp[j]}) << (2 * j);
      end
      assign r[K] = corr;
    end else begin : g_csa_level
      localparam int M  = rows_after(l - 1);
      localparam int G  = M / 3;
      localparam int MN = rows_after(l);
      for (genvar g = 0; g < G; g++) begin : g_csa
        logic [W-1:0] x, y, z;
        assign x = g_st[l-1].r[3*g];
        assign y = g_st[l-1].r[3*g+1];
        assign z = g_st[l-1].r[3*g+2];
        assign r[2*g]   = x ^ y ^ z;
        assign r[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (genvar i = 3 * G; i < M; i++) begin : g_pass
        assign r[i-G] = g_st[l-1].r[i];
      end
      for (genvar i = MN; i < ROWS; i++) begin : g_unused
        assign r[i] = '0;
      end
    end
  end

  assign p = $signed(g_st[LEVELS].r[0] + g_st[LEVELS].r[1]);

endmodule

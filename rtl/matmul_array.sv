// matmul_array: systolic multiplier of two N x N matrices, C = A * B.
//
// A (2N-1) x N grid of multiply-accumulate cells (grid_core).  Row k of A
// enters at the bottom as the k-th a tuple and column l of B at the top as
// the l-th b tuple, one tuple every two clocks (a dummy between tuples),
// column j delayed by j clocks.  The inner product c(k,l) is accumulated
// along row k - l + N - 1 and leaves it at the right end, so the
// coefficients come out on the 2N-1 row outputs in skewed order: the main
// diagonal on the middle row, c(1,N) on the top row, c(N,1) on the bottom.
//
// This module adds the feeding and collecting around the grid: on start it
// streams A and B into the grid in the skewed format, and it writes every
// coefficient that leaves a row into its place in C.  Counting from 0, the
// first components enter on clock 0, c(k,l) leaves row k-l+N-1 on clock
// k + l + 2N and done pulses on clock 4N - 1, so a product takes O(N)
// clocks.  A and B must stay stable while busy.  Operands are signed DW-bit
// integers, results SW bits; both widths are this design's choice.
module matmul_array #(
  parameter int unsigned N  = 4,
  parameter int unsigned DW = 16,
  parameter int unsigned SW = 2*DW + $clog2(N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] mat_a [N][N],
  input  logic [DW-1:0] mat_b [N][N],
  output logic          busy,
  output logic          done,
  output logic [SW-1:0] mat_c [N][N]
);
  localparam int unsigned R  = 2*N - 1;
  localparam int unsigned CW = $clog2(4*N + 2) + 1;

  logic [CW-1:0] cnt;
  logic [DW-1:0] a_in [N];
  logic          a_v  [N];
  logic [DW-1:0] b_in [N];
  logic          b_v  [N];
  logic [SW-1:0] c_row [R];
  logic          c_rv  [R];

  // Skewed feeding: on clock cnt, column j carries tuple (cnt - j) / 2 when
  // that difference is even and in range, otherwise a dummy.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      int d;
      d       = int'(cnt) - j;
      a_v[j]  = busy && d >= 0 && d[0] == 1'b0 && (d >> 1) < N;
      b_v[j]  = a_v[j];
      a_in[j] = a_v[j] ? mat_a[(d >> 1) % N][j] : '0;
      b_in[j] = b_v[j] ? mat_b[j][(d >> 1) % N] : '0;
    end
  end

  grid_core #(.K(N), .N(N), .DW(DW), .SW(SW), .OP(1'b1)) u_grid (
    .clk, .rst_n, .a_in, .a_valid(a_v), .b_in, .b_valid(b_v), .s_out(c_row), .s_valid(c_rv));

  // Row r delivers c(k,l) with k - l = r - N + 1 and k + l = cnt - 2N.
  int ck [R];
  int cl [R];
  always_comb begin
    for (int r = 0; r < R; r++) begin
      ck[r] = (int'(cnt) - 2*int'(N) + r - int'(N) + 1) / 2;
      cl[r] = (int'(cnt) - 2*int'(N) - r + int'(N) - 1) / 2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) mat_c[i][j] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt <= cnt + CW'(1);
        if (cnt == CW'(4*N - 2)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        for (int r = 0; r < R; r++)
          if (c_rv[r] && ck[r] >= 0 && ck[r] < N && cl[r] >= 0 && cl[r] < N)
            mat_c[ck[r] % N][cl[r] % N] <= c_row[r];
      end
    end
  end
endmodule

// intersection_array: systolic array that intersects two sets of tuples.
//
// Two sets of K tuples of length N are compared all against all.  A
// (2K-1) x N grid of comparison cells (grid_core, AND of component
// equalities) lets the a tuples move up and the b tuples move down, one
// tuple every two clocks with a dummy tuple between consecutive ones, so
// that every a tuple meets every b tuple in some row.  An extra column of
// cells on the right passes a signal t down, one row per clock, and ORs
// into it the result s leaving each row; t travels with the last component
// of a b tuple and, on leaving the bottom cell, says whether that b tuple
// equalled any a tuple.  The top of the t column is fed "false".
//
// This module also feeds the grid in the skewed format from the two sets
// held at its inputs and collects the flags: after start, match[l] is set
// if tuple l of set_b is also in set_a.  Counting from 0, tuple l's flag
// leaves the t column on clock 2l + 2K + N and done pulses on clock
// 4K + N - 2: O(K + N) clocks.  The inputs must stay stable while busy.
module intersection_array #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 4,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] set_a [K][N],
  input  logic [DW-1:0] set_b [K][N],
  output logic          busy,
  output logic          done,
  output logic          match [K]
);
  localparam int unsigned R  = 2*K - 1;
  localparam int unsigned CW = $clog2(4*K + N + 2) + 1;

  logic [CW-1:0] cnt;
  logic [DW-1:0] a_in [N];
  logic          a_v  [N];
  logic [DW-1:0] b_in [N];
  logic          b_v  [N];
  logic [0:0]    s_row [R];
  logic          s_rv  [R];
  logic          t     [R];
  logic          t_v   [R];

  always_comb begin
    for (int j = 0; j < N; j++) begin
      int d;
      d       = int'(cnt) - j;
      a_v[j]  = busy && d >= 0 && d[0] == 1'b0 && (d >> 1) < K;
      b_v[j]  = a_v[j];
      a_in[j] = a_v[j] ? set_a[(d >> 1) % K][j] : '0;
      b_in[j] = b_v[j] ? set_b[(d >> 1) % K][j] : '0;
    end
  end

  grid_core #(.K(K), .N(N), .DW(DW), .SW(1), .OP(1'b0)) u_grid (
    .clk, .rst_n, .a_in, .a_valid(a_v), .b_in, .b_valid(b_v), .s_out(s_row), .s_valid(s_rv));

  // Tuple l's flag leaves the t column on clock 2l + 2K + N.
  int out_l;
  assign out_l = (int'(cnt) - 2*int'(K) - int'(N)) / 2;

  // The t column: t(r) := t(r-1) OR s(r); t_v marks a t that met a real pair.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < R; r++) begin
        t[r]   <= 1'b0;
        t_v[r] <= 1'b0;
      end
    end else begin
      for (int r = 0; r < R; r++) begin
        t[r]   <= (r == 0 ? 1'b0 : t[r == 0 ? 0 : r-1])   || (s_row[r][0] && s_rv[r]);
        t_v[r] <= (r == 0 ? 1'b0 : t_v[r == 0 ? 0 : r-1]) || s_rv[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int l = 0; l < K; l++) match[l] <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt <= cnt + CW'(1);
        if (cnt == CW'(4*K + N - 2)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        if (t_v[R-1] && out_l >= 0 && out_l < K) match[out_l % K] <= t[R-1];
      end
    end
  end
endmodule

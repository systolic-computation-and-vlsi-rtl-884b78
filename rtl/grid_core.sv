// grid_core: the (2K-1) x N mesh of grid_cell processors shared by the
// tuple-intersection array and the matrix multiplier.
//
// Column j takes the j-th components of the a tuples at the bottom (they
// move up) and of the b tuples at the top (they move down); row r starts a
// result s at its left end (the "pulser": true, or zero for inner
// products) and delivers it at its right end.  With the a and b tuples fed
// two clocks apart (a dummy between consecutive tuples) and column j
// skewed by j clocks, tuple a(k) meets tuple b(l) in row k - l + K - 1, so
// every a tuple meets every b tuple once.  Results leave row r at
// s_out[r] with s_valid[r].
module grid_core #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 4,
  parameter int unsigned DW = 16,
  parameter int unsigned SW = 40,
  parameter bit          OP = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] a_in    [N],
  input  logic          a_valid [N],
  input  logic [DW-1:0] b_in    [N],
  input  logic          b_valid [N],
  output logic [SW-1:0] s_out   [2*K-1],
  output logic          s_valid [2*K-1]
);
  localparam int unsigned R = 2*K - 1;

  logic [DW-1:0] av [R][N];
  logic          avv[R][N];
  logic [DW-1:0] bv [R][N];
  logic          bvv[R][N];
  logic [SW-1:0] sv [R][N];
  logic          svv[R][N];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic [DW-1:0] ai, bi;
      logic          avi, bvi, svi;
      logic [SW-1:0] si;
      if (r == R-1) begin : g_abot
        assign ai = a_in[j];  assign avi = a_valid[j];
      end else begin : g_amid
        assign ai = av[r+1][j]; assign avi = avv[r+1][j];
      end
      if (r == 0) begin : g_btop
        assign bi = b_in[j];  assign bvi = b_valid[j];
      end else begin : g_bmid
        assign bi = bv[r-1][j]; assign bvi = bvv[r-1][j];
      end
      if (j == 0) begin : g_pulser
        assign si = OP ? '0 : SW'(1);
        assign svi = 1'b1;
      end else begin : g_smid
        assign si = sv[r][j-1]; assign svi = svv[r][j-1];
      end
      grid_cell #(.DW(DW), .SW(SW), .OP(OP)) u_cell (
        .clk, .rst_n,
        .a_in(ai), .a_vin(avi), .b_in(bi), .b_vin(bvi), .s_in(si), .s_vin(svi),
        .a_out(av[r][j]), .a_vout(avv[r][j]), .b_out(bv[r][j]), .b_vout(bvv[r][j]),
        .s_out(sv[r][j]), .s_vout(svv[r][j]));
    end
    assign s_out[r]   = sv[r][N-1];
    assign s_valid[r] = svv[r][N-1];
  end
endmodule

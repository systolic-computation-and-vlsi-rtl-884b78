// matrix_inverter: N x N systolic matrix inverter (Gauss-Jordan, no pivoting).
//
// A mesh of gj_cell processors holds the matrix, one element per cell.
// The array works on (A | I).  With CURTAILED=1 (the default) the mesh is
// N x N: the right N x N block is not stored because at the start of every
// elimination cycle it is the identity again, so the right-hand column of
// cells supplies its elements itself.  With CURTAILED=0 the mesh is the
// full N x 2N array, the right block is loaded with the identity and
// returns to it after every cycle; it gives the same result with twice the
// cells and N more clocks.  One cycle (send the first column right, then the first row down)
// eliminates one pivot and rotates the matrix one column left and one row
// up; after N cycles the array holds inv(A) in place, rows and columns back
// in their original order.
//
// The cycles are pipelined: a start token enters the top-left cell and
// travels right along the rows and down the left column, so cell (i,j)
// begins at clock i+j, and every cell then repeats its four states
// l, r, u, d.  Waves of successive cycles therefore follow one another
// four clocks apart along the anti-diagonals, and the whole inversion takes
// 4N + 2N - 1 clocks from start to done (N x 2N array: 4N + 3N - 1), O(N)
// as the document claims.
// A stop token injected 4N clocks after the start follows the last wave and
// switches every cell off.
//
// Interface: while idle, load writes mat_in into the array.  A one-clock
// start pulse launches the inversion; busy is high until done pulses
// for one clock, after which mat_out (the left N x N block) holds the
// inverse.  Numbers are signed
// fixed point with FRAC fraction bits (this design's choice).
module matrix_inverter #(
  parameter int unsigned N     = 5,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned FRAC  = 16,
  parameter bit          CURTAILED = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [WIDTH-1:0] mat_in  [N][N],
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic signed [WIDTH-1:0] mat_out [N][N]
);
  localparam int unsigned CW = $clog2(4*N + 1) + 1;
  localparam int unsigned C  = CURTAILED ? N : 2*N;   // columns of cells
  localparam logic signed [WIDTH-1:0] ONE = WIDTH'(1) << FRAC;

  logic signed [WIDTH-1:0] a [N][C];
  logic signed [WIDTH-1:0] b [N][C];
  logic                    start_o [N][C];
  logic                    stop_o  [N][C];
  logic                    act     [N][C];

  logic [CW-1:0] cnt;
  logic          running;
  logic          stop_corner;

  // Sequencer: the corner cell enters state l at clocks 0, 4, .., 4(N-1)
  // after start; the stop token reaches it at clock 4N.
  assign stop_corner = running && (cnt == CW'(4*N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      running <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        running <= 1'b1;
        busy    <= 1'b1;
        cnt     <= CW'(1);
      end else if (running) begin
        if (stop_corner) running <= 1'b0;
        cnt <= cnt + CW'(1);
      end
      // The stop token leaves the bottom-right cell: the last wave is over.
      if (busy && stop_o[N-1][C-1]) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < C; j++) begin : g_col
      logic                    s_in, p_in;
      logic signed [WIDTH-1:0] lb, ra, ua, da, db, lv;
      if (i == 0 && j == 0) begin : g_corner
        assign s_in = start && !busy;
        assign p_in = stop_corner;
      end else if (j == 0) begin : g_leftcol
        assign s_in = start_o[i-1][0];
        assign p_in = stop_o[i-1][0];
      end else begin : g_inner
        assign s_in = start_o[i][j-1];
        assign p_in = stop_o[i][j-1];
      end
      assign lb = (j > 0)   ? b[i][(j > 0) ? j-1 : 0]   : '0;
      assign ra = (j < C-1) ? a[i][(j < C-1) ? j+1 : j] : '0;
      assign ua = (i > 0)   ? a[(i > 0) ? i-1 : 0][j]   : '0;
      assign da = (i < N-1) ? a[(i < N-1) ? i+1 : i][j] : '0;
      assign db = (i < N-1) ? b[(i < N-1) ? i+1 : i][j] : '0;

      gj_cell #(
        .WIDTH(WIDTH), .FRAC(FRAC),
        .TOP(i == 0), .BOTTOM(i == N-1), .LEFT(j == 0), .RIGHT(j == C-1),
        .CURTAILED(CURTAILED)
      ) u_cell (
        .clk, .rst_n,
        .load     (load && !busy),
        .load_val (lv),
        .start_in (s_in),
        .stop_in  (p_in),
        .start_out(start_o[i][j]),
        .stop_out (stop_o[i][j]),
        .left_b   (lb),
        .right_a  (ra),
        .up_a     (ua),
        .down_a   (da),
        .down_b   (db),
        .a        (a[i][j]),
        .b        (b[i][j]),
        .active   (act[i][j])
      );
      // Left block: the matrix; right block (N x 2N array only): identity.
      if (j < N) begin : g_left
        assign lv = mat_in[i][(j < N) ? j : 0];
        assign mat_out[i][(j < N) ? j : 0] = a[i][j];
      end else begin : g_right
        assign lv = (j - N == i) ? ONE : '0;
      end
    end
  end

  // No cell may run while the array is idle (this would corrupt a load).
  a_idle: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !act[0][0] && !act[N-1][C-1])
    else $error("cell active while idle");
endmodule

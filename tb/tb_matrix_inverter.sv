// Self-checking testbench for matrix_inverter at its default size.
// Test 1 inverts the 3 x 3 worked example (2 0 2 / 1 -1 1 / 0 1 1/2),
// embedded in the identity, whose inverse (3/2 -2 -2 / 1/2 -1 0 / -1 2 2)
// is exact in fixed point.  Further tests invert random diagonally dominant
// matrices (no pivoting needed) and compare against a Gauss-Jordan
// elimination in real arithmetic with a small tolerance.  The start-to-done
// latency is checked against 6N-1 clocks.  A second instance built as the
// full N x 2N array gets the same matrices; its latency must be 7N-1.
module tb_matrix_inverter;
  localparam int N = 5, W = 32, F = 16;
  localparam real TOL = 0.002;

  logic clk = 0, rst_n = 0, load = 0, start = 0;
  logic signed [W-1:0] mat_in [N][N];
  logic signed [W-1:0] mat_out[N][N];
  logic busy, done;
  logic signed [W-1:0] mat_out_w[N][N];
  logic busy_w, done_w;
  int checks = 0, failures = 0;

  matrix_inverter #(.N(N), .WIDTH(W), .FRAC(F)) dut (.*);
  matrix_inverter #(.N(N), .WIDTH(W), .FRAC(F), .CURTAILED(1'b0)) dut_w (
    .clk, .rst_n, .load, .mat_in, .start, .busy(busy_w), .done(done_w), .mat_out(mat_out_w));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] to_fx(real r);
    return W'($rtoi(r * (1 << F) + (r >= 0 ? 0.5 : -0.5)));
  endfunction
  function automatic real to_r(logic signed [W-1:0] x);
    return real'(x) / real'(1 << F);
  endfunction

  real m[N][N], inv[N][N];

  // Reference: Gauss-Jordan on (M | I) in real arithmetic.
  task automatic ref_inverse();
    real t[N][2*N];
    real p, f;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < 2*N; j++)
        t[i][j] = (j < N) ? m[i][j] : ((j - N == i) ? 1.0 : 0.0);
    for (int i = 0; i < N; i++) begin
      p = t[i][i];
      for (int j = 0; j < 2*N; j++) t[i][j] = t[i][j] / p;
      for (int r = 0; r < N; r++)
        if (r != i) begin
          f = t[r][i];
          for (int j = 0; j < 2*N; j++) t[r][j] = t[r][j] - f * t[i][j];
        end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) inv[i][j] = t[i][j+N];
  endtask

  task automatic run(input bit exact);
    int lat, lat_w, t;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) mat_in[i][j] = to_fx(m[i][j]);
    ref_inverse();
    @(negedge clk) load = 1;
    @(negedge clk) load = 0; start = 1;
    @(negedge clk) start = 0;
    // edges after the one that samples start
    lat = -1; lat_w = -1;
    for (t = 1; t < 20*N && (lat < 0 || lat_w < 0); t++) begin
      @(negedge clk);
      if (done)   lat   = t;
      if (done_w) lat_w = t;
    end
    checks += 2;
    if (lat != 6*N - 1) begin
      failures++;
      $display("latency %0d, expected %0d", lat, 6*N - 1);
    end
    if (lat_w != 7*N - 1) begin
      failures++;
      $display("N x 2N latency %0d, expected %0d", lat_w, 7*N - 1);
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real d;
        checks++;
        d = to_r(mat_out[i][j]) - inv[i][j];
        if (exact ? (mat_out[i][j] != to_fx(inv[i][j])) : (d > TOL || d < -TOL)) begin
          failures++;
          $display("inv[%0d][%0d] = %f, expected %f", i, j, to_r(mat_out[i][j]), inv[i][j]);
        end
        checks++;
        d = to_r(mat_out_w[i][j]) - inv[i][j];
        if (exact ? (mat_out_w[i][j] != to_fx(inv[i][j])) : (d > TOL || d < -TOL)) begin
          failures++;
          $display("N x 2N inv[%0d][%0d] = %f, expected %f", i, j, to_r(mat_out_w[i][j]), inv[i][j]);
        end
      end
  endtask

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) mat_in[i][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Worked example.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) m[i][j] = (i == j) ? 1.0 : 0.0;
    m[0][0] = 2; m[0][1] = 0;  m[0][2] = 2;
    m[1][0] = 1; m[1][1] = -1; m[1][2] = 1;
    m[2][0] = 0; m[2][1] = 1;  m[2][2] = 0.5;
    run(1'b1);
    // Random diagonally dominant matrices.
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < N; i++) begin
        real rs;
        rs = 0;
        for (int j = 0; j < N; j++) begin
          m[i][j] = (real'($urandom_range(0, 400)) - 200.0) / 100.0;
          if (j != i) rs += (m[i][j] < 0 ? -m[i][j] : m[i][j]);
        end
        m[i][i] = rs + 1.0 + real'($urandom_range(0, 300)) / 100.0;
        if ($urandom_range(0, 1) == 1) m[i][i] = -m[i][i];
      end
      run(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

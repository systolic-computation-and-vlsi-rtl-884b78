// Self-checking testbench for matmul_array at its default size.  Random
// signed matrices A and B are multiplied; every coefficient of C is compared
// with a product computed here, and the start-to-done time is checked
// against 4N - 1 clocks.
module tb_matmul_array;
  localparam int N = 4, DW = 16;
  localparam int SW = 2*DW + $clog2(N) + 1;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0] mat_a [N][N], mat_b [N][N];
  logic [SW-1:0] mat_c [N][N];
  int checks = 0, failures = 0;

  matmul_array #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int lat;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          mat_a[i][j] = DW'($urandom_range(0, 2000) - 1000);
          mat_b[i][j] = DW'($urandom_range(0, 2000) - 1000);
        end
      if (t == 0)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) mat_b[i][j] = DW'(i == j);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 4*N - 1) begin failures++; $display("latency %0d", lat); end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          longint e;
          e = 0;
          for (int k = 0; k < N; k++)
            e += longint'(signed'(mat_a[i][k])) * longint'(signed'(mat_b[k][j]));
          checks++;
          if (mat_c[i][j] != SW'(e)) begin
            failures++;
            $display("c[%0d][%0d] = %0d expected %0d", i, j, signed'(mat_c[i][j]), e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

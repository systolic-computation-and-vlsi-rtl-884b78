// Self-checking testbench for inner_product_array at its default size.  A
// new pair of random signed vectors is started on every clock in the
// skewed format; each inner product must leave the array N clocks after
// the pair's first components entered and equal a sum computed here.
module tb_inner_product_array;
  localparam int N = 8, DW = 16, M = 100;
  localparam int SW = 2*DW + $clog2(N) + 1;
  logic clk = 0, rst_n = 0, dot_valid;
  logic [DW-1:0] a_in [N], b_in [N];
  logic in_valid [N];
  logic [SW-1:0] dot;
  logic [DW-1:0] va [M][N], vb [M][N];
  int checks = 0, failures = 0;

  inner_product_array #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < M; m++)
      for (int i = 0; i < N; i++) begin
        va[m][i] = DW'($urandom);
        vb[m][i] = DW'($urandom);
      end
    for (int i = 0; i < N; i++) begin a_in[i] = '0; b_in[i] = '0; in_valid[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < M + N + 2; c++) begin
      for (int i = 0; i < N; i++) begin
        int m;
        m = c - i;
        in_valid[i] = (m >= 0 && m < M);
        a_in[i] = in_valid[i] ? va[m][i] : '0;
        b_in[i] = in_valid[i] ? vb[m][i] : '0;
      end
      @(negedge clk);
      begin
        int m;
        longint e;
        m = c - (N - 1);
        checks++;
        if (dot_valid != (m >= 0 && m < M)) begin failures++; $display("dot_valid wrong at %0d", c); end
        if (m >= 0 && m < M) begin
          e = 0;
          for (int i = 0; i < N; i++) e += longint'(signed'(va[m][i])) * longint'(signed'(vb[m][i]));
          checks++;
          if (dot != SW'(e)) begin failures++; $display("pair %0d: %0d expected %0d", m, signed'(dot), e); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

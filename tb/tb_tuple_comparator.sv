// Self-checking testbench for tuple_comparator at its default size.  A
// fixed tuple is loaded and a new tuple b is started on every clock in the
// skewed format (component i delayed by i clocks).  Each answer must leave
// the array N clocks after the tuple's first component entered (one new
// answer per clock) and equal a direct comparison.  Tuples are copies of
// the fixed one with a random component disturbed, so both outcomes occur.
module tb_tuple_comparator;
  localparam int N = 8, DW = 8, M = 200;
  logic clk = 0, rst_n = 0, load = 0, match, match_valid;
  logic [DW-1:0] load_tuple [N], b_in [N];
  logic b_valid [N];
  logic [DW-1:0] tup [M][N];
  int checks = 0, failures = 0, n_eq = 0;

  tuple_comparator #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      load_tuple[i] = DW'($urandom);
      b_in[i] = '0;
      b_valid[i] = 0;
    end
    for (int m = 0; m < M; m++) begin
      for (int i = 0; i < N; i++) tup[m][i] = load_tuple[i];
      if ($urandom_range(0, 1) == 1) begin
        int p;
        p = $urandom_range(0, N-1);
        tup[m][p] = tup[m][p] ^ DW'($urandom_range(1, 3));
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int c = 0; c < M + N + 2; c++) begin
      for (int i = 0; i < N; i++) begin
        int m;
        m = c - i;
        b_valid[i] = (m >= 0 && m < M);
        b_in[i] = b_valid[i] ? tup[m][i] : '0;
      end
      @(negedge clk);
      // Tuple c-(N-1) has just been completed.
      begin
        int m;
        bit e;
        m = c - (N - 1);
        checks++;
        if (match_valid != (m >= 0 && m < M)) begin
          failures++;
          $display("match_valid wrong at clock %0d", c);
        end
        if (m >= 0 && m < M) begin
          e = (tup[m] == load_tuple);
          checks++;
          if (match != e) begin failures++; $display("tuple %0d: match=%0b expected %0b", m, match, e); end
          if (e) n_eq++;
        end
      end
    end
    checks++;
    if (n_eq == 0 || n_eq == M) begin failures++; $display("only one outcome"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

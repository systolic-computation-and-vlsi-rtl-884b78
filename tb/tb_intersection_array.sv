// Self-checking testbench for intersection_array at its default size.
// Random tuple sets over a small alphabet (so that some b tuples occur in
// set a and some do not) are intersected; each flag is compared with a
// direct membership test, and the start-to-done time with 4K + N - 1
// clocks.  Both outcomes (in and not in the intersection) must occur.
module tb_intersection_array;
  localparam int K = 4, N = 4, DW = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0] set_a [K][N], set_b [K][N];
  logic match [K];
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  intersection_array #(.K(K), .N(N), .DW(DW)) dut (.*);

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
    for (int t = 0; t < 30; t++) begin
      int lat;
      for (int k = 0; k < K; k++)
        for (int j = 0; j < N; j++) begin
          set_a[k][j] = DW'($urandom_range(0, 1));
          set_b[k][j] = DW'($urandom_range(0, 1));
        end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 4*K + N - 1) begin failures++; $display("latency %0d", lat); end
      for (int l = 0; l < K; l++) begin
        bit e;
        e = 0;
        for (int k = 0; k < K; k++) if (set_a[k] == set_b[l]) e = 1;
        checks++;
        if (match[l] != e) begin failures++; $display("match[%0d] = %0b expected %0b", l, match[l], e); end
        if (e) n_in++; else n_out++;
      end
    end
    checks++;
    if (n_in == 0 || n_out == 0) begin failures++; $display("only one outcome seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

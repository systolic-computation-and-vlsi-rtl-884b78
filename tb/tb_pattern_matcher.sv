// Self-checking testbench for pattern_matcher at its default size.  A
// pattern is loaded and a long random text over a two-letter alphabet (so
// that matches occur) is streamed in at the highest rate the array takes.
// Every answer must come exactly one clock after its character entered and
// must equal a direct comparison of the last N characters with the pattern.
// Gaps in the text stream are inserted part of the time.
module tb_pattern_matcher;
  localparam int N = 6, CW = 8;
  logic clk = 0, rst_n = 0, load = 0, text_valid = 0, text_ready, match, match_valid;
  logic [CW-1:0] load_pattern [N];
  logic [CW-1:0] text_in = '0;
  int checks = 0, failures = 0, n_match = 0, n_answers = 0;
  logic [CW-1:0] hist[$];
  bit expect_answer = 0;

  pattern_matcher #(.N(N), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_match();
    if (hist.size() < N) return 0;
    for (int i = 0; i < N; i++)
      if (hist[hist.size() - N + i] != load_pattern[i]) return 0;
    return 1;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) load_pattern[i] = CW'("a") + CW'(i % 3 == 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int c = 0; c < 3000; c++) begin
      bit offered;
      offered = 0;
      text_valid = 0;
      if (text_ready && $urandom_range(0, 9) != 0) begin
        text_valid = 1;
        offered = 1;
        text_in = CW'("a") + CW'($urandom_range(0, 3) == 0);
      end
      @(negedge clk);
      // The character taken on the previous clock must be answered now.
      checks++;
      if (match_valid != (expect_answer && hist.size() >= N)) begin
        failures++;
        $display("match_valid=%0b expected %0b at %0t", match_valid, expect_answer, $time);
      end
      if (expect_answer && hist.size() >= N) begin
        checks++;
        n_answers++;
        if (match != ref_match()) begin
          failures++;
          $display("match=%0b expected %0b after %0d chars", match, ref_match(), hist.size());
        end
        if (match) n_match++;
      end
      if (offered) hist.push_back(text_in);
      expect_answer = offered;
    end
    checks++;
    if (n_match == 0) begin failures++; $display("no match ever occurred"); end
    $display("answers=%0d matches=%0d", n_answers, n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

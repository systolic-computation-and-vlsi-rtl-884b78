// Self-checking testbench for tree_dictionary at its default size.  A
// command is issued on every clock: MEMBER of a random key, INSERT of a new
// key (also into a full machine, which must be refused) or DELETE of a
// present key.  Every answer must arrive exactly 2*log2(N) clocks after its
// command and match a reference set; the free-register count must track
// the set's size.
module tb_tree_dictionary;
  import systolic_pkg::*;
  localparam int N = 8, KW = 16, LAT = 2 * $clog2(N);
  logic clk = 0, rst_n = 0, cmd_valid = 0, resp_valid, resp_hit;
  dict_cmd_e cmd = DCMD_NOP;
  logic [KW-1:0] cmd_key = '0;
  logic [$clog2(N+1)-1:0] free_count;
  int checks = 0, failures = 0;
  int n_full = 0, n_ins = 0, n_del = 0, n_mem_hit = 0;

  tree_dictionary #(.N(N), .KW(KW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KW-1:0] set[$];
  bit exp_q[$];
  int due_q[$];
  int cyc = 0;

  function automatic int find(logic [KW-1:0] k);
    foreach (set[i]) if (set[i] == k) return i;
    return -1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      int r;
      logic [KW-1:0] k;
      bit e;
      r = $urandom_range(0, 9);
      cmd_valid = 1;
      k = KW'($urandom_range(0, 40));
      if (r < 4) begin
        cmd = DCMD_INSERT;
        while (find(k) >= 0) k = KW'($urandom_range(0, 40));
        e = set.size() < N;
        if (e) set.push_back(k); else n_full++;
        n_ins++;
      end else if (r < 7 && set.size() > 0) begin
        int p;
        cmd = DCMD_DELETE;
        p = $urandom_range(0, set.size() - 1);
        k = set[p];
        set.delete(p);
        e = 1;
        n_del++;
      end else begin
        cmd = DCMD_MEMBER;
        e = find(k) >= 0;
        if (e) n_mem_hit++;
      end
      cmd_key = k;
      exp_q.push_back(e);
      due_q.push_back(cyc + LAT + 1);
      @(negedge clk);
      checks++;
      if (free_count != N - set.size()) begin failures++; $display("free_count %0d", free_count); end
      while (due_q.size() > 0 && due_q[0] == cyc + 1) begin
        bit ee;
        ee = exp_q.pop_front();
        void'(due_q.pop_front());
        checks++;
        if (!resp_valid || resp_hit != ee) begin
          failures++;
          $display("cycle %0d: resp_valid=%0b hit=%0b expected %0b", cyc, resp_valid, resp_hit, ee);
        end
      end
    end
    cmd_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (n_full == 0 || n_mem_hit == 0 || n_del == 0) begin failures++; $display("a case never occurred"); end
    $display("inserts=%0d refused=%0d deletes=%0d member hits=%0d", n_ins, n_full, n_del, n_mem_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for l_machine at its default size.  A command is
// issued on every clock: INSERT of a new key (while not full), DELETE of a
// present key, XMIN or MEMBER.  XMIN must deliver the smallest key (or
// "empty") log2(N) clocks later at the pad, and every command's
// "key present" answer must arrive 2*log2(N) clocks later; both are
// compared with a sorted reference list.
module tb_l_machine;
  import systolic_pkg::*;
  localparam int N = 8, KW = 16, D = $clog2(N);
  logic clk = 0, rst_n = 0, cmd_valid = 0;
  dict_cmd_e cmd = DCMD_NOP;
  logic [KW-1:0] cmd_key = '0;
  logic xmin_valid, xmin_empty, resp_valid, resp_hit;
  logic [KW-1:0] xmin_key;
  int checks = 0, failures = 0, n_xmin = 0, n_xempty = 0, n_hit = 0;

  l_machine #(.N(N), .KW(KW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KW-1:0] lst[$];
  bit hit_q[$];
  int hit_due[$];
  int x_due[$];
  int x_key[$];   // -1: empty

  function automatic int find(logic [KW-1:0] k);
    foreach (lst[i]) if (lst[i] == k) return i;
    return -1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int r;
      logic [KW-1:0] k;
      r = $urandom_range(0, 9);
      cmd_valid = 1;
      k = KW'($urandom_range(0, 60));
      if (r < 4 && lst.size() < N) begin
        cmd = DCMD_INSERT;
        while (find(k) >= 0) k = KW'($urandom_range(0, 60));
        hit_q.push_back(0);
        lst.push_back(k); lst.sort();
      end else if (r < 6 && lst.size() > 0) begin
        cmd = DCMD_DELETE;
        k = lst[$urandom_range(0, lst.size() - 1)];
        hit_q.push_back(1);
        lst.delete(find(k));
      end else if (r < 8) begin
        cmd = DCMD_XMIN;
        hit_q.push_back(0);
        x_due.push_back(cyc + D + 1);
        if (lst.size() > 0) x_key.push_back(int'(lst.pop_front()));
        else x_key.push_back(-1);
      end else begin
        cmd = DCMD_MEMBER;
        hit_q.push_back(find(k) >= 0);
      end
      cmd_key = k;
      hit_due.push_back(cyc + 2 * D + 1);
      @(negedge clk);
      checks++;
      if (xmin_valid != (x_due.size() > 0 && x_due[0] == cyc + 1)) begin
        failures++; $display("cycle %0d: xmin_valid=%0b", cyc, xmin_valid);
      end
      if (x_due.size() > 0 && x_due[0] == cyc + 1) begin
        int e;
        void'(x_due.pop_front());
        e = x_key.pop_front();
        checks++;
        n_xmin++;
        if (e < 0) n_xempty++;
        if ((e < 0) ? !xmin_empty : (xmin_empty || xmin_key != KW'(e))) begin
          failures++; $display("cycle %0d: xmin %0d empty=%0b expected %0d", cyc, xmin_key, xmin_empty, e);
        end
      end
      if (hit_due.size() > 0 && hit_due[0] == cyc + 1) begin
        bit e;
        void'(hit_due.pop_front());
        e = hit_q.pop_front();
        checks++;
        if (e) n_hit++;
        if (!resp_valid || resp_hit != e) begin
          failures++; $display("cycle %0d: resp %0b/%0b expected %0b", cyc, resp_valid, resp_hit, e);
        end
      end
    end
    checks++;
    if (n_xmin == 0 || n_xempty == 0 || n_hit == 0) begin failures++; $display("a case never occurred"); end
    $display("xmin=%0d (empty %0d) hits=%0d", n_xmin, n_xempty, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

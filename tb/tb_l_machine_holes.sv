// Self-checking testbench for l_machine_holes at its default size.  Keys
// come from a small range so that extraneous commands are frequent:
// INSERT of a key already present, DELETE of an absent key.  A command is
// offered on most clocks and taken when cmd_ready is high; the set is kept
// at most N/2 keys.  XMIN must deliver the smallest key (or "empty")
// log2(N) clocks after it was taken, and every command's "k was present"
// answer must arrive 2*log2(N) clocks after it was taken; both are compared
// with a reference set.  The design's own assertions check the invariants.
module tb_l_machine_holes;
  import systolic_pkg::*;
  localparam int N = 8, KW = 16, D = $clog2(N);
  logic clk = 0, rst_n = 0, cmd_valid = 0;
  dict_cmd_e cmd = DCMD_NOP;
  logic [KW-1:0] cmd_key = '0;
  logic cmd_ready, xmin_valid, xmin_empty, resp_valid, resp_hit;
  logic [KW-1:0] xmin_key;
  int checks = 0, failures = 0;
  int n_xmin = 0, n_xempty = 0, n_hit = 0, n_extra_ins = 0, n_extra_del = 0;

  l_machine_holes #(.N(N), .KW(KW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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
    for (int cyc = 0; cyc < 9000; cyc++) begin
      int r;
      logic [KW-1:0] k;
      bit taken;
      r = $urandom_range(0, 11);
      k = KW'($urandom_range(0, 11));
      cmd_valid = (r != 11);
      if (r < 4 && (lst.size() < N / 2 || find(k) >= 0)) cmd = DCMD_INSERT;
      else if (r < 7) cmd = DCMD_DELETE;
      else if (r < 9) cmd = DCMD_XMIN;
      else cmd = DCMD_MEMBER;
      cmd_key = k;
      taken = cmd_valid && cmd_ready;
      if (taken) begin
        hit_due.push_back(cyc + 2 * D + 1);
        unique case (cmd)
          DCMD_INSERT: begin
            hit_q.push_back(find(k) >= 0);
            if (find(k) >= 0) n_extra_ins++;
            else begin lst.push_back(k); lst.sort(); end
          end
          DCMD_DELETE: begin
            hit_q.push_back(find(k) >= 0);
            if (find(k) >= 0) lst.delete(find(k));
            else n_extra_del++;
          end
          DCMD_XMIN: begin
            hit_q.push_back(0);
            x_due.push_back(cyc + D + 1);
            if (lst.size() > 0) x_key.push_back(int'(lst.pop_front()));
            else x_key.push_back(-1);
          end
          default: hit_q.push_back(find(k) >= 0);
        endcase
      end
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
      checks++;
      if (resp_valid != (hit_due.size() > 0 && hit_due[0] == cyc + 1)) begin
        failures++; $display("cycle %0d: resp_valid=%0b", cyc, resp_valid);
      end
      if (hit_due.size() > 0 && hit_due[0] == cyc + 1) begin
        bit e;
        void'(hit_due.pop_front());
        e = hit_q.pop_front();
        checks++;
        if (e) n_hit++;
        if (resp_hit != e) begin
          failures++; $display("cycle %0d: resp %0b expected %0b", cyc, resp_hit, e);
        end
      end
    end
    checks++;
    if (n_xmin == 0 || n_xempty == 0 || n_hit == 0 || n_extra_ins == 0 || n_extra_del == 0) begin
      failures++; $display("a case never occurred");
    end
    $display("xmin=%0d (empty %0d) hits=%0d extraneous inserts=%0d deletes=%0d",
             n_xmin, n_xempty, n_hit, n_extra_ins, n_extra_del);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for systolic_linear_array in all three modes.
// The same random stream of PUT / TAKE / NOP commands, never holding more
// than N keys, drives a priority queue, a queue and a stack; each answer is
// compared with a reference (sorted list, FIFO, LIFO).  Every TAKE must
// answer exactly two clocks after it was accepted (constant response time)
// and commands must be accepted every two clocks.  Finally the priority
// queue is overfilled by two keys: the two largest are lost and the N
// smallest come out in order.
module tb_systolic_linear_array;
  import systolic_pkg::*;
  localparam int N = 8, KW = 16;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  lin_cmd_e cmd = CMD_NOP;
  logic [KW-1:0] key = '0;
  logic rdy [3], ov [3], oe [3];
  logic [KW-1:0] ok [3];
  int checks = 0, failures = 0;

  systolic_linear_array #(.N(N), .KW(KW), .MODE(LIN_PQUEUE)) u_pq (.clk, .rst_n, .cmd_valid, .cmd,
    .cmd_key(key), .cmd_ready(rdy[0]), .out_valid(ov[0]), .out_key(ok[0]), .out_empty(oe[0]));
  systolic_linear_array #(.N(N), .KW(KW), .MODE(LIN_QUEUE)) u_q (.clk, .rst_n, .cmd_valid, .cmd,
    .cmd_key(key), .cmd_ready(rdy[1]), .out_valid(ov[1]), .out_key(ok[1]), .out_empty(oe[1]));
  systolic_linear_array #(.N(N), .KW(KW), .MODE(LIN_STACK)) u_st (.clk, .rst_n, .cmd_valid, .cmd,
    .cmd_key(key), .cmd_ready(rdy[2]), .out_valid(ov[2]), .out_key(ok[2]), .out_empty(oe[2]));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KW-1:0] pq[$], fq[$], st[$];
  int n_take = 0, n_put = 0, n_empty_take = 0;

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Issue one command on a phase-0 clock, then check the answer two clocks later.
  task automatic issue(lin_cmd_e c, logic [KW-1:0] k);
    logic [KW-1:0] e[3];
    logic emp;
    while (!rdy[0]) @(negedge clk);
    chk("ready aligned", rdy[1] && rdy[2]);
    cmd_valid = 1; cmd = c; key = k;
    @(negedge clk);
    cmd_valid = 0; cmd = CMD_NOP;
    chk("not ready on odd clock", !rdy[0]);
    chk("no answer after one clock", !ov[0] && !ov[1] && !ov[2]);
    emp = (pq.size() == 0);
    if (c == CMD_PUT) begin
      pq.push_back(k); pq.sort(); fq.push_back(k); st.push_back(k); n_put++;
    end else if (c == CMD_TAKE && !emp) begin
      e[0] = pq.pop_front(); e[1] = fq.pop_front(); e[2] = st.pop_back(); n_take++;
    end
    @(negedge clk);
    if (c == CMD_TAKE) begin
      for (int m = 0; m < 3; m++) begin
        chk($sformatf("mode %0d answers in two clocks", m), ov[m]);
        if (emp) begin
          chk($sformatf("mode %0d empty", m), oe[m]);
        end else begin
          chk($sformatf("mode %0d key %0d expected %0d", m, ok[m], e[m]), !oe[m] && ok[m] == e[m]);
        end
      end
      if (emp) n_empty_take++;
    end else begin
      chk("no answer to PUT/NOP", !ov[0] && !ov[1] && !ov[2]);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    issue(CMD_TAKE, '0);  // take from empty
    for (int i = 0; i < 600; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 5 && pq.size() < N) issue(CMD_PUT, KW'($urandom_range(0, 999)));
      else if (r < 9) issue(CMD_TAKE, '0);
      else issue(CMD_NOP, '0);
    end
    while (pq.size() > 0) issue(CMD_TAKE, '0);
    // Overflow of the priority queue: the largest keys fall off the end.
    for (int i = 0; i < N + 2; i++) begin
      while (!rdy[0]) @(negedge clk);
      cmd_valid = 1; cmd = CMD_PUT; key = KW'(100 + (i * 7) % (N + 2));
      @(negedge clk); cmd_valid = 0;
    end
    for (int i = 0; i < N + 1; i++) begin
      while (!rdy[0]) @(negedge clk);
      cmd_valid = 1; cmd = CMD_TAKE;
      @(negedge clk); cmd_valid = 0;
      @(negedge clk);
      if (i < N) chk($sformatf("overflow order %0d", ok[0]), ov[0] && !oe[0] && ok[0] == KW'(100 + i));
      else chk("overflow lost the largest keys", ov[0] && oe[0]);
    end
    chk("enough TAKEs exercised", n_take > 100 && n_empty_take > 0);
    $display("puts=%0d takes=%0d empty takes=%0d", n_put, n_take, n_empty_take);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench for systolic_suite with every parameter at its
// default.  Each design is taken through complete operations and its
// results are compared with values computed here:
//   inverter     : the 3 x 3 worked example inside a 5 x 5 identity
//   pq / fq / st : inserts, takes, a take from empty and a priority-queue
//                  overflow that loses the largest keys
//   tc, ip       : skewed streams of tuples / vector pairs
//   pm           : a text with matches and with gaps (the array holds)
//   is, mm       : one set intersection, one matrix product
//   td           : inserts up to full, a refused insert, members, deletes
//   lm           : inserts, a delete, members, xmin until empty
//   lh           : a repeated insert, a delete of an absent key, members,
//                  xmin until empty
// Each mechanism named above is counted, and one that never happened
// counts as a failure.
module tb_systolic_suite;
  import systolic_pkg::*;
  localparam int INV_N = 5, W = 32, F = 16, LIN_N = 8, KW = 16;
  localparam int TC_N = 8, PM_N = 6, IP_N = 8, IP_DW = 16, IS_K = 4, IS_N = 4, MM_N = 4, MM_DW = 16;
  localparam int TD_N = 8, LM_N = 8;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic inv_load = 0, inv_start = 0, inv_busy, inv_done;
  logic signed [W-1:0] inv_mat_in [INV_N][INV_N], inv_mat_out [INV_N][INV_N];
  logic pq_cmd_valid = 0, fq_cmd_valid = 0, st_cmd_valid = 0;
  lin_cmd_e pq_cmd = CMD_NOP, fq_cmd = CMD_NOP, st_cmd = CMD_NOP;
  logic [KW-1:0] pq_cmd_key = '0, fq_cmd_key = '0, st_cmd_key = '0;
  logic pq_cmd_ready, fq_cmd_ready, st_cmd_ready, pq_out_valid, fq_out_valid, st_out_valid;
  logic [KW-1:0] pq_out_key, fq_out_key, st_out_key;
  logic pq_out_empty, fq_out_empty, st_out_empty;
  logic tc_load = 0, tc_match, tc_match_valid;
  logic [7:0] tc_load_tuple [TC_N], tc_b_in [TC_N];
  logic tc_b_valid [TC_N];
  logic pm_load = 0, pm_text_valid = 0, pm_text_ready, pm_match, pm_match_valid;
  logic [7:0] pm_load_pattern [PM_N];
  logic [7:0] pm_text_in = '0;
  logic [IP_DW-1:0] ip_a_in [IP_N], ip_b_in [IP_N];
  logic ip_in_valid [IP_N];
  logic [2*IP_DW+$clog2(IP_N):0] ip_dot;
  logic ip_dot_valid;
  logic is_start = 0, is_busy, is_done;
  logic [7:0] is_set_a [IS_K][IS_N], is_set_b [IS_K][IS_N];
  logic is_match [IS_K];
  logic mm_start = 0, mm_busy, mm_done;
  logic [MM_DW-1:0] mm_mat_a [MM_N][MM_N], mm_mat_b [MM_N][MM_N];
  logic [2*MM_DW+$clog2(MM_N):0] mm_mat_c [MM_N][MM_N];
  logic td_cmd_valid = 0, td_resp_valid, td_resp_hit;
  dict_cmd_e td_cmd = DCMD_NOP;
  logic [KW-1:0] td_cmd_key = '0;
  logic [$clog2(TD_N+1)-1:0] td_free_count;
  logic lm_cmd_valid = 0, lm_xmin_valid, lm_xmin_empty, lm_resp_valid, lm_resp_hit;
  dict_cmd_e lm_cmd = DCMD_NOP;
  logic [KW-1:0] lm_cmd_key = '0, lm_xmin_key;
  logic lh_cmd_valid = 0, lh_cmd_ready, lh_xmin_valid, lh_xmin_empty, lh_resp_valid, lh_resp_hit;
  dict_cmd_e lh_cmd = DCMD_NOP;
  logic [KW-1:0] lh_cmd_key = '0, lh_xmin_key;

  systolic_suite dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanisms seen.
  int m_inv = 0, m_overflow = 0, m_take_empty = 0, m_fifo = 0, m_lifo = 0;
  int m_tc_eq = 0, m_tc_ne = 0, m_pm_match = 0, m_pm_hold = 0, m_ip = 0;
  int m_is_in = 0, m_is_out = 0, m_mm = 0, m_td_full = 0, m_td_hit = 0, m_td_del = 0;
  int m_lm_xmin = 0, m_lm_xempty = 0, m_lm_hit = 0, m_lh_extra = 0, m_lh_xmin = 0;

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [W-1:0] fx(real r);
    return W'($rtoi(r * (1 << F)));
  endfunction

  // ---------------- matrix inverter ----------------
  task automatic run_inverter();
    real m [3][3] = '{'{2.0, 0.0, 2.0}, '{1.0, -1.0, 1.0}, '{0.0, 1.0, 0.5}};
    real e [3][3] = '{'{1.5, -2.0, -2.0}, '{0.5, -1.0, 0.0}, '{-1.0, 2.0, 2.0}};
    for (int i = 0; i < INV_N; i++)
      for (int j = 0; j < INV_N; j++)
        inv_mat_in[i][j] = (i < 3 && j < 3) ? fx(m[i][j]) : fx(i == j ? 1.0 : 0.0);
    @(negedge clk) inv_load = 1;
    @(negedge clk) inv_load = 0; inv_start = 1;
    @(negedge clk) inv_start = 0;
    while (!inv_done) @(negedge clk);
    for (int i = 0; i < INV_N; i++)
      for (int j = 0; j < INV_N; j++)
        chk($sformatf("inverse[%0d][%0d]", i, j), inv_mat_out[i][j] ==
            ((i < 3 && j < 3) ? fx(e[i][j]) : fx(i == j ? 1.0 : 0.0)));
    m_inv++;
  endtask

  // ---------------- linear arrays ----------------
  task automatic lin_cmd(lin_cmd_e c, logic [KW-1:0] k);
    while (!pq_cmd_ready) @(negedge clk);
    pq_cmd_valid = 1; fq_cmd_valid = 1; st_cmd_valid = 1;
    pq_cmd = c; fq_cmd = c; st_cmd = c;
    pq_cmd_key = k; fq_cmd_key = k; st_cmd_key = k;
    @(negedge clk);
    pq_cmd_valid = 0; fq_cmd_valid = 0; st_cmd_valid = 0;
    @(negedge clk);
  endtask

  task automatic run_linear();
    logic [KW-1:0] keys [5] = '{30, 10, 50, 20, 40};
    foreach (keys[i]) lin_cmd(CMD_PUT, keys[i]);
    lin_cmd(CMD_TAKE, '0);
    chk("pq min", pq_out_valid && pq_out_key == 10);
    chk("queue oldest", fq_out_valid && fq_out_key == 30);
    chk("stack newest", st_out_valid && st_out_key == 40);
    if (fq_out_key == 30) m_fifo++;
    if (st_out_key == 40) m_lifo++;
    for (int i = 0; i < 4; i++) lin_cmd(CMD_TAKE, '0);
    chk("all drained", pq_out_valid && !pq_out_empty && !fq_out_empty && !st_out_empty);
    lin_cmd(CMD_TAKE, '0);
    chk("take from empty", pq_out_empty && fq_out_empty && st_out_empty);
    if (pq_out_empty) m_take_empty++;
    // overflow: N + 1 keys into the priority queue, the largest is lost
    for (int i = 0; i <= LIN_N; i++) lin_cmd(CMD_PUT, KW'(100 + LIN_N - i));
    for (int i = 0; i < LIN_N; i++) begin
      lin_cmd(CMD_TAKE, '0);
      chk("overflow order", pq_out_valid && pq_out_key == KW'(100 + i));
    end
    lin_cmd(CMD_TAKE, '0);
    chk("overflow lost largest", pq_out_empty);
    if (pq_out_empty) m_overflow++;
  endtask

  // ---------------- tuple comparator and inner products ----------------
  task automatic run_streams();
    logic [7:0] tup [6][TC_N];
    logic [IP_DW-1:0] va [6][IP_N], vb [6][IP_N];
    for (int i = 0; i < TC_N; i++) tc_load_tuple[i] = 8'(i * 3 + 1);
    @(negedge clk) tc_load = 1;
    @(negedge clk) tc_load = 0;
    for (int m = 0; m < 6; m++) begin
      for (int i = 0; i < TC_N; i++) tup[m][i] = tc_load_tuple[i];
      if (m % 2 == 1) tup[m][m] = 8'hFF;
      for (int i = 0; i < IP_N; i++) begin va[m][i] = IP_DW'(m + i); vb[m][i] = IP_DW'(i - m); end
    end
    for (int c = 0; c < 6 + TC_N; c++) begin
      for (int i = 0; i < TC_N; i++) begin
        int m;
        m = c - i;
        tc_b_valid[i] = m >= 0 && m < 6;
        tc_b_in[i] = tc_b_valid[i] ? tup[m][i] : '0;
        ip_in_valid[i] = tc_b_valid[i];
        ip_a_in[i] = tc_b_valid[i] ? va[m][i] : '0;
        ip_b_in[i] = tc_b_valid[i] ? vb[m][i] : '0;
      end
      @(negedge clk);
      begin
        int m;
        m = c - (TC_N - 1);
        if (m >= 0 && m < 6) begin
          longint e;
          e = 0;
          for (int i = 0; i < IP_N; i++) e += longint'(m + i) * longint'(i - m);
          chk("tc valid", tc_match_valid);
          chk("tc result", tc_match == (m % 2 == 0));
          if (tc_match) m_tc_eq++; else m_tc_ne++;
          chk("ip result", ip_dot_valid && ip_dot == ($bits(ip_dot))'(e));
          m_ip++;
        end
      end
    end
    for (int i = 0; i < TC_N; i++) begin tc_b_valid[i] = 0; ip_in_valid[i] = 0; end
  endtask

  // ---------------- pattern matcher ----------------
  task automatic run_matcher();
    string text = "xabcabcabyabcabcabcq";
    string pat  = "abcabc";
    logic [7:0] hist[$];
    bit pend = 0;
    int pos = 0;
    for (int i = 0; i < PM_N; i++) pm_load_pattern[i] = pat[i];
    @(negedge clk) pm_load = 1;
    @(negedge clk) pm_load = 0;
    for (int c = 0; c < 200 && (pos < text.len() || pend); c++) begin
      bit offered;
      offered = 0;
      pm_text_valid = 0;
      if (pm_text_ready && pos < text.len()) begin
        if (c % 7 == 3) m_pm_hold++;   // a slot left empty: the array holds
        else begin
          pm_text_valid = 1; pm_text_in = text[pos]; pos++; offered = 1;
        end
      end
      @(negedge clk);
      if (pend && hist.size() >= PM_N) begin
        bit e;
        e = 1;
        for (int i = 0; i < PM_N; i++) if (hist[hist.size() - PM_N + i] != pat[i]) e = 0;
        chk("pm valid", pm_match_valid);
        chk("pm result", pm_match == e);
        if (e) m_pm_match++;
      end
      if (offered) hist.push_back(pm_text_in);
      pend = offered;
    end
    pm_text_valid = 0;
  endtask

  // ---------------- intersection and matrix product ----------------
  task automatic run_grids();
    for (int k = 0; k < IS_K; k++)
      for (int j = 0; j < IS_N; j++) begin
        is_set_a[k][j] = 8'(k + j);
        is_set_b[k][j] = 8'((k % 2 == 0) ? (k + 1 + j) % 8 : 50 + j);
      end
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        mm_mat_a[i][j] = MM_DW'(i * 4 + j - 7);
        mm_mat_b[i][j] = MM_DW'(j * 2 - i + 1);
      end
    @(negedge clk) is_start = 1; mm_start = 1;
    @(negedge clk) is_start = 0; mm_start = 0;
    while (is_busy || mm_busy) @(negedge clk);
    for (int l = 0; l < IS_K; l++) begin
      bit e;
      e = 0;
      for (int k = 0; k < IS_K; k++) if (is_set_a[k] == is_set_b[l]) e = 1;
      chk("is result", is_match[l] == e);
      if (e) m_is_in++; else m_is_out++;
    end
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        longint e;
        e = 0;
        for (int k = 0; k < MM_N; k++) e += longint'(i * 4 + k - 7) * longint'(j * 2 - k + 1);
        chk("mm result", mm_mat_c[i][j] == ($bits(mm_mat_c[0][0]))'(e));
      end
    m_mm++;
  endtask

  // ---------------- tree machines ----------------
  task automatic td_do(dict_cmd_e c, logic [KW-1:0] k, bit e);
    td_cmd_valid = 1; td_cmd = c; td_cmd_key = k;
    @(negedge clk) td_cmd_valid = 0;
    while (!td_resp_valid) @(negedge clk);
    chk($sformatf("td cmd %0d key %0d", c, k), td_resp_hit == e);
  endtask
  task automatic run_td();
    for (int i = 0; i < TD_N; i++) td_do(DCMD_INSERT, KW'(i * 5), 1);
    chk("td full", td_free_count == 0);
    td_do(DCMD_INSERT, 999, 0);
    m_td_full++;
    td_do(DCMD_MEMBER, 15, 1); m_td_hit++;
    td_do(DCMD_MEMBER, 16, 0);
    td_do(DCMD_DELETE, 15, 1); m_td_del++;
    td_do(DCMD_MEMBER, 15, 0);
    td_do(DCMD_INSERT, 16, 1);
    td_do(DCMD_MEMBER, 16, 1);
  endtask

  task automatic lm_do(dict_cmd_e c, logic [KW-1:0] k);
    lm_cmd_valid = 1; lm_cmd = c; lm_cmd_key = k;
    @(negedge clk) lm_cmd_valid = 0;
  endtask
  task automatic run_lm();
    logic [KW-1:0] ks [6] = '{40, 7, 23, 91, 5, 60};
    foreach (ks[i]) lm_do(DCMD_INSERT, ks[i]);
    lm_do(DCMD_DELETE, 23);
    repeat (8) @(negedge clk);
    lm_do(DCMD_MEMBER, 91);
    while (!lm_resp_valid) @(negedge clk);
    chk("lm member", lm_resp_hit); m_lm_hit++;
    lm_do(DCMD_MEMBER, 23);
    while (!lm_resp_valid) @(negedge clk);
    chk("lm deleted", !lm_resp_hit);
    begin
      logic [KW-1:0] e [5] = '{5, 7, 40, 60, 91};
      for (int i = 0; i < 6; i++) begin
        lm_do(DCMD_XMIN, '0);
        while (!lm_xmin_valid) @(negedge clk);
        if (i < 5) begin chk("lm xmin", !lm_xmin_empty && lm_xmin_key == e[i]); m_lm_xmin++; end
        else begin chk("lm xmin empty", lm_xmin_empty); m_lm_xempty++; end
      end
    end
  endtask

  // The holes L-machine answers every command on resp; XMIN also on the pad.
  task automatic lh_do(dict_cmd_e c, logic [KW-1:0] k, bit e_hit);
    while (!lh_cmd_ready) @(negedge clk);
    lh_cmd_valid = 1; lh_cmd = c; lh_cmd_key = k;
    @(negedge clk) lh_cmd_valid = 0;
    while (!lh_resp_valid) @(negedge clk);
    chk($sformatf("lh cmd %0d key %0d", c, k), lh_resp_hit == e_hit);
  endtask
  task automatic run_lh();
    lh_do(DCMD_INSERT, 12, 0);
    lh_do(DCMD_INSERT, 3, 0);
    lh_do(DCMD_INSERT, 12, 1); m_lh_extra++;   // already present
    lh_do(DCMD_DELETE, 8, 0);  m_lh_extra++;   // absent
    lh_do(DCMD_INSERT, 8, 0);
    lh_do(DCMD_DELETE, 3, 1);
    lh_do(DCMD_MEMBER, 12, 1);
    lh_do(DCMD_MEMBER, 3, 0);
    begin
      logic [KW-1:0] e [2] = '{8, 12};
      for (int i = 0; i < 3; i++) begin
        while (!lh_cmd_ready) @(negedge clk);
        lh_cmd_valid = 1; lh_cmd = DCMD_XMIN;
        @(negedge clk) lh_cmd_valid = 0;
        while (!lh_xmin_valid) @(negedge clk);
        if (i < 2) chk("lh xmin", !lh_xmin_empty && lh_xmin_key == e[i]);
        else chk("lh xmin empty", lh_xmin_empty);
        m_lh_xmin++;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < TC_N; i++) begin tc_b_in[i] = '0; tc_b_valid[i] = 0; end
    for (int i = 0; i < IP_N; i++) begin ip_a_in[i] = '0; ip_b_in[i] = '0; ip_in_valid[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_inverter();
    run_linear();
    run_streams();
    run_matcher();
    run_grids();
    run_td();
    run_lm();
    run_lh();
    chk("mechanism: inversion", m_inv > 0);
    chk("mechanism: priority-queue overflow", m_overflow > 0);
    chk("mechanism: take from empty", m_take_empty > 0);
    chk("mechanism: queue order", m_fifo > 0);
    chk("mechanism: stack order", m_lifo > 0);
    chk("mechanism: tuple equal / different", m_tc_eq > 0 && m_tc_ne > 0);
    chk("mechanism: pattern match", m_pm_match > 0);
    chk("mechanism: text gap hold", m_pm_hold > 0);
    chk("mechanism: inner product", m_ip > 0);
    chk("mechanism: in / not in intersection", m_is_in > 0 && m_is_out > 0);
    chk("mechanism: matrix product", m_mm > 0);
    chk("mechanism: dictionary full", m_td_full > 0);
    chk("mechanism: dictionary member / delete", m_td_hit > 0 && m_td_del > 0);
    chk("mechanism: L-machine xmin / empty / member", m_lm_xmin > 0 && m_lm_xempty > 0 && m_lm_hit > 0);
    chk("mechanism: extraneous insert / delete", m_lh_extra == 2 && m_lh_xmin == 3);
    $display("inv=%0d overflow=%0d empty=%0d tc=%0d/%0d pm=%0d hold=%0d ip=%0d is=%0d/%0d mm=%0d td_full=%0d lm_xmin=%0d",
      m_inv, m_overflow, m_take_empty, m_tc_eq, m_tc_ne, m_pm_match, m_pm_hold, m_ip, m_is_in, m_is_out, m_mm, m_td_full, m_lm_xmin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

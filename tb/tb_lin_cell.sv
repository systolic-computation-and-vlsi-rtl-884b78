// Self-checking testbench for lin_cell.  A priority-queue cell, a queue
// cell and a stack cell are given left-neighbour keys and a beat; the
// values they write into their own registers and into the neighbour are
// compared with the cell programs worked out by hand.  Writes from the
// right neighbour on idle clocks are checked too.
module tb_lin_cell;
  import systolic_pkg::*;
  localparam int KW = 8;
  typedef logic [KW+1:0] key_t;
  localparam key_t E = {KIND_POS_INF, 8'd0};
  localparam key_t M = {KIND_NEG_INF, 8'd0};
  function automatic key_t K(int v); return {KIND_KEY, KW'(v)}; endfunction

  logic clk = 0, rst_n = 0, beat = 0;
  key_t ap = E, bp = E, rta = E, rtb = E;
  logic rtawe = 0, rtbwe = 0;
  logic apwe [3], bpwe [3];
  key_t apwr [3], bpwr [3], a [3], b [3];
  int checks = 0, failures = 0;

  lin_cell #(.KW(KW), .MODE(LIN_PQUEUE)) u0 (.clk, .rst_n, .beat, .ap, .bp, .ap_we(apwe[0]), .ap_wr(apwr[0]),
    .bp_we(bpwe[0]), .bp_wr(bpwr[0]), .rt_a_we(rtawe), .rt_a(rta), .rt_b_we(rtbwe), .rt_b(rtb), .a(a[0]), .b(b[0]));
  lin_cell #(.KW(KW), .MODE(LIN_QUEUE)) u1 (.clk, .rst_n, .beat, .ap, .bp, .ap_we(apwe[1]), .ap_wr(apwr[1]),
    .bp_we(bpwe[1]), .bp_wr(bpwr[1]), .rt_a_we(rtawe), .rt_a(rta), .rt_b_we(rtbwe), .rt_b(rtb), .a(a[1]), .b(b[1]));
  lin_cell #(.KW(KW), .MODE(LIN_STACK)) u2 (.clk, .rst_n, .beat, .ap, .bp, .ap_we(apwe[2]), .ap_wr(apwr[2]),
    .bp_we(bpwe[2]), .bp_wr(bpwr[2]), .rt_a_we(rtawe), .rt_a(rta), .rt_b_we(rtbwe), .rt_b(rtb), .a(a[2]), .b(b[2]));

  always #5 clk = ~clk;
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(string w, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", w); end
  endtask
  // Load A and B of all cells through right-neighbour writes.
  task automatic set_ab(key_t va, key_t vb);
    beat = 0; rtawe = 1; rtbwe = 1; rta = va; rtb = vb;
    @(negedge clk);
    rtawe = 0; rtbwe = 0;
  endtask
  task automatic fire(key_t vap, key_t vbp);
    ap = vap; bp = vbp; beat = 1;
    #1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("reset empty", a[0] == E && b[1] == E);
    // Priority queue: insert 5 into a cell holding 7 -> A_p=-inf, A=5, B=7.
    set_ab(K(7), E);
    chk("right write", a[0] == K(7) && b[0] == E);
    fire(M, K(5));
    chk("pq writes A_p", apwe[0] && apwr[0] == M);
    @(negedge clk) beat = 0;
    chk("pq sort", a[0] == K(5) && b[0] == K(7));
    // XMIN at the pad: A_p=+inf, B_p=+inf -> A_p gets the cell's key.
    set_ab(K(3), E);
    fire(E, E);
    chk("pq xmin to A_p", apwe[0] && apwr[0] == K(3));
    @(negedge clk) beat = 0;
    chk("pq xmin empties", a[0] == E && b[0] == E);
    // Queue and stack, guard 1: A_p, B_p, A full.
    set_ab(K(9), E);
    fire(M, K(4));
    chk("q guard1 consumes B_p", bpwe[1] && bpwr[1] == E && !apwe[1]);
    @(negedge clk) beat = 0;
    chk("q guard1: B := B_p", a[1] == K(9) && b[1] == K(4));
    chk("st guard1: B := A, A := B_p", a[2] == K(4) && b[2] == K(9));
    // Guard 2: A empty.
    set_ab(E, K(1));
    fire(M, K(6));
    @(negedge clk) beat = 0;
    chk("q guard2", a[1] == K(6) && b[1] == E);
    chk("st guard2", a[2] == K(6) && b[2] == E);
    // Guard 3: A_p and B_p empty -> shift left.
    set_ab(K(2), E);
    fire(E, E);
    chk("q guard3 writes A_p", apwe[1] && apwr[1] == K(2));
    chk("st guard3 writes A_p", apwe[2] && apwr[2] == K(2));
    @(negedge clk) beat = 0;
    chk("guard3 empties", a[1] == E && a[2] == E && b[1] == E);
    // No guard: A_p full, B_p empty, A full -> nothing changes.
    set_ab(K(8), E);
    fire(M, E);
    chk("no guard no write", !apwe[1] && !bpwe[1] && !apwe[2]);
    @(negedge clk) beat = 0;
    chk("no guard keeps", a[1] == K(8) && a[2] == K(8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

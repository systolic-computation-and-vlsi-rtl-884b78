// Self-checking testbench for gj_cell.  An interior cell is taken through
// its four states l, r, u, d with known neighbour values and each register
// update is compared with a value computed here; a stop token must then
// halt it.  A 1 x 1 array (a cell on all four boundaries) must replace its
// element x by 1/x in one cycle, and a top-row cell must scale the element
// it takes from the right by its b-register.  Right-column cells below the
// top row must take 0 in state r (N x N array) or their b-register (first
// column moved to the far end, N x 2N array); the interior cell runs a
// second cycle with other values.
module tb_gj_cell;
  localparam int W = 32, F = 16;
  logic clk = 0, rst_n = 0;
  logic load = 0, start_i = 0, stop_i = 0, start_t = 0, stop_t = 0;
  logic signed [W-1:0] lv = '0, lb = '0, ra = '0, ua = '0, da = '0, db = '0;
  logic signed [W-1:0] a_i, b_i, a_o, b_o, a_t, b_t;
  logic so_i, po_i, act_i, so_o, po_o, act_o, so_t, po_t, act_t;
  logic signed [W-1:0] a_rc, b_rc, a_rw, b_rw;
  logic so_rc, po_rc, act_rc, so_rw, po_rw, act_rw;
  int checks = 0, failures = 0;

  gj_cell #(.WIDTH(W), .FRAC(F)) u_int (
    .clk, .rst_n, .load, .load_val(lv), .start_in(start_i), .stop_in(stop_i),
    .start_out(so_i), .stop_out(po_i), .left_b(lb), .right_a(ra), .up_a(ua),
    .down_a(da), .down_b(db), .a(a_i), .b(b_i), .active(act_i));
  gj_cell #(.WIDTH(W), .FRAC(F), .TOP(1), .BOTTOM(1), .LEFT(1), .RIGHT(1)) u_one (
    .clk, .rst_n, .load, .load_val(lv), .start_in(start_i), .stop_in(stop_i),
    .start_out(so_o), .stop_out(po_o), .left_b(lb), .right_a(ra), .up_a(ua),
    .down_a(da), .down_b(db), .a(a_o), .b(b_o), .active(act_o));
  gj_cell #(.WIDTH(W), .FRAC(F), .TOP(1)) u_top (
    .clk, .rst_n, .load, .load_val(lv), .start_in(start_t), .stop_in(stop_t),
    .start_out(so_t), .stop_out(po_t), .left_b(lb), .right_a(ra), .up_a(ua),
    .down_a(da), .down_b(db), .a(a_t), .b(b_t), .active(act_t));

  gj_cell #(.WIDTH(W), .FRAC(F), .RIGHT(1)) u_rc (
    .clk, .rst_n, .load, .load_val(lv), .start_in(start_i), .stop_in(stop_i),
    .start_out(so_rc), .stop_out(po_rc), .left_b(lb), .right_a(ra), .up_a(ua),
    .down_a(da), .down_b(db), .a(a_rc), .b(b_rc), .active(act_rc));
  gj_cell #(.WIDTH(W), .FRAC(F), .RIGHT(1), .CURTAILED(0)) u_rw (
    .clk, .rst_n, .load, .load_val(lv), .start_in(start_i), .stop_in(stop_i),
    .start_out(so_rw), .stop_out(po_rw), .left_b(lb), .right_a(ra), .up_a(ua),
    .down_a(da), .down_b(db), .a(a_rw), .b(b_rw), .active(act_rw));

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] fx(real r);
    return W'($rtoi(r * (1 << F)));
  endfunction
  task automatic chk(string what, logic signed [W-1:0] got, logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    lv = fx(4.0);
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    chk("load", a_i, fx(4.0));
    // state l: b from the left, and the 1x1 cell takes 1/a
    lb = fx(3.0); start_i = 1;
    @(negedge clk) start_i = 0;
    chk("l: b", b_i, fx(3.0));
    chk("1x1 l: b=1/a", b_o, fx(0.25));
    chk("start relayed", W'(so_i), W'(1));
    ra = fx(-1.5);
    @(negedge clk);
    chk("r: a from right", a_i, fx(-1.5));
    chk("right column r: a = 0", a_rc, '0);
    chk("N x 2N right column r: a = b", a_rw, fx(3.0));
    chk("1x1 r: a=b", a_o, fx(0.25));
    ua = fx(2.5);
    @(negedge clk);
    chk("u: a from above", a_i, fx(2.5));
    da = fx(7.0); db = fx(3.0);
    @(negedge clk);
    chk("d: a = below.a - below.b*a", a_i, fx(7.0 - 3.0 * 2.5));
    chk("1x1 unchanged in u, d", a_o, fx(0.25));
    // next l: b from the left again
    lb = fx(-2.0);
    @(negedge clk);
    chk("second l", b_i, fx(-2.0));
    ra = fx(0.75);
    @(negedge clk);
    chk("second r", a_i, fx(0.75));
    ua = fx(-1.25);
    @(negedge clk);
    chk("second u", a_i, fx(-1.25));
    da = fx(-4.0); db = fx(1.5);
    @(negedge clk);
    chk("second d", a_i, fx(-4.0 - 1.5 * -1.25));
    stop_i = 1;
    @(negedge clk) stop_i = 0;
    chk("stopped", W'(act_i), W'(0));
    chk("stop relayed", W'(po_i), W'(1));
    lb = fx(9.0);
    @(negedge clk);
    chk("idle keeps b", b_i, fx(-2.0));
    // top-row cell: a := right.a * b
    lv = fx(1.0);
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    lb = fx(0.5); start_t = 1;
    @(negedge clk) start_t = 0;
    ra = fx(6.0);
    @(negedge clk);
    chk("top r: a = right.a*b", a_t, fx(3.0));
    ua = fx(100.0);
    @(negedge clk);
    chk("top u: no change", a_t, fx(3.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

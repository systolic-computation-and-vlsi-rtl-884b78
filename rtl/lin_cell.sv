// lin_cell: one cell of the linear systolic priority queue, queue or stack.
//
// The cell has an A register (a key held in place) and a B register (a
// key travelling right).  Odd and even cells act on alternate clocks; when
// a cell acts its left neighbour is idle, so the cell may read and rewrite
// the neighbour's registers (A_p, B_p).  The MODE parameter selects the
// program from the document:
//   LIN_PQUEUE: B := B_p, then sort A_p, A, B so that A_p <= A <= B;
//   LIN_QUEUE : A_p, B_p, A full  -> B := B_p
//               A_p, B_p full, A empty -> A := B_p, B := empty
//               A_p, B_p empty, A full -> A_p := A, A := B := empty
//   LIN_STACK : A_p, B_p, A full  -> B := A, A := B_p
//               A_p, B_p full, A empty -> A := B_p, B := empty
//               A_p, B_p empty, A full -> A_p := A, A := B := empty
// Plus infinity is the empty key.  In the queue and stack a copy out of B_p
// also empties B_p (the document leaves open whether the copy destroys
// B_p; without it a key left in B_p would be copied twice).
//
// Interface: beat is high on the clocks on which this cell acts.  The cell
// drives write requests into its left neighbour (ap_we/ap_wr, bp_we/bp_wr)
// and accepts those of its right neighbour (rt_a_we/rt_a, rt_b_we/rt_b),
// which only come on the clocks the cell itself is idle.
module lin_cell
  import systolic_pkg::*;
#(
  parameter int unsigned KW   = 16,
  parameter lin_mode_e   MODE = LIN_PQUEUE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          beat,
  input  logic [KW+1:0] ap,
  input  logic [KW+1:0] bp,
  output logic          ap_we,
  output logic [KW+1:0] ap_wr,
  output logic          bp_we,
  output logic [KW+1:0] bp_wr,
  input  logic          rt_a_we,
  input  logic [KW+1:0] rt_a,
  input  logic          rt_b_we,
  input  logic [KW+1:0] rt_b,
  output logic [KW+1:0] a,
  output logic [KW+1:0] b
);
  localparam logic [KW+1:0] EMPTY = {KIND_POS_INF, {KW{1'b0}}};

  function automatic logic full(input logic [1:0] kind);
    return kind != KIND_POS_INF;
  endfunction

  logic [KW+1:0] a_nx, b_nx;
  logic          a_upd, b_upd;
  logic [KW+1:0] lo, mid, hi;

  // Three-key sorting network for the priority queue.
  logic [KW+1:0] s1_lo, s1_hi, s2_lo;
  always_comb begin
    s1_lo = (ap < a) ? ap : a;
    s1_hi = (ap < a) ? a  : ap;
    s2_lo = (s1_hi < bp) ? s1_hi : bp;
    hi    = (s1_hi < bp) ? bp    : s1_hi;
    lo    = (s1_lo < s2_lo) ? s1_lo : s2_lo;
    mid   = (s1_lo < s2_lo) ? s2_lo : s1_lo;
  end

  always_comb begin
    ap_we = 1'b0; ap_wr = EMPTY;
    bp_we = 1'b0; bp_wr = EMPTY;
    a_upd = 1'b0; a_nx = a;
    b_upd = 1'b0; b_nx = b;
    if (beat) begin
      if (MODE == LIN_PQUEUE) begin
        ap_we = 1'b1; ap_wr = lo;
        a_upd = 1'b1; a_nx  = mid;
        b_upd = 1'b1; b_nx  = hi;
      end else if (full(ap[KW+1:KW]) && full(bp[KW+1:KW]) && full(a[KW+1:KW])) begin
        bp_we = 1'b1;
        b_upd = 1'b1;
        if (MODE == LIN_QUEUE) begin
          b_nx = bp;
        end else begin
          b_nx  = a;
          a_upd = 1'b1; a_nx = bp;
        end
      end else if (full(ap[KW+1:KW]) && full(bp[KW+1:KW]) && !full(a[KW+1:KW])) begin
        bp_we = 1'b1;
        a_upd = 1'b1; a_nx = bp;
        b_upd = 1'b1; b_nx = EMPTY;
      end else if (!full(ap[KW+1:KW]) && !full(bp[KW+1:KW]) && full(a[KW+1:KW])) begin
        ap_we = 1'b1; ap_wr = a;
        a_upd = 1'b1; a_nx = EMPTY;
        b_upd = 1'b1; b_nx = EMPTY;
      end
    end else begin
      if (rt_a_we) begin a_upd = 1'b1; a_nx = rt_a; end
      if (rt_b_we) begin b_upd = 1'b1; b_nx = rt_b; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= EMPTY;
      b <= EMPTY;
    end else begin
      if (a_upd) a <= a_nx;
      if (b_upd) b <= b_nx;
    end
  end

  // The right neighbour may only write while this cell is idle.
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) beat |-> !rt_a_we && !rt_b_we)
    else $error("right neighbour wrote during this cell's beat");
endmodule

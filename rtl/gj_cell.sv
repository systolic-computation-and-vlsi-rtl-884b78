// gj_cell: one processor of the systolic matrix inverter.
//
// The inverter runs Gauss-Jordan elimination without pivoting as N
// repetitions of a two-wave cycle: a wave to the right that passes the
// first column along each row (scaling the first row by the reciprocal of
// the pivot) and shifts every other element one place left, and a wave
// downwards that passes the scaled first row down each column, subtracts
// the matching multiple from every other row and shifts the rows one place
// up.  After N cycles the array holds the inverse.
//
// Each cell holds an a-register (its matrix element) and a b-register (the
// value travelling to the right: the row multiplier, or the pivot's
// reciprocal in the first row), and a four-state clock that follows the
// neighbour it deals with:
//   l (0): take b from the left neighbour (left column: b := a, or 1/a in
//          the top row);
//   r (1): take a from the right neighbour (top row: multiply it by b).
//          The right column of the curtailed N x N array (CURTAILED=1)
//          takes the element the identity block it no longer stores would
//          supply: b (that is 1 times the pivot's reciprocal) in the top
//          row, else 0.  The right column of the full N x 2N array
//          (CURTAILED=0) takes the first column, which arrives in b: 1 (the
//          pivot times its reciprocal) in the top row, else b;
//   u (2): take a from the neighbour above (the pivot-row element moving
//          down); not in the top row;
//   d (3): take a := below.a - below.b * a from the neighbour below (the
//          row-subtract result moving up); not in the bottom row.
// Neighbouring cells are one state apart, so the two sides of every
// exchange act on the same clock edge; each cell only reads registers of
// its four neighbours.  The four states, the a/b registers and the
// boundary behaviour of the curtailed array follow the document; the
// number format (signed fixed point, WIDTH bits with FRAC fraction bits,
// truncating multiply and reciprocal) is this design's choice.
//
// Control: start_in / stop_in are one-cycle tokens from the left (or, in
// the left column, from above); they are re-timed to start_out / stop_out
// one clock later.  start_in makes the cell do state l on that edge and run;
// stop_in, arriving when the cell would next enter l, halts it.
// load / load_val write the a-register while the cell is idle.
module gj_cell #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned FRAC   = 16,
  parameter bit          TOP    = 1'b0,
  parameter bit          BOTTOM = 1'b0,
  parameter bit          LEFT   = 1'b0,
  parameter bit          RIGHT  = 1'b0,
  parameter bit          CURTAILED = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [WIDTH-1:0] load_val,
  input  logic                    start_in,
  input  logic                    stop_in,
  output logic                    start_out,
  output logic                    stop_out,
  input  logic signed [WIDTH-1:0] left_b,
  input  logic signed [WIDTH-1:0] right_a,
  input  logic signed [WIDTH-1:0] up_a,
  input  logic signed [WIDTH-1:0] down_a,
  input  logic signed [WIDTH-1:0] down_b,
  output logic signed [WIDTH-1:0] a,
  output logic signed [WIDTH-1:0] b,
  output logic                    active
);
  typedef enum logic [1:0] {ST_L = 2'd0, ST_R = 2'd1, ST_U = 2'd2, ST_D = 2'd3} state_e;

  localparam logic signed [WIDTH-1:0] MAX_POS = {1'b0, {(WIDTH-1){1'b1}}};
  localparam logic signed [WIDTH-1:0] ONE     = WIDTH'(1) << FRAC;

  function automatic logic signed [WIDTH-1:0] fx_mul(input logic signed [WIDTH-1:0] x,
                                                     input logic signed [WIDTH-1:0] y);
    logic signed [2*WIDTH-1:0] p;
    p = (2*WIDTH)'(x) * (2*WIDTH)'(y);
    return WIDTH'(p >>> FRAC);
  endfunction

  // 1/x; a zero pivot (the document assumes none occurs) gives the largest
  // positive value instead of an undefined quotient.
  function automatic logic signed [WIDTH-1:0] fx_recip(input logic signed [WIDTH-1:0] x);
    logic signed [2*WIDTH-1:0] num;
    num = (2*WIDTH)'(1) <<< (2*FRAC);
    if (x == '0) return MAX_POS;
    // Quotients that do not fit WIDTH bits (pivots below 2^-(WIDTH-FRAC-1))
    // wrap; a well-scaled matrix never produces them.
    return WIDTH'(num / (2*WIDTH)'(x));
  endfunction

  state_e state, st_now;
  logic   act;

  always_comb begin
    st_now = start_in ? ST_L : state;
    act    = start_in || (active && !(state == ST_L && stop_in));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a         <= '0;
      b         <= '0;
      state     <= ST_L;
      active    <= 1'b0;
      start_out <= 1'b0;
      stop_out  <= 1'b0;
    end else begin
      start_out <= start_in;
      stop_out  <= stop_in;
      if (act) begin
        active <= 1'b1;
        state  <= state_e'(st_now + 2'd1);
        unique case (st_now)
          ST_L: begin
            if (LEFT) b <= TOP ? fx_recip(a) : a;
            else      b <= left_b;
          end
          ST_R: begin
            if (RIGHT && CURTAILED) a <= TOP ? b : '0;
            else if (RIGHT)         a <= TOP ? ONE : b;
            else       a <= TOP ? fx_mul(right_a, b) : right_a;
          end
          ST_U: begin
            if (!TOP) a <= up_a;
          end
          ST_D: begin
            if (!BOTTOM) a <= down_a - fx_mul(down_b, a);
          end
        endcase
      end else begin
        if (stop_in) active <= 1'b0;
        if (load && !active) a <= load_val;
      end
    end
  end

  // In the top row the right column stores 1 * b = b.
  initial assert (FRAC < WIDTH) else $error("FRAC must be below WIDTH");
endmodule

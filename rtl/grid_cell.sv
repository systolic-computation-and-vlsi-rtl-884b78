// grid_cell: processor of the two-dimensional comparison / product array.
//
// Each clock the cell passes its a operand up (a_out := a_in from below),
// its b operand down (b_out := b_in from above) and the partial result s
// to the right, combined with the pair it holds this clock:
//   OP_MATCH (0): s_out := s_in AND (a == b)   (tuple comparison)
//   OP_MAC   (1): s_out := s_in + a * b        (inner product)
// Every operand and result carries a valid bit.  The separating "dummy"
// tuples of the document are operands with valid = 0; a result is valid only
// if every pair it combined was valid, so a dummy never compares equal.
// The operation, the flow directions and the one-clock step follow the
// document; the valid bits and widths are this design's choice.
module grid_cell #(
  parameter int unsigned DW = 16,
  parameter int unsigned SW = 40,
  parameter bit          OP = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] a_in,
  input  logic          a_vin,
  input  logic [DW-1:0] b_in,
  input  logic          b_vin,
  input  logic [SW-1:0] s_in,
  input  logic          s_vin,
  output logic [DW-1:0] a_out,
  output logic          a_vout,
  output logic [DW-1:0] b_out,
  output logic          b_vout,
  output logic [SW-1:0] s_out,
  output logic          s_vout
);
  logic          pair_ok;
  logic [SW-1:0] s_nx;

  always_comb begin
    pair_ok = a_vout && b_vout;
    if (OP) s_nx = s_in + SW'(signed'(a_out) * signed'(b_out));
    else    s_nx = SW'(s_in[0] && pair_ok && (a_out == b_out));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out  <= '0;
      a_vout <= 1'b0;
      b_out  <= '0;
      b_vout <= 1'b0;
      s_out  <= '0;
      s_vout <= 1'b0;
    end else begin
      a_out  <= a_in;
      a_vout <= a_vin;
      b_out  <= b_in;
      b_vout <= b_vin;
      s_out  <= s_nx;
      s_vout <= s_vin && pair_ok;
    end
  end
endmodule

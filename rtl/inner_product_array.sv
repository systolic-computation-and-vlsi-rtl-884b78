// inner_product_array: linear systolic array for inner products of pairs
// of vectors.
//
// Like the tuple comparator, but both vectors stream in: component i of
// vector a enters processor i from below and component i of vector b from
// above, both in skewed format (component i one clock after component i-1).
// A partial sum s starts at zero on the left (the pulser) and moves one
// processor to the right per clock; processor i forms s_out := s_in +
// a_i * b_i.  A new pair of vectors can start every clock (period 1) and its
// inner product leaves the right end one clock after the last components
// entered, N clocks after the first.  Operands are signed DW-bit integers,
// the sum SW bits; the valid bits mark complete results (this design's
// choice).
module inner_product_array #(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = 16,
  parameter int unsigned SW = 2*DW + $clog2(N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] a_in    [N],
  input  logic [DW-1:0] b_in    [N],
  input  logic          in_valid [N],
  output logic [SW-1:0] dot,
  output logic          dot_valid
);
  logic [SW-1:0] s [N];
  logic          v [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        s[i] <= '0;
        v[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        s[i] <= (i == 0 ? '0 : s[i == 0 ? 0 : i-1]) + SW'(signed'(a_in[i]) * signed'(b_in[i]));
        v[i] <= (i == 0 ? 1'b1 : v[i == 0 ? 0 : i-1]) && in_valid[i];
      end
    end
  end

  assign dot       = s[N-1];
  assign dot_valid = v[N-1];
endmodule

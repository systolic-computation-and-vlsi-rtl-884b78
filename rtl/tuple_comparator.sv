// tuple_comparator: linear systolic array comparing tuples with a fixed one.
//
// Processor i holds component a_i of a fixed tuple (written through load /
// load_tuple).  A result signal s starts as "true" at the left end (the
// pulser) and moves one processor to the right per clock; processor i
// forms s_out := s_in AND (a_i == b_i).  The tuples b arrive in skewed
// format: component b_i enters processor i one clock after b_(i-1) entered
// processor i-1, so it arrives together with the s that has compared the
// first i-1 components.  A new tuple can start every clock (period 1) and
// its answer appears one clock after its last component entered, N clocks
// after its first.  Each input component carries a valid bit; a result is
// valid only when all N components were valid.  Widths and the valid bits
// are this design's choice.
module tuple_comparator #(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [DW-1:0] load_tuple [N],
  input  logic [DW-1:0] b_in       [N],
  input  logic          b_valid    [N],
  output logic          match,
  output logic          match_valid
);
  logic [DW-1:0] a [N];
  logic          s [N];
  logic          v [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        a[i] <= '0;
        s[i] <= 1'b0;
        v[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (load) a[i] <= load_tuple[i];
        s[i] <= (i == 0 ? 1'b1 : s[i == 0 ? 0 : i-1]) && (a[i] == b_in[i]);
        v[i] <= (i == 0 ? 1'b1 : v[i == 0 ? 0 : i-1]) && b_valid[i];
      end
    end
  end

  assign match       = s[N-1];
  assign match_valid = v[N-1];
endmodule

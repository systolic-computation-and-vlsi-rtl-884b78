// merge_tree: pipelined merging tree (the "1-tree" of a tree machine).
//
// A binary tree of log2(N) levels of nodes; each node registers the OR of
// the two answers coming up from its children, so the answers of all N
// leaves, given on one clock, are merged at the root log2(N) clocks later.
// A valid bit travels with every wavefront.  N must be a power of two.
module merge_tree #(
  parameter int unsigned N = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit [N],
  output logic out_valid,
  output logic out_bit
);
  // Heap numbering as in bcast_tree: node n has children 2n and 2n+1;
  // children numbered N .. 2N-1 are the leaves.
  logic v [1:N-1];
  logic b [1:N-1];

  function automatic logic child(input int c);
    return (c >= N) ? in_bit[(c - N) % N] : b[(c >= N || c < 1) ? 1 : c];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 1; n < N; n++) begin
        v[n] <= 1'b0;
        b[n] <= 1'b0;
      end
    end else begin
      for (int n = 1; n < N; n++) begin
        b[n] <= child(2*n) || child(2*n + 1);
        v[n] <= (2*n >= N) ? in_valid : v[(2*n >= N) ? 1 : 2*n];
      end
    end
  end

  assign out_valid = v[1];
  assign out_bit   = b[1];
endmodule

// bcast_tree: pipelined broadcast tree (the "0-tree" of a tree machine).
//
// A binary tree of log2(N) levels of nodes, each node a register that
// duplicates the word it holds to its two children one clock later.  A
// word entered at the root reaches all N leaves on the same clock,
// log2(N) clocks later, and a new word may enter every clock, so
// successive commands travel down as wavefronts one level apart.
// N must be a power of two.  out_valid marks a wavefront at the leaves.
module bcast_tree #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_word,
  output logic         out_valid [N],
  output logic [W-1:0] out_word  [N]
);
  localparam int unsigned D = $clog2(N);

  // Node n of the heap numbering (root 1, children 2n and 2n+1); nodes
  // 1 .. N-1 are the internal nodes, leaf l hangs off node (N + l) / 2.
  logic         v [1:N-1];
  logic [W-1:0] w [1:N-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 1; n < N; n++) begin
        v[n] <= 1'b0;
        w[n] <= '0;
      end
    end else begin
      v[1] <= in_valid;
      w[1] <= in_word;
      for (int n = 2; n < N; n++) begin
        v[n] <= v[n / 2];
        w[n] <= w[n / 2];
      end
    end
  end

  for (genvar l = 0; l < N; l++) begin : g_leaf
    assign out_valid[l] = v[(N + l) / 2];
    assign out_word[l]  = w[(N + l) / 2];
  end

  initial assert (N >= 2 && (1 << D) == N) else $error("N must be a power of two, at least 2");
endmodule

// l_machine: tree machine whose processors are also linked into a linear
// array (an "L-machine"), keeping up to N keys sorted, with MEMBER, INSERT,
// DELETE and XMIN commands.
//
// Commands are broadcast from the root to all N processors through a
// pipelined tree (bcast_tree) and reach all of them on the same clock.
// The processors keep the keys in increasing order in A registers at the
// left end of the array (plus infinity marks an empty processor; an IO pad
// left of processor 0 acts as minus infinity).  Each decides its move by
// comparing the command's key k with its own key and its left neighbour's:
//   INSERT(k): keys below k stay; the first key above k is replaced by k;
//              the keys after it shift one place right (the last key is
//              lost when the array is full);
//   DELETE(k): keys below k stay; from k on, every processor takes its
//              right neighbour's key (the keys shift one place left);
//   XMIN     : every key shifts one place left; the smallest moves into
//              the IO pad and is output;
//   MEMBER(k): no move.
// Each processor's "A == k" answer is ORed up a pipelined merging tree
// (merge_tree).  A command may enter every clock; XMIN answers log2(N)
// clocks later at the pad, and every command's "key was present" answer
// leaves the merging tree 2*log2(N) clocks after it entered.
//
// As in the document this version assumes that INSERT brings a new key and
// DELETE names a present key: an extraneous INSERT duplicates a key and an
// extraneous DELETE removes the next larger key.
module l_machine
  import systolic_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned KW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  dict_cmd_e     cmd,
  input  logic [KW-1:0] cmd_key,
  output logic          xmin_valid,
  output logic [KW-1:0] xmin_key,
  output logic          xmin_empty,
  output logic          resp_valid,
  output logic          resp_hit
);
  typedef logic [KW+1:0] key_t;   // {kind, value}, see systolic_pkg
  localparam key_t POS_INF = {KIND_POS_INF, {KW{1'b0}}};
  localparam key_t NEG_INF = {KIND_NEG_INF, {KW{1'b0}}};

  typedef struct packed {
    dict_cmd_e     cmd;
    logic [KW-1:0] key;
  } lcmd_t;
  localparam int unsigned CWD = $bits(lcmd_t);

  logic           lv [N];
  logic [CWD-1:0] lw [N];

  bcast_tree #(.N(N), .W(CWD)) u_down (
    .clk, .rst_n, .in_valid(cmd_valid), .in_word({cmd, cmd_key}), .out_valid(lv), .out_word(lw));

  key_t a   [N];
  logic hit [N];
  key_t pad;
  logic pad_v;
  logic ans_v;

  for (genvar i = 0; i < N; i++) begin : g_proc
    lcmd_t c;
    key_t  k, left, right;
    assign c     = lcmd_t'(lw[i]);
    assign k     = {KIND_KEY, c.key};
    assign left  = (i == 0)     ? NEG_INF : a[(i == 0) ? 0 : i-1];
    assign right = (i == N - 1) ? POS_INF : a[(i == N - 1) ? i : i+1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a[i]   <= POS_INF;
        hit[i] <= 1'b0;
      end else begin
        hit[i] <= 1'b0;
        if (lv[i]) begin
          hit[i] <= (a[i] == k) && (c.cmd != DCMD_XMIN);
          unique case (c.cmd)
            DCMD_INSERT: if (!(a[i] < k)) a[i] <= (left < k) ? k : left;
            DCMD_DELETE: if (!(a[i] < k)) a[i] <= right;
            DCMD_XMIN:   a[i] <= right;
            default: ;
          endcase
        end
      end
    end
  end

  // The IO pad takes the smallest key on XMIN.
  dict_cmd_e c0_cmd;
  logic      is_xmin;
  assign c0_cmd  = dict_cmd_e'(lw[0][CWD-1:KW]);
  assign is_xmin = lv[0] && c0_cmd == DCMD_XMIN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pad   <= POS_INF;
      pad_v <= 1'b0;
      ans_v <= 1'b0;
    end else begin
      ans_v <= lv[0];
      pad_v <= is_xmin;
      if (is_xmin) pad <= a[0];
    end
  end
  assign xmin_valid = pad_v;
  assign xmin_key   = pad[KW-1:0];
  assign xmin_empty = pad[KW+1:KW] == KIND_POS_INF;

  merge_tree #(.N(N)) u_up (
    .clk, .rst_n, .in_valid(ans_v), .in_bit(hit), .out_valid(resp_valid), .out_bit(resp_hit));
endmodule

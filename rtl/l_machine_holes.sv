// l_machine_holes: L-machine (tree machine whose processors also form a
// linear array) keeping a sorted set with MEMBER, INSERT, DELETE and XMIN,
// in the version that tolerates extraneous commands: INSERT of a key that
// is already present and DELETE of a key that is absent are allowed.
//
// How it works.  Every processor holds a key value A and a star bit.  A
// starred processor is a hole: it keeps a value only to keep the array
// sorted, and that value is not in the set.  Unused processors at the right
// end hold plus infinity and no star.  A command is broadcast down a
// pipelined tree (bcast_tree) and reaches all processors on one clock.
// Each processor then looks at the key k, its own register and its left
// neighbour's:
//   INSERT(k): values below k stay; the first processor with a value >= k
//              takes k (unstarred); the ones after it take their left
//              neighbour's contents, so the values shift one place right.
//              A value equal to k that is shifted gets a star, so a
//              second insertion of k leaves a hole instead of a duplicate;
//   DELETE(k): the processor holding k unstarred stars it (nothing moves;
//              an absent k changes nothing);
//   XMIN     : every processor takes its right neighbour's contents; the
//              first processor's key moves into the IO pad;
//   MEMBER(k): no move.
// On the two clocks after a command every processor does a COMPRESS step:
// a starred processor whose right neighbour is not starred takes that
// neighbour's contents (plus infinity included), and that neighbour, if it
// held a key, becomes starred.  Holes thus move right and vanish at the
// right end.  This keeps two invariants at every command: (I1) the first
// processor is not starred, so XMIN always finds the smallest key, and (I2)
// every starred processor has an unstarred right neighbour, so at most half
// the processors are holes and the machine holds up to N/2 keys.
//
// Interface and timing.  cmd_ready is high on every third clock; a command
// is taken when cmd_valid and cmd_ready are both high.  An XMIN answers
// log2(N) clocks after it entered on xmin_valid/xmin_key/xmin_empty.  Every
// command's "k was in the set" answer leaves the merging tree (merge_tree)
// 2*log2(N) clocks after it entered, on resp_valid/resp_hit.  N must be a
// power of two.
//
// The document gives the star idea, the two invariants, the COMPRESS step,
// one or two COMPRESSes after an update and one after XMIN, and the N/2
// capacity.  This design's own choices: a starred processor keeps a value
// (its own deleted key, or the key it passed left), COMPRESS is done by
// every processor rather than only right of the update, every command is
// followed by two COMPRESS clocks (hence one command per three clocks),
// and an INSERT into a full array loses the largest value.
module l_machine_holes
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
  output logic          cmd_ready,
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

  // Root: one command every three clocks.
  logic [1:0] gap;
  logic       take;
  assign cmd_ready = (gap == 2'd0);
  assign take      = cmd_valid && cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            gap <= 2'd0;
    else if (take)         gap <= 2'd2;
    else if (gap != 2'd0)  gap <= gap - 2'd1;
  end

  logic           lv [N];
  logic [CWD-1:0] lw [N];

  bcast_tree #(.N(N), .W(CWD)) u_down (
    .clk, .rst_n, .in_valid(take), .in_word({cmd, cmd_key}), .out_valid(lv), .out_word(lw));

  key_t a   [N];
  logic st  [N];
  logic hit [N];
  logic cp1 [N];
  logic cp2 [N];

  for (genvar i = 0; i < N; i++) begin : g_proc
    lcmd_t c;
    key_t  k, left, right;
    logic  lst, rst;
    assign c     = lcmd_t'(lw[i]);
    assign k     = {KIND_KEY, c.key};
    assign left  = (i == 0)     ? NEG_INF : a[(i == 0) ? 0 : i-1];
    assign lst   = (i == 0)     ? 1'b0    : st[(i == 0) ? 0 : i-1];
    assign right = (i == N - 1) ? POS_INF : a[(i == N - 1) ? i : i+1];
    assign rst   = (i == N - 1) ? 1'b0    : st[(i == N - 1) ? i : i+1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a[i]   <= POS_INF;
        st[i]  <= 1'b0;
        hit[i] <= 1'b0;
        cp1[i] <= 1'b0;
        cp2[i] <= 1'b0;
      end else begin
        hit[i] <= 1'b0;
        cp1[i] <= lv[i];
        cp2[i] <= cp1[i];
        if (lv[i]) begin
          hit[i] <= (a[i] == k) && !st[i] && (c.cmd != DCMD_XMIN);
          unique case (c.cmd)
            DCMD_INSERT:
              if (!(a[i] < k)) begin
                if (left < k) begin
                  a[i]  <= k;
                  st[i] <= 1'b0;
                end else begin
                  a[i]  <= left;
                  st[i] <= lst || (left == k);
                end
              end
            DCMD_DELETE: if (a[i] == k) st[i] <= 1'b1;
            DCMD_XMIN: begin
              a[i]  <= right;
              st[i] <= rst;
            end
            default: ;
          endcase
        end else if (cp1[i] || cp2[i]) begin
          // COMPRESS
          if (st[i] && !rst) begin
            a[i]  <= right;
            st[i] <= 1'b0;
          end else if (!st[i] && lst && a[i] != POS_INF) begin
            st[i] <= 1'b1;
          end
        end
      end
    end
  end

  // The IO pad takes the smallest key on XMIN.
  dict_cmd_e c0_cmd;
  logic      is_xmin;
  key_t      pad;
  logic      pad_v;
  logic      ans_v;
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

  // Invariants I1 and I2 hold whenever a command reaches the processors.
  a_i1: assert property (@(posedge clk) disable iff (!rst_n) lv[0] |-> !st[0]);
  for (genvar i = 0; i < N - 1; i++) begin : g_inv
    a_i2: assert property (@(posedge clk) disable iff (!rst_n) lv[0] && st[i] |-> !st[i+1]);
  end
endmodule

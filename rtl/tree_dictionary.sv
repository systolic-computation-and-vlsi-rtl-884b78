// tree_dictionary: pipelined tree machine holding a dictionary of up to N
// keys, with MEMBER, INSERT and DELETE commands.
//
// N processors form the leaves of two binary trees: a broadcast tree
// (bcast_tree) that carries each command from the root down to every
// processor, and a merging tree (merge_tree) that ORs the processors'
// answers back up to the root.  Both trees are pipelined one level per
// clock, so a command may enter every clock and is answered 2*log2(N)
// clocks later.
//
// Each processor has an A register (its key) and a B register that holds a
// ticket 1..N while the processor is free, or 0 ("empty", written as
// infinity in the document) while it holds a key.  A counter F at the root
// counts the free processors; tickets 1..F are always spread over the free
// processors, one each.  INSERT(k) is tagged with F and F is decremented:
// only the processor holding ticket F stores k and clears its B.  DELETE(k)
// is tagged with F+1 and F is incremented: the processor holding k frees
// itself and takes the tag as its ticket.  MEMBER(k) asks every processor
// whether it holds k.  After reset all processors are free, processor l
// holding ticket l+1.
//
// As in the document, keys are assumed unique: an INSERT must bring a new
// key and a DELETE must name a present key (an absent key would leave a
// ticket unclaimed).  An INSERT into a full machine is tagged 0, which no
// processor holds, and is answered with resp_hit = 0.
//
// Interface: a command is taken on every clock with cmd_valid.  Each
// command is answered, in order, with resp_valid and resp_hit (MEMBER:
// key present; INSERT: key stored; DELETE: key removed).  free_count is F.
module tree_dictionary
  import systolic_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned KW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  input  dict_cmd_e       cmd,
  input  logic [KW-1:0]   cmd_key,
  output logic            resp_valid,
  output logic            resp_hit,
  output logic [$clog2(N+1)-1:0] free_count
);
  localparam int unsigned TW = $clog2(N + 1);

  typedef struct packed {
    dict_cmd_e     cmd;
    logic [KW-1:0] key;
    logic [TW-1:0] tag;
  } dcmd_t;
  localparam int unsigned CWD = $bits(dcmd_t);

  logic [TW-1:0] f;
  dcmd_t         root_cmd;

  // Root: tag the command with the ticket it uses and update F.
  always_comb begin
    root_cmd.cmd = cmd;
    root_cmd.key = cmd_key;
    root_cmd.tag = '0;
    if (cmd == DCMD_INSERT) root_cmd.tag = f;
    if (cmd == DCMD_DELETE) root_cmd.tag = f + TW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f <= TW'(N);
    end else if (cmd_valid) begin
      if (cmd == DCMD_INSERT && f != '0) f <= f - TW'(1);
      if (cmd == DCMD_DELETE && f != TW'(N)) f <= f + TW'(1);
    end
  end
  assign free_count = f;

  logic         lv [N];
  logic [CWD-1:0] lw [N];

  bcast_tree #(.N(N), .W(CWD)) u_down (
    .clk, .rst_n, .in_valid(cmd_valid), .in_word(root_cmd), .out_valid(lv), .out_word(lw));

  // Processors.
  logic [KW-1:0] a   [N];
  logic [TW-1:0] b   [N];
  logic          hit [N];
  logic          ans_v;

  for (genvar l = 0; l < N; l++) begin : g_proc
    dcmd_t c;
    assign c = dcmd_t'(lw[l]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a[l]   <= '0;
        b[l]   <= TW'(l + 1);
        hit[l] <= 1'b0;
      end else begin
        hit[l] <= 1'b0;
        if (lv[l]) begin
          unique case (c.cmd)
            DCMD_MEMBER: hit[l] <= (b[l] == '0) && (a[l] == c.key);
            DCMD_INSERT: if (c.tag != '0 && b[l] == c.tag) begin
              a[l]   <= c.key;
              b[l]   <= '0;
              hit[l] <= 1'b1;
            end
            DCMD_DELETE: if (b[l] == '0 && a[l] == c.key) begin
              b[l]   <= c.tag;
              hit[l] <= 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ans_v <= 1'b0;
    else        ans_v <= lv[0];
  end

  merge_tree #(.N(N)) u_up (
    .clk, .rst_n, .in_valid(ans_v), .in_bit(hit), .out_valid(resp_valid), .out_bit(resp_hit));
endmodule

// systolic_linear_array: linear systolic priority queue, queue or stack.
//
// N lin_cell processors in a row with an IO pad at the left end.  The pad
// has an A and a B register and acts as the left neighbour of the first
// cell.  A phase bit alternates every clock: on phase 0 the pad and the
// even-numbered cells (2, 4, ..) act, on phase 1 the odd-numbered cells.
// On phase 0 the pad takes a command:
//   PUT  k : A := -inf, B := k   (INSERT / ENQUEUE / PUSH)
//   TAKE   : A := +inf, B := +inf (XMIN / DEQUEUE / POP)
//   NOP    : A := -inf, B := +inf
// On the following phase 1 the first cell moves the smallest key (queue:
// the oldest, stack: the newest) into the pad's A register, where it is
// presented on the next phase 0 together with out_valid.  So one command is
// taken every two clocks and a TAKE answers two clocks after it was
// accepted, however full the array is.  With more than N keys the array
// loses keys off its right end (the document provides no full signal);
// taking from an empty array returns out_empty.
//
// Interface: cmd_ready is high on phase 0; a command is accepted when
// cmd_valid and cmd_ready are both high.  out_valid / out_key / out_empty
// answer a TAKE.  Encodings and the ready/valid handshake are this
// design's choice; the cell programs and pad settings follow the document.
module systolic_linear_array
  import systolic_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned KW   = 16,
  parameter lin_mode_e   MODE = LIN_PQUEUE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  lin_cmd_e      cmd,
  input  logic [KW-1:0] cmd_key,
  output logic          cmd_ready,
  output logic          out_valid,
  output logic [KW-1:0] out_key,
  output logic          out_empty
);
  localparam logic [KW+1:0] POS_INF = {KIND_POS_INF, {KW{1'b0}}};
  localparam logic [KW+1:0] NEG_INF = {KIND_NEG_INF, {KW{1'b0}}};

  logic          phase;
  logic          take_pending;
  logic [KW+1:0] pad_a, pad_b;

  // Registers and write requests, index 0 is the pad, 1..N the cells.
  logic [KW+1:0] ra [N+1];
  logic [KW+1:0] rb [N+1];
  logic          ap_we [N+1];
  logic [KW+1:0] ap_wr [N+1];
  logic          bp_we [N+1];
  logic [KW+1:0] bp_wr [N+1];

  assign ra[0]    = pad_a;
  assign rb[0]    = pad_b;
  assign ap_we[0] = 1'b0;
  assign ap_wr[0] = POS_INF;
  assign bp_we[0] = 1'b0;
  assign bp_wr[0] = POS_INF;

  for (genvar c = 1; c <= N; c++) begin : g_cell
    logic          rt_a_we, rt_b_we;
    logic [KW+1:0] rt_a, rt_b;
    if (c < N) begin : g_mid
      assign rt_a_we = ap_we[c+1];
      assign rt_a    = ap_wr[c+1];
      assign rt_b_we = bp_we[c+1];
      assign rt_b    = bp_wr[c+1];
    end else begin : g_end
      assign rt_a_we = 1'b0;
      assign rt_a    = POS_INF;
      assign rt_b_we = 1'b0;
      assign rt_b    = POS_INF;
    end
    lin_cell #(.KW(KW), .MODE(MODE)) u_cell (
      .clk, .rst_n,
      .beat   (phase == 1'(c % 2)),
      .ap     (ra[c-1]),
      .bp     (rb[c-1]),
      .ap_we  (ap_we[c]),
      .ap_wr  (ap_wr[c]),
      .bp_we  (bp_we[c]),
      .bp_wr  (bp_wr[c]),
      .rt_a_we(rt_a_we),
      .rt_a   (rt_a),
      .rt_b_we(rt_b_we),
      .rt_b   (rt_b),
      .a      (ra[c]),
      .b      (rb[c])
    );
  end

  assign cmd_ready = (phase == 1'b0);
  assign out_valid = take_pending && (phase == 1'b0);
  assign out_key   = pad_a[KW-1:0];
  assign out_empty = pad_a[KW+1:KW] == KIND_POS_INF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= 1'b0;
      take_pending <= 1'b0;
      pad_a        <= NEG_INF;
      pad_b        <= POS_INF;
    end else begin
      phase <= ~phase;
      if (phase == 1'b0) begin
        take_pending <= 1'b0;
        pad_a        <= NEG_INF;
        pad_b        <= POS_INF;
        if (cmd_valid) begin
          unique case (cmd)
            CMD_PUT:  pad_b <= {KIND_KEY, cmd_key};
            CMD_TAKE: begin
              pad_a        <= POS_INF;
              take_pending <= 1'b1;
            end
            default: ;
          endcase
        end
      end else begin
        if (ap_we[1]) pad_a <= ap_wr[1];
        if (bp_we[1]) pad_b <= bp_wr[1];
      end
    end
  end
endmodule

// pattern_matcher: systolic string pattern matcher.
//
// Processor i holds pattern character a_i (written through load /
// load_pattern; a_1 is the leftmost processor).  The text b enters at the
// right end and moves one processor to the left per clock; the result
// signals s start as "true" at the left end (the pulser) and move one
// processor to the right per clock; processor i forms
// s_out := s_in AND (a_i == the text character it holds).  Because text and
// results move in opposite directions, consecutive text characters must be
// two processors apart: the text is entered at one character every two
// clocks, with an empty slot between characters.  Each result then meets
// the N most recent characters in order, and one clock after a character
// enters, match says whether the last N characters equal the pattern.
//
// Interface: a character is offered with text_valid and taken when
// text_ready is high (every second clock); match_valid marks the answer for
// the character taken the clock before.  When no character is offered on a
// text slot the whole array holds its state for that clock (a global
// enable), so the text may arrive with gaps.  Character width, the
// ready/valid pacing and the hold are this design's choice.
module pattern_matcher #(
  parameter int unsigned N  = 6,
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [CW-1:0] load_pattern [N],
  input  logic [CW-1:0] text_in,
  input  logic          text_valid,
  output logic          text_ready,
  output logic          match,
  output logic          match_valid
);
  logic [CW-1:0] a  [N];
  logic [CW-1:0] b  [N];
  logic          bv [N];
  logic          s  [N];
  logic          sv [N];
  logic          slot;
  logic          step;
  logic          took, answered;

  // The array advances except on a text slot for which no character is
  // offered: it then holds, so a gap in the text does not break the
  // spacing between characters.
  assign step = !slot || text_valid;

  // Text characters may only enter every second clock.
  assign text_ready = slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot     <= 1'b0;
      took     <= 1'b0;
      answered <= 1'b0;
      for (int i = 0; i < N; i++) begin
        a[i]  <= '0;
        b[i]  <= '0;
        bv[i] <= 1'b0;
        s[i]  <= 1'b0;
        sv[i] <= 1'b0;
      end
    end else begin
      if (step) slot <= ~slot;
      // A character taken on one clock is answered on the next, which is
      // never a held clock.
      took     <= slot && text_valid;
      answered <= took;
      for (int i = 0; i < N; i++) begin
        if (load) a[i] <= load_pattern[i];
      end
      if (step) for (int i = 0; i < N; i++) begin
        // text moves left
        if (i == N-1) begin
          b[i]  <= text_in;
          bv[i] <= slot;
        end else begin
          b[i]  <= b[i == N-1 ? i : i+1];
          bv[i] <= bv[i == N-1 ? i : i+1];
        end
        // results move right
        s[i]  <= (i == 0 ? 1'b1 : s[i == 0 ? 0 : i-1])  && bv[i] && (a[i] == b[i]);
        sv[i] <= (i == 0 ? 1'b1 : sv[i == 0 ? 0 : i-1]) && bv[i];
      end
    end
  end

  assign match       = s[N-1];
  assign match_valid = sv[N-1] && answered;
endmodule

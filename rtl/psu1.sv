// psu1: priority selection unit, first structure (eight adders).
//
// Chooses, of the four candidate words a[0..3], the one with the most
// symbols that are '0', '1' or 'W', i.e. the fewest unmatched 'X' symbols.
// For every word, counter 0, counter 1 and counter W count its zeros, ones and
// matched groups (twelve counts in all). Eight two-input adders form
// s[i] = zeros[i] + ones[i] and score[i] = s[i] + matched[i]. Three Max
// comparators reduce the scores, max(score0,score1) and max(score2,score3)
// first, and the selector outputs the word whose score equals the maximum.
// On a tie the lower-numbered word wins.
//
// The structure (counters, eight adders, three Max units, selector) follows
// the published PSU 1; the 32-bit default width of counts and sums follows the
// reported 32-bit adders and comparators. Combinational.
module psu1
  import pmatch_pkg::*;
#(
  parameter int unsigned NSYM  = 32,
  parameter int unsigned VAL_W = 32
) (
  input  sym_t [N_CAND-1:0][NSYM-1:0] a,
  output sym_t [NSYM-1:0]             y
);

  logic [N_CAND-1:0][VAL_W-1:0] zeros, ones, matched; // counter 0, 1, W
  logic [N_CAND-1:0][VAL_W-1:0] s;                    // first adder row
  logic [N_CAND-1:0][VAL_W-1:0] score;                // second adder row
  logic [VAL_W-1:0]             max01, max23, max_score;

  for (genvar i = 0; i < N_CAND; i++) begin : g_word
    sym_counter #(.NSYM(NSYM), .VAL_W(VAL_W), .KIND(SYM_0)) u_cnt0 (.word(a[i]), .count(zeros[i]));
    sym_counter #(.NSYM(NSYM), .VAL_W(VAL_W), .KIND(SYM_1)) u_cnt1 (.word(a[i]), .count(ones[i]));
    sym_counter #(.NSYM(NSYM), .VAL_W(VAL_W), .KIND(SYM_W)) u_cntw (.word(a[i]), .count(matched[i]));

    assign s[i]     = zeros[i] + ones[i];
    assign score[i] = s[i] + matched[i];
  end

  max_unit #(.VAL_W(VAL_W)) u_max01 (.a(score[0]), .b(score[1]), .y(max01));
  max_unit #(.VAL_W(VAL_W)) u_max23 (.a(score[2]), .b(score[3]), .y(max23));
  max_unit #(.VAL_W(VAL_W)) u_max   (.a(max01),    .b(max23),    .y(max_score));

  psu_selector #(.NSYM(NSYM), .VAL_W(VAL_W)) u_sel (
    .a(a), .score(score), .max_score(max_score), .y(y)
  );

endmodule

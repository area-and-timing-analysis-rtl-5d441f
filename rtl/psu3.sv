// psu3: priority selection unit, third structure (no adders).
//
// Since every candidate word has the same number of '0' and '1' symbols,
// adding them to each score cannot change which word scores highest. PSU 3
// therefore drops counter 0, counter 1 and all adders: the score of a word is
// just its number of 'W' (dictionary-matched) symbols. Three Max comparators
// and the selector pick the best word, the lower-numbered one on a tie, which
// gives exactly the same output as psu1 and psu2.
//
// The structure follows the published PSU 3. Combinational.
module psu3
  import pmatch_pkg::*;
#(
  parameter int unsigned NSYM  = 32,
  parameter int unsigned VAL_W = 32
) (
  input  sym_t [N_CAND-1:0][NSYM-1:0] a,
  output sym_t [NSYM-1:0]             y
);

  logic [N_CAND-1:0][VAL_W-1:0] score;   // counter W outputs
  logic [VAL_W-1:0]             max01, max23, max_score;

  for (genvar i = 0; i < N_CAND; i++) begin : g_word
    sym_counter #(.NSYM(NSYM), .VAL_W(VAL_W), .KIND(SYM_W)) u_cntw (.word(a[i]), .count(score[i]));
  end

  max_unit #(.VAL_W(VAL_W)) u_max01 (.a(score[0]), .b(score[1]), .y(max01));
  max_unit #(.VAL_W(VAL_W)) u_max23 (.a(score[2]), .b(score[3]), .y(max23));
  max_unit #(.VAL_W(VAL_W)) u_max   (.a(max01),    .b(max23),    .y(max_score));

  psu_selector #(.NSYM(NSYM), .VAL_W(VAL_W)) u_sel (
    .a(a), .score(score), .max_score(max_score), .y(y)
  );

endmodule

// psu2: priority selection unit, second structure (five adders).
//
// Same choice as psu1: the candidate word with the most '0', '1' and 'W'
// symbols, the lower-numbered word on a tie. The '0' and '1' symbols come only
// from all-zero and all-one groups of the input, which are the same whatever
// dictionary entry a candidate was built with, so zeros and ones are counted
// once, on candidate a[0]. One adder forms s = zeros + ones; four adders form
// score[i] = s + matched[i] from the four counter-W outputs. Three Max
// comparators and the selector follow, as in psu1.
//
// The structure follows the published PSU 2 (counter 0 and counter 1 fed by
// the first word, five adders). Combinational.
module psu2
  import pmatch_pkg::*;
#(
  parameter int unsigned NSYM  = 32,
  parameter int unsigned VAL_W = 32
) (
  input  sym_t [N_CAND-1:0][NSYM-1:0] a,
  output sym_t [NSYM-1:0]             y
);

  logic [VAL_W-1:0]             zeros, ones, s;
  logic [N_CAND-1:0][VAL_W-1:0] matched, score;
  logic [VAL_W-1:0]             max01, max23, max_score;

  sym_counter #(.NSYM(NSYM), .VAL_W(VAL_W), .KIND(SYM_0)) u_cnt0 (.word(a[0]), .count(zeros));
  sym_counter #(.NSYM(NSYM), .VAL_W(VAL_W), .KIND(SYM_1)) u_cnt1 (.word(a[0]), .count(ones));

  assign s = zeros + ones;

  for (genvar i = 0; i < N_CAND; i++) begin : g_word
    sym_counter #(.NSYM(NSYM), .VAL_W(VAL_W), .KIND(SYM_W)) u_cntw (.word(a[i]), .count(matched[i]));
    assign score[i] = s + matched[i];
  end

  max_unit #(.VAL_W(VAL_W)) u_max01 (.a(score[0]), .b(score[1]), .y(max01));
  max_unit #(.VAL_W(VAL_W)) u_max23 (.a(score[2]), .b(score[3]), .y(max23));
  max_unit #(.VAL_W(VAL_W)) u_max   (.a(max01),    .b(max23),    .y(max_score));

  psu_selector #(.NSYM(NSYM), .VAL_W(VAL_W)) u_sel (
    .a(a), .score(score), .max_score(max_score), .y(y)
  );

endmodule

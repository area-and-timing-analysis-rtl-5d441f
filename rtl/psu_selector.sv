// psu_selector: the "Selector" box of a priority selection unit.
//
// It receives the four candidate words a[0..3], their scores score[0..3] and
// the maximum score found by the Max tree. Three equality comparators test
// score[0], score[1] and score[2] against the maximum; the first candidate
// that matches is output, and candidate 3 is output when none of the first
// three does. Ties therefore go to the lowest-numbered candidate, the same
// rule the Max comparators apply. Combinational.
module psu_selector
  import pmatch_pkg::*;
#(
  parameter int unsigned NSYM  = 32,
  parameter int unsigned VAL_W = 32
) (
  input  sym_t [N_CAND-1:0][NSYM-1:0]  a,
  input  logic [N_CAND-1:0][VAL_W-1:0] score,
  input  logic [VAL_W-1:0]             max_score,
  output sym_t [NSYM-1:0]              y
);

  always_comb begin
    if      (score[0] == max_score) y = a[0];
    else if (score[1] == max_score) y = a[1];
    else if (score[2] == max_score) y = a[2];
    else                            y = a[3];
  end

endmodule

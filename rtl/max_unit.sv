// max_unit: the "Max" box of a priority selection unit.
//
// One less-than comparator picks the larger of two scores. When the scores
// are equal the first input, a, is passed on, so the lower-numbered candidate
// keeps priority through the comparator tree. Combinational.
module max_unit #(
  parameter int unsigned VAL_W = 32
) (
  input  logic [VAL_W-1:0] a,
  input  logic [VAL_W-1:0] b,
  output logic [VAL_W-1:0] y
);

  always_comb y = (a < b) ? b : a;

endmodule

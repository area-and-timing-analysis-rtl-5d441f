// sym_counter: counts the symbols of one kind in a candidate word.
//
// This is the "counter 0", "counter 1" or "counter W" of a priority selection
// unit, chosen by the KIND parameter. It is a plain population count over the
// NSYM symbols, combinational, with a VAL_W-bit result. VAL_W defaults to the
// 32-bit values of the reference implementation; only clog2(NSYM+1) bits can
// ever be non-zero.
module sym_counter
  import pmatch_pkg::*;
#(
  parameter int unsigned NSYM  = 32,
  parameter int unsigned VAL_W = 32,
  parameter sym_t        KIND  = SYM_W
) (
  input  sym_t [NSYM-1:0]  word,
  output logic [VAL_W-1:0] count
);

  always_comb begin
    count = '0;
    for (int i = 0; i < NSYM; i++)
      if (word[i] == KIND) count = count + 1'b1;
  end

endmodule

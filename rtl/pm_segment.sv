// pm_segment: one "pattern matching and dictionary" unit of the P-Match
// compressor.
//
// The SEG_W-bit segment is cut into four groups of SEG_W/4 bits, leftmost
// group first. For each of the four dictionary entries the unit emits four
// symbols, one per group: '0' for an all-zero group, '1' for an all-one group,
// and for any other group 'W' if it equals the corresponding group of that
// dictionary entry, 'X' otherwise. With SEG_W = 8 a group is a bit pair, as in
// the P-Match 2:1 scheme; SEG_W = 16 gives the 4-bit groups of the 4:1 scheme.
//
// Interface: seg in, code[k] out for dictionary entry k, code[k][3] being the
// symbol of the leftmost group. Purely combinational.
// The dictionary is a parameter (fixed at build time); whether it should be
// writable at run time is not specified and a fixed table is this design's
// choice.
module pm_segment
  import pmatch_pkg::*;
#(
  parameter int unsigned SEG_W = 8,
  parameter logic [N_CAND-1:0][SEG_W-1:0] DICT = DICT_2TO1
) (
  input  logic [SEG_W-1:0]                          seg,
  output sym_t [N_CAND-1:0][SYM_PER_SEG-1:0]        code
);

  localparam int unsigned G = SEG_W / SYM_PER_SEG;

  initial begin
    if (SEG_W % SYM_PER_SEG != 0 || G < 2)
      $error("pm_segment: SEG_W must be a multiple of 4 and at least 8");
  end

  always_comb begin
    for (int k = 0; k < N_CAND; k++) begin
      for (int p = 0; p < SYM_PER_SEG; p++) begin
        logic [G-1:0] grp, ref_grp;
        grp     = seg[p*G +: G];
        ref_grp = DICT[k][p*G +: G];
        if (grp == '0)           code[k][p] = SYM_0;
        else if (grp == '1)      code[k][p] = SYM_1;
        else if (grp == ref_grp) code[k][p] = SYM_W;
        else                     code[k][p] = SYM_X;
      end
    end
  end

endmodule

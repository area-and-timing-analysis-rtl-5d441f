// pattern_match: first pipeline stage logic of the P-Match compressor.
//
// The N_SEG*SEG_W-bit input word is split into N_SEG segments (leftmost
// segment = most significant bits). Every segment goes through its own
// pm_segment, all in parallel against the same four-entry dictionary. The four
// symbols a segment yields for dictionary entry k are concatenated, leftmost
// segment first, into candidate word W(k+1) = cand[k] of N_SEG*4 symbols.
//
// Defaults give the 2:1 configuration: eight 8-bit segments, 64 bits in,
// four candidates of 32 symbols. SEG_W = 16, N_SEG = 4 with DICT_4TO1 gives
// the 4:1 configuration: four 16-bit segments, four candidates of 16 symbols.
// Purely combinational; the compressor registers its outputs.
module pattern_match
  import pmatch_pkg::*;
#(
  parameter int unsigned SEG_W = 8,
  parameter int unsigned N_SEG = 8,
  parameter logic [N_CAND-1:0][SEG_W-1:0] DICT = DICT_2TO1,
  localparam int unsigned NSYM = N_SEG * SYM_PER_SEG
) (
  input  logic [N_SEG*SEG_W-1:0]     data,
  output sym_t [N_CAND-1:0][NSYM-1:0] cand
);

  for (genvar s = 0; s < N_SEG; s++) begin : g_seg
    sym_t [N_CAND-1:0][SYM_PER_SEG-1:0] code;

    pm_segment #(.SEG_W(SEG_W), .DICT(DICT)) u_seg (
      .seg  (data[s*SEG_W +: SEG_W]),
      .code (code)
    );

    for (genvar k = 0; k < N_CAND; k++) begin : g_k
      assign cand[k][s*SYM_PER_SEG +: SYM_PER_SEG] = code[k];
    end
  end

endmodule

// pmatch_compressor: two-stage pipelined P-Match compressor.
//
// Stage 1 (pattern_match) codes the input word against the four-entry
// dictionary and registers the four candidate words W1..W4. Stage 2 runs a
// priority selection unit over the registered candidates and registers the
// chosen word, the one with the most '0', '1' and 'W' symbols (fewest
// unmatched 'X'), the lower-numbered candidate on a tie.
//
// Configurations:
//   2:1 (defaults)  SEG_W = 8,  N_SEG = 8, DICT = DICT_2TO1: 64 bits in,
//                   32 symbols out.
//   4:1             SEG_W = 16, N_SEG = 4, DICT = DICT_4TO1: 64 bits in,
//                   16 symbols out.
// PSU_ARCH selects the PSU structure (1, 2 or 3); all three give the same
// output and differ only in hardware. The default is 3, the smallest and
// fastest of the three. A symbol occupies two bits (see pmatch_pkg).
//
// Timing: a word accepted with in_valid in cycle t appears on out_word with
// out_valid after the clock edge of cycle t+1 (two register stages, latency
// 2 cycles), and a new word can be accepted every cycle. There is no stall or
// back-pressure. rst_n is an asynchronous active-low reset of the two valid
// flags; the data registers are not reset. The register placement, the valid
// flags and the reset are this design's choices; the two pipeline stages and
// their contents follow the P-Match compressor.
module pmatch_compressor
  import pmatch_pkg::*;
#(
  parameter int unsigned SEG_W    = 8,
  parameter int unsigned N_SEG    = 8,
  parameter logic [N_CAND-1:0][SEG_W-1:0] DICT = DICT_2TO1,
  parameter int unsigned PSU_ARCH = PSU_CNTW,
  parameter int unsigned VAL_W    = 32,
  localparam int unsigned IN_W    = SEG_W * N_SEG,
  localparam int unsigned NSYM    = N_SEG * SYM_PER_SEG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   in_data,
  output logic              out_valid,
  output sym_t [NSYM-1:0]   out_word
);

  // ---------------- stage 1: pattern and dictionary matching -------------
  sym_t [N_CAND-1:0][NSYM-1:0] cand_d, cand_q;
  logic                        v1_q;

  pattern_match #(.SEG_W(SEG_W), .N_SEG(N_SEG), .DICT(DICT)) u_pm (
    .data (in_data),
    .cand (cand_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1_q <= 1'b0;
    else        v1_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) cand_q <= cand_d;
  end

  // ---------------- stage 2: priority selection ---------------------------
  sym_t [NSYM-1:0] sel_d;

  if (PSU_ARCH == PSU_ADD8) begin : g_psu1
    psu1 #(.NSYM(NSYM), .VAL_W(VAL_W)) u_psu (.a(cand_q), .y(sel_d));
  end else if (PSU_ARCH == PSU_ADD5) begin : g_psu2
    psu2 #(.NSYM(NSYM), .VAL_W(VAL_W)) u_psu (.a(cand_q), .y(sel_d));
  end else if (PSU_ARCH == PSU_CNTW) begin : g_psu3
    psu3 #(.NSYM(NSYM), .VAL_W(VAL_W)) u_psu (.a(cand_q), .y(sel_d));
  end else begin : g_bad
    $error("pmatch_compressor: PSU_ARCH must be 1, 2 or 3");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1_q;
  end

  always_ff @(posedge clk) begin
    if (v1_q) out_word <= sel_d;
  end

  // The chosen word is always one of the four candidates.
  a_sel_is_candidate: assert property (@(posedge clk) disable iff (!rst_n)
    v1_q |-> (sel_d == cand_q[0] || sel_d == cand_q[1] ||
              sel_d == cand_q[2] || sel_d == cand_q[3]));

endmodule

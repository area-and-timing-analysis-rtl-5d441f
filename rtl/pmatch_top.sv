// pmatch_top: the two P-Match compressor configurations side by side.
//
// c2_*: 2:1 compressor. A 64-bit word is coded in 2-bit groups against the
//       8-bit dictionary and compressed to 32 symbols.
// c4_*: 4:1 compressor. A 64-bit word is coded in 4-bit groups against the
//       16-bit dictionary and compressed to 16 symbols.
// Both share clk and rst_n (asynchronous, active low) and are otherwise
// independent: each accepts one word per cycle and returns its compressed
// word two cycles later with *_out_valid. A symbol occupies two bits, encoded
// as in pmatch_pkg (0 = 2'b00, W = 2'b01, X = 2'b10, 1 = 2'b11), leftmost
// symbol in the highest index. PSU_ARCH selects the priority selection unit
// structure (1, 2 or 3) of both compressors.
module pmatch_top
  import pmatch_pkg::*;
#(
  parameter int unsigned PSU_ARCH = PSU_CNTW
) (
  input  logic               clk,
  input  logic               rst_n,
  // 2:1 compressor
  input  logic               c2_in_valid,
  input  logic [LINE_W-1:0]  c2_in_data,
  output logic               c2_out_valid,
  output sym_t [31:0]        c2_out_word,
  // 4:1 compressor
  input  logic               c4_in_valid,
  input  logic [LINE_W-1:0]  c4_in_data,
  output logic               c4_out_valid,
  output sym_t [15:0]        c4_out_word
);

  pmatch_compressor #(
    .SEG_W(8), .N_SEG(8), .DICT(DICT_2TO1), .PSU_ARCH(PSU_ARCH)
  ) u_c2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c2_in_valid), .in_data(c2_in_data),
    .out_valid(c2_out_valid), .out_word(c2_out_word)
  );

  pmatch_compressor #(
    .SEG_W(16), .N_SEG(4), .DICT(DICT_4TO1), .PSU_ARCH(PSU_ARCH)
  ) u_c4 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c4_in_valid), .in_data(c4_in_data),
    .out_valid(c4_out_valid), .out_word(c4_out_word)
  );

endmodule

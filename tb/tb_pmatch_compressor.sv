// tb_pmatch_compressor: self-checking test of the two-stage compressor in
// both configurations and with all three PSU structures.
//  * 2:1 with PSU 1, 2 and 3 and 4:1 with PSU 1 and 3 receive the same
//    stream of 64-bit words, with idle cycles mixed in.
//  * Every output is compared with the text reference model and must appear
//    exactly two cycles after its input (the two pipeline stages); out_valid
//    must follow in_valid with the same two-cycle delay.
//  * Back-to-back words (one per cycle), idle cycles and a reset in the
//    middle of the stream are each required to occur.
//  * Fixed vectors: the worked 64-bit example and the 1100...1100 words.
`timescale 1ns/1ps
module tb_pmatch_compressor;
  import pmatch_pkg::*;
  import pmatch_ref_pkg::*;

  localparam int N_WORDS = 3000;

  int checks = 0, failures = 0;
  int back_to_back = 0, idles = 0, resets = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [63:0] in_data = '0;

  logic        v2a, v2b, v2c, v4a, v4c;
  sym_t [31:0] y2a, y2b, y2c;
  sym_t [15:0] y4a, y4c;

  always #5 clk = ~clk;

  pmatch_compressor #(.PSU_ARCH(1)) dut2a (.clk, .rst_n, .in_valid, .in_data, .out_valid(v2a), .out_word(y2a));
  pmatch_compressor #(.PSU_ARCH(2)) dut2b (.clk, .rst_n, .in_valid, .in_data, .out_valid(v2b), .out_word(y2b));
  pmatch_compressor                 dut2c (.clk, .rst_n, .in_valid, .in_data, .out_valid(v2c), .out_word(y2c));
  pmatch_compressor #(.SEG_W(16), .N_SEG(4), .DICT(DICT_4TO1), .PSU_ARCH(1))
                                    dut4a (.clk, .rst_n, .in_valid, .in_data, .out_valid(v4a), .out_word(y4a));
  pmatch_compressor #(.SEG_W(16), .N_SEG(4), .DICT(DICT_4TO1))
                                    dut4c (.clk, .rst_n, .in_valid, .in_data, .out_valid(v4c), .out_word(y4c));

  function automatic string ref_out(input logic [63:0] d, input bit four);
    string c[4];
    for (int k = 0; k < 4; k++)
      c[k] = four ? ref_cand(d, 16, 4, DICT_4TO1[k]) : ref_cand(d, 8, 8, {8'd0, DICT_2TO1[k]});
    return c[ref_pick(c[0], c[1], c[2], c[3])];
  endfunction

  task automatic expect_str(input string got, input string exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got, exp);
    end
  endtask

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (20 * N_WORDS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of what was driven, index = cycle
  logic        hv[$];
  logic [63:0] hd[$];
  logic        hr[$];   // reset asserted during that cycle

  initial begin
    logic [63:0] fixed[3];
    fixed[0] = 64'hD2F0_B0B0_F8B8_B4E1;
    fixed[1] = {16{4'b1100}};
    fixed[2] = 64'h0000_0000_FFFF_FFFF;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < N_WORDS + 2; cyc++) begin
      @(posedge clk);
      #1;
      // ---- check the word driven two cycles ago ----
      if (cyc >= 2) begin
        int i;
        logic exp_v;
        i = cyc - 2;
        exp_v = hv[i] && !(hr[i] || hr[i + 1]);
        expect_bit(v2a, exp_v, "2:1 psu1 valid");
        expect_bit(v2b, exp_v, "2:1 psu2 valid");
        expect_bit(v2c, exp_v, "2:1 psu3 valid");
        expect_bit(v4a, exp_v, "4:1 psu1 valid");
        expect_bit(v4c, exp_v, "4:1 psu3 valid");
        if (exp_v) begin
          string e2, e4;
          e2 = ref_out(hd[i], 0);
          e4 = ref_out(hd[i], 1);
          expect_str(sym_str(y2a, 32), e2, $sformatf("2:1 psu1 %016h", hd[i]));
          expect_str(sym_str(y2b, 32), e2, $sformatf("2:1 psu2 %016h", hd[i]));
          expect_str(sym_str(y2c, 32), e2, $sformatf("2:1 psu3 %016h", hd[i]));
          expect_str(sym_str({32'd0, y4a}, 16), e4, $sformatf("4:1 psu1 %016h", hd[i]));
          expect_str(sym_str({32'd0, y4c}, 16), e4, $sformatf("4:1 psu3 %016h", hd[i]));
          if (hd[i] == fixed[0]) expect_str(sym_str(y2c, 32), "1x0w1100w100w10011w0w1w0w1x01w0x", "worked example");
          if (hd[i] == fixed[1]) begin
            expect_str(sym_str(y2c, 32), "10101010101010101010101010101010", "2:1 1100 example");
            expect_str(sym_str({32'd0, y4c}, 16), "wxwxwxwxwxwxwxwx", "4:1 1100 example");
          end
        end
      end
      // ---- drive the next word ----
      rst_n = 1;
      if (cyc < 3) begin
        in_valid = 1;
        in_data  = fixed[cyc];
      end else if (cyc == N_WORDS / 2) begin
        rst_n = 0;            // asynchronous reset in mid-stream
        resets++;
        in_valid = 1;
        in_data  = {$urandom, $urandom};
      end else begin
        in_valid = ($urandom_range(3) != 0);
        case ($urandom_range(2))
          0: in_data = {$urandom, $urandom};
          1: in_data = {$urandom, $urandom} & {$urandom, $urandom};
          default: in_data = {$urandom, $urandom} | {$urandom, $urandom};
        endcase
      end
      if (cyc > 0 && in_valid && hv[cyc - 1]) back_to_back++;
      if (!in_valid) idles++;
      hv.push_back(in_valid);
      hd.push_back(in_data);
      hr.push_back(!rst_n);
    end

    checks++;
    if (back_to_back == 0 || idles == 0 || resets == 0) begin
      failures++;
      $display("FAIL coverage: back-to-back %0d idle %0d resets %0d", back_to_back, idles, resets);
    end
    $display("back-to-back %0d, idle cycles %0d, resets %0d", back_to_back, idles, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

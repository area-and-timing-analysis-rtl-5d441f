// tb_pattern_match: self-checking test of the first-stage pattern matcher.
//  * 2:1: the 64-bit worked example 0xD2F0B0B0F8B8B4E1 must give candidate W2
//    = "1x0w1100w100w10011w0w1w0w1x01w0x"; the word 1100...1100 must give
//    "1010" x 8 for every candidate.
//  * 4:1: the word 1100...1100 must give "wxwx..." for W1.
//  * 1000 random words per configuration against the text reference model.
`timescale 1ns/1ps
module tb_pattern_match;
  import pmatch_pkg::*;
  import pmatch_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [63:0] d2, d4;
  sym_t [N_CAND-1:0][31:0] c2;
  sym_t [N_CAND-1:0][15:0] c4;

  pattern_match dut2 (.data(d2), .cand(c2));
  pattern_match #(.SEG_W(16), .N_SEG(4), .DICT(DICT_4TO1)) dut4 (.data(d4), .cand(c4));

  task automatic expect_str(input string got, input string exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got, exp);
    end
  endtask

  function automatic logic [63:0] rand_word(input int seg_w, input logic [N_CAND-1:0][15:0] dict);
    logic [63:0] w;
    int g = seg_w / 4;
    for (int p = 0; p < 64 / g; p++) begin
      logic [3:0] grp;
      case ($urandom_range(3))
        0: grp = '0;
        1: grp = '1;
        2: grp = 4'(dict[$urandom_range(3)] >> ((p % 4) * g));
        default: grp = 4'($urandom);
      endcase
      for (int j = 0; j < g; j++) w[p*g + j] = grp[j];
    end
    return w;
  endfunction

  initial begin
    repeat (100000) #10;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_CAND-1:0][15:0] dict8;
    for (int k = 0; k < 4; k++) dict8[k] = {8'd0, DICT_2TO1[k]};

    d2 = 64'hD2F0_B0B0_F8B8_B4E1;
    d4 = {16{4'b1100}};
    #1;
    expect_str(sym_str(c2[1], 32), "1x0w1100w100w10011w0w1w0w1x01w0x", "worked example W2");
    expect_str(sym_str(c4[0], 16), "wxwxwxwxwxwxwxwx", "4:1 example W1");
    d2 = {16{4'b1100}};
    #1;
    for (int k = 0; k < 4; k++)
      expect_str(sym_str(c2[k], 32), "10101010101010101010101010101010", $sformatf("2:1 example W%0d", k + 1));

    for (int t = 0; t < 1000; t++) begin
      d2 = (t % 2) ? {$urandom, $urandom} : rand_word(8, dict8);
      d4 = (t % 2) ? {$urandom, $urandom} : rand_word(16, DICT_4TO1);
      #1;
      for (int k = 0; k < 4; k++) begin
        expect_str(sym_str(c2[k], 32), ref_cand(d2, 8, 8, dict8[k]), $sformatf("2:1 %016h W%0d", d2, k + 1));
        expect_str(sym_str({32'd0, c4[k]}, 16), ref_cand(d4, 16, 4, DICT_4TO1[k]), $sformatf("4:1 %016h W%0d", d4, k + 1));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

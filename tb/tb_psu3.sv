// tb_psu3: self-checking test of priority selection unit 3.
//  * The published 4-symbol case: candidates 10XW, 10XX, 10WW, 10WX must
//    select 10WW, with counter-W scores 1, 0, 2, 1, Max outputs 1 and 2
//    and overall maximum 2.
//  * 5000 candidate sets made by coding random 64-bit words against the 2:1
//    dictionary (32 symbols), checked against the text reference model.
//    Unrelated random words are not used: this structure scores only 'W'
//    symbols, which equals the full score only when all candidates share
//    their '0' and '1' symbols, as coded words do.
// Ties and every winning position are counted; each must occur.
`timescale 1ns/1ps
module tb_psu3;
  import pmatch_pkg::*;
  import pmatch_ref_pkg::*;

  int checks = 0, failures = 0, ties = 0;
  int won[4] = '{0, 0, 0, 0};

  sym_t [3:0][3:0]  af;
  sym_t [3:0]       yf;
  sym_t [3:0][31:0] a;
  sym_t [31:0]      y;

  psu3 #(.NSYM(4)) dut_f (.a(af), .y(yf));
  psu3             dut   (.a(a),  .y(y));

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply four candidate texts to the 32-symbol instance and check the pick.
  task automatic check_set(input string c[4], input bit arbitrary);
    int best, nbest = 0;
    for (int k = 0; k < 4; k++) a[k] = str_bits(c[k]);
    #1;
    best = ref_pick(c[0], c[1], c[2], c[3]);
    for (int k = 0; k < 4; k++) if (ref_score(c[k]) == ref_score(c[best])) nbest++;
    if (nbest > 1) ties++;
    won[best]++;
    checks++;
    if (sym_str(y, 32) != c[best]) begin
      failures++;
      $display("FAIL %s set: got %s expected %s", arbitrary ? "random" : "coded", sym_str(y, 32), c[best]);
    end
  endtask

  initial begin
    repeat (100000) #10;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string c[4];
    logic [63:0] d;

    af = {str_bits("10wx")[7:0], str_bits("10ww")[7:0], str_bits("10xx")[7:0], str_bits("10xw")[7:0]};
    #1;
    checks++;
    if (sym_str({56'd0, yf}, 4) != "10ww") begin
      failures++;
      $display("FAIL published case: got %s", sym_str({56'd0, yf}, 4));
    end
    expect_int(int'(dut_f.score[0]), 1, "score0");
    expect_int(int'(dut_f.score[1]), 0, "score1");
    expect_int(int'(dut_f.score[2]), 2, "score2");
    expect_int(int'(dut_f.score[3]), 1, "score3");
    expect_int(int'(dut_f.max01), 1, "max01");
    expect_int(int'(dut_f.max23), 2, "max23");
    expect_int(int'(dut_f.max_score), 2, "max");

    for (int t = 0; t < 5000; t++) begin
      d = {$urandom, $urandom};
      for (int k = 0; k < 4; k++) c[k] = ref_cand(d, 8, 8, {8'd0, DICT_2TO1[k]});
      check_set(c, 0);
    end

    checks++;
    if (ties == 0 || won[0] == 0 || won[1] == 0 || won[2] == 0 || won[3] == 0) begin
      failures++;
      $display("FAIL coverage: ties %0d wins %0d %0d %0d %0d", ties, won[0], won[1], won[2], won[3]);
    end
    $display("ties %0d, wins per candidate %0d %0d %0d %0d", ties, won[0], won[1], won[2], won[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

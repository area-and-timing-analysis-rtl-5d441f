// tb_psu_selector: self-checking test of the PSU selector: the word whose
// score equals the maximum is output, the lowest-numbered one when several
// do. Random scores in 0..4 make ties frequent.
`timescale 1ns/1ps
module tb_psu_selector;
  import pmatch_pkg::*;

  int checks = 0, failures = 0, ties = 0;
  sym_t [3:0][31:0] a;
  logic [3:0][31:0] score;
  logic [31:0]      mx;
  sym_t [31:0]      y;

  psu_selector dut (.a(a), .score(score), .max_score(mx), .y(y));

  initial begin
    repeat (100000) #10;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int best, nbest;
      for (int k = 0; k < 4; k++) begin
        a[k] = {$urandom, $urandom};
        score[k] = $urandom_range(4);
      end
      mx = 0;
      for (int k = 0; k < 4; k++) if (score[k] > mx) mx = score[k];
      best = -1; nbest = 0;
      for (int k = 0; k < 4; k++) if (score[k] == mx) begin
        nbest++;
        if (best < 0) best = k;
      end
      if (nbest > 1) ties++;
      #1;
      checks++;
      if (y !== a[best]) begin
        failures++;
        $display("FAIL scores %0d %0d %0d %0d: expected word %0d", score[0], score[1], score[2], score[3], best);
      end
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no tie was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

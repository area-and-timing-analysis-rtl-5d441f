// tb_sym_counter: self-checking test of the symbol counters (counter 0,
// counter 1, counter W) on 32-symbol words: all-zero, all-one, all-W and
// all-X words, then 2000 random words against a text count.
`timescale 1ns/1ps
module tb_sym_counter;
  import pmatch_pkg::*;
  import pmatch_ref_pkg::*;

  int checks = 0, failures = 0;
  sym_t [31:0] word;
  logic [31:0] n0, n1, nw;

  sym_counter #(.KIND(SYM_0)) dut0 (.word(word), .count(n0));
  sym_counter #(.KIND(SYM_1)) dut1 (.word(word), .count(n1));
  sym_counter                 dutw (.word(word), .count(nw));

  task automatic check_word();
    string s = sym_str(word, 32);
    #1;
    checks += 3;
    if (n0 != 32'(count_char(s, "0")) || n1 != 32'(count_char(s, "1")) || nw != 32'(count_char(s, "w"))) begin
      failures++;
      $display("FAIL %s: zeros %0d ones %0d matched %0d", s, n0, n1, nw);
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
    word = str_bits("00000000000000000000000000000000"); check_word();
    word = str_bits("11111111111111111111111111111111"); check_word();
    word = str_bits("wwwwwwwwwwwwwwwwwwwwwwwwwwwwwwww"); check_word();
    word = str_bits("xxxxxxxxxxxxxxxxxxxxxxxxxxxxxxxx"); check_word();
    // explicit: 3 zeros, 2 ones, 5 W
    word = str_bits("0w1xw0xxw1wxxxxxxxxxxxxxxxxxxxx0");
    #1;
    checks++;
    if (n0 != 3 || n1 != 2 || nw != 4) begin
      failures++;
      $display("FAIL fixed word: %0d %0d %0d", n0, n1, nw);
    end
    for (int t = 0; t < 2000; t++) begin
      word = {$urandom, $urandom};
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

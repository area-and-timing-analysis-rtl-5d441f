// tb_pmatch_top_psu1: end-to-end test of pmatch_top built with priority
// selection unit 1 (PSU_ARCH = 1); otherwise identical to tb_pmatch_top.
//
// The 2:1 and 4:1 compressors get independent streams of 64-bit words (idle
// cycles mixed in, a reset in mid-stream). Every compressed word is compared
// with the text reference model and must leave exactly two cycles after its
// word entered. The stream starts with the fixed vectors: the worked example
// 0xD2F0B0B0F8B8B4E1 (expected "1x0w1100w100w10011w0w1w0w1x01w0x") and
// 1100...1100 (expected "1010" x 8 from the 2:1 and "wx" x 8 from the 4:1
// compressor).
//
// Mechanisms counted, each required at least once per compressor: output
// symbols '0', '1', 'W' and 'X'; each of the four candidates winning; a tie
// for the best score resolved to the lower-numbered candidate; back-to-back
// words; idle cycles; a reset that drops words in flight.
`timescale 1ns/1ps
module tb_pmatch_top_psu1;
  import pmatch_pkg::*;
  import pmatch_ref_pkg::*;

  localparam int N_CYC = 4000;

  int checks = 0, failures = 0;
  int n_sym0[2], n_sym1[2], n_symw[2], n_symx[2], n_tie[2], n_b2b[2], n_idle[2];
  int n_won[2][4];
  int n_reset = 0;

  logic clk = 0, rst_n = 0;
  logic        iv[2];
  logic [63:0] id[2];
  logic        ov[2];
  logic        c2_out_valid, c4_out_valid;
  sym_t [31:0] c2_out_word;
  sym_t [15:0] c4_out_word;

  always #5 clk = ~clk;

  pmatch_top #(.PSU_ARCH(1)) dut (
    .clk, .rst_n,
    .c2_in_valid(iv[0]), .c2_in_data(id[0]), .c2_out_valid, .c2_out_word,
    .c4_in_valid(iv[1]), .c4_in_data(id[1]), .c4_out_valid, .c4_out_word
  );

  assign ov[0] = c2_out_valid;
  assign ov[1] = c4_out_valid;

  // Reference: candidate texts, pick, and the tie flag.
  function automatic string ref_out(input logic [63:0] d, input int ch, output int pick, output bit tie);
    string c[4];
    int n = 0;
    for (int k = 0; k < 4; k++)
      c[k] = ch ? ref_cand(d, 16, 4, DICT_4TO1[k]) : ref_cand(d, 8, 8, {8'd0, DICT_2TO1[k]});
    pick = ref_pick(c[0], c[1], c[2], c[3]);
    for (int k = 0; k < 4; k++) if (ref_score(c[k]) == ref_score(c[pick])) n++;
    tie = (n > 1);
    return c[pick];
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (N_CYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        hv[2][$];
  logic [63:0] hd[2][$];
  logic        hr[$];

  initial begin
    logic [63:0] fixed[2];
    fixed[0] = 64'hD2F0_B0B0_F8B8_B4E1;
    fixed[1] = {16{4'b1100}};
    for (int ch = 0; ch < 2; ch++) begin
      iv[ch] = 0; id[ch] = '0;
      n_sym0[ch] = 0; n_sym1[ch] = 0; n_symw[ch] = 0; n_symx[ch] = 0;
      n_tie[ch] = 0; n_b2b[ch] = 0; n_idle[ch] = 0;
      for (int k = 0; k < 4; k++) n_won[ch][k] = 0;
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < N_CYC; cyc++) begin
      @(posedge clk);
      #1;
      if (cyc >= 2) begin
        int i;
        i = cyc - 2;
        for (int ch = 0; ch < 2; ch++) begin
          logic exp_v;
          exp_v = hv[ch][i] && !(hr[i] || hr[i + 1]);
          checks++;
          if (ov[ch] !== exp_v) fail($sformatf("ch%0d cycle %0d valid %b expected %b", ch, cyc, ov[ch], exp_v));
          if (exp_v) begin
            string e, got;
            int pick;
            bit tie;
            e = ref_out(hd[ch][i], ch, pick, tie);
            got = ch ? sym_str({32'd0, c4_out_word}, 16) : sym_str(c2_out_word, 32);
            checks++;
            if (got != e) fail($sformatf("ch%0d %016h: got %s expected %s", ch, hd[ch][i], got, e));
            n_won[ch][pick]++;
            if (tie) n_tie[ch]++;
            n_sym0[ch] += count_char(got, "0");
            n_sym1[ch] += count_char(got, "1");
            n_symw[ch] += count_char(got, "w");
            n_symx[ch] += count_char(got, "x");
            if (hd[ch][i] == fixed[0] && ch == 0) begin
              checks++;
              if (got != "1x0w1100w100w10011w0w1w0w1x01w0x") fail("worked example");
            end
            if (hd[ch][i] == fixed[1]) begin
              checks++;
              if (got != (ch ? "wxwxwxwxwxwxwxwx" : "10101010101010101010101010101010")) fail("1100 example");
            end
          end
        end
      end
      rst_n = 1;
      if (cyc == N_CYC / 2) begin
        rst_n = 0;
        n_reset++;
      end
      for (int ch = 0; ch < 2; ch++) begin
        if (cyc < 2) begin
          iv[ch] = 1;
          id[ch] = fixed[cyc];
        end else begin
          iv[ch] = ($urandom_range(4) != 0);
          case ($urandom_range(3))
            0: id[ch] = {$urandom, $urandom};
            1: id[ch] = {$urandom, $urandom} & {$urandom, $urandom};
            2: id[ch] = {$urandom, $urandom} | {$urandom, $urandom};
            default: begin
              // groups copied from a random dictionary entry
              logic [15:0] e;
              e = ch ? DICT_4TO1[$urandom_range(3)] : {2{DICT_2TO1[$urandom_range(3)]}};
              id[ch] = {4{e}} ^ ({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});
            end
          endcase
        end
        if (cyc > 0 && iv[ch] && hv[ch][cyc - 1]) n_b2b[ch]++;
        if (!iv[ch]) n_idle[ch]++;
        hv[ch].push_back(iv[ch]);
        hd[ch].push_back(id[ch]);
      end
      hr.push_back(!rst_n);
    end

    for (int ch = 0; ch < 2; ch++) begin
      $display("%s: symbols 0=%0d 1=%0d W=%0d X=%0d, wins %0d/%0d/%0d/%0d, ties %0d, back-to-back %0d, idle %0d",
               ch ? "4:1" : "2:1", n_sym0[ch], n_sym1[ch], n_symw[ch], n_symx[ch],
               n_won[ch][0], n_won[ch][1], n_won[ch][2], n_won[ch][3], n_tie[ch], n_b2b[ch], n_idle[ch]);
      checks++;
      if (n_sym0[ch] == 0 || n_sym1[ch] == 0 || n_symw[ch] == 0 || n_symx[ch] == 0 ||
          n_won[ch][0] == 0 || n_won[ch][1] == 0 || n_won[ch][2] == 0 || n_won[ch][3] == 0 ||
          n_tie[ch] == 0 || n_b2b[ch] == 0 || n_idle[ch] == 0)
        fail($sformatf("ch%0d: a mechanism never occurred", ch));
    end
    checks++;
    if (n_reset == 0) fail("no reset in mid-stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

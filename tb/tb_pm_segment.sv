// tb_pm_segment: self-checking test of one pattern-matching-and-dictionary
// unit.
//  * The three coding examples printed for the 8-bit dictionary
//    (inputs 10011100, 10011001, 11001001) with their twelve expected codes.
//  * The worked example with dictionary 11000110, 11010010, 11100000,
//    10101010 and input 11001001, expected 10xx, 10xx, 10xx, 10wx.
//  * All 256 inputs against the text reference model, and 2000 random
//    16-bit segments against the 4:1 dictionary.
`timescale 1ns/1ps
module tb_pm_segment;
  import pmatch_pkg::*;
  import pmatch_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  seg_a, seg_b;
  logic [15:0] seg_c;
  sym_t [N_CAND-1:0][3:0] code_a, code_b, code_c;

  localparam logic [N_CAND-1:0][7:0] DICT_B = {8'b10101010, 8'b11100000, 8'b11010010, 8'b11000110};

  pm_segment #(.SEG_W(8))                          dut_a (.seg(seg_a), .code(code_a));
  pm_segment #(.SEG_W(8),  .DICT(DICT_B))          dut_b (.seg(seg_b), .code(code_b));
  pm_segment #(.SEG_W(16), .DICT(DICT_4TO1))       dut_c (.seg(seg_c), .code(code_c));

  task automatic expect_str(input string got, input string exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got, exp);
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
    string fig[3][4];
    logic [7:0] fig_in[3];
    fig_in[0] = 8'b10011100; fig[0] = '{"wx10", "wx10", "xw10", "xw10"};
    fig_in[1] = 8'b10011001; fig[1] = '{"wxxw", "wxwx", "xwwx", "xwxw"};
    fig_in[2] = 8'b11001001; fig[2] = '{"10xw", "10wx", "10wx", "10xw"};
    for (int t = 0; t < 3; t++) begin
      seg_a = fig_in[t];
      #1;
      for (int k = 0; k < 4; k++)
        expect_str(sym_str({56'd0, code_a[k]}, 4), fig[t][k], $sformatf("example %0d entry %0d", t, k));
    end

    seg_b = 8'b11001001;
    #1;
    expect_str(sym_str({56'd0, code_b[0]}, 4), "10xx", "text example entry 0");
    expect_str(sym_str({56'd0, code_b[1]}, 4), "10xx", "text example entry 1");
    expect_str(sym_str({56'd0, code_b[2]}, 4), "10xx", "text example entry 2");
    expect_str(sym_str({56'd0, code_b[3]}, 4), "10wx", "text example entry 3");

    for (int v = 0; v < 256; v++) begin
      seg_a = 8'(v);
      #1;
      for (int k = 0; k < 4; k++)
        expect_str(sym_str({56'd0, code_a[k]}, 4), ref_cand({56'd0, seg_a}, 8, 1, {8'd0, DICT_2TO1[k]}),
                   $sformatf("exhaustive %02h entry %0d", v, k));
    end

    for (int t = 0; t < 2000; t++) begin
      // mix random groups with all-zero/all-one/dictionary nibbles
      for (int p = 0; p < 4; p++) begin
        case ($urandom_range(3))
          0: seg_c[p*4 +: 4] = 4'h0;
          1: seg_c[p*4 +: 4] = 4'hF;
          2: seg_c[p*4 +: 4] = DICT_4TO1[$urandom_range(3)][p*4 +: 4];
          default: seg_c[p*4 +: 4] = 4'($urandom);
        endcase
      end
      #1;
      for (int k = 0; k < 4; k++)
        expect_str(sym_str({56'd0, code_c[k]}, 4), ref_cand({48'd0, seg_c}, 16, 1, DICT_4TO1[k]),
                   $sformatf("16-bit %04h entry %0d", seg_c, k));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

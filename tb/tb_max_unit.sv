// tb_max_unit: self-checking test of the Max comparator: boundary values,
// equal inputs and 5000 random pairs, small and full-width.
`timescale 1ns/1ps
module tb_max_unit;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;

  max_unit dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [31:0] exp;
    a = ta; b = tb_;
    #1;
    exp = (ta >= tb_) ? ta : tb_;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL max(%0d,%0d) = %0d", ta, tb_, y);
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
    check(0, 0); check(0, 1); check(1, 0); check(3, 4); check(4, 3); check(4, 4);
    check(32'hFFFF_FFFF, 0); check(0, 32'hFFFF_FFFF); check(32'h8000_0000, 32'h7FFF_FFFF);
    for (int t = 0; t < 5000; t++) begin
      if (t % 2) check($urandom, $urandom);
      else       check($urandom_range(32), $urandom_range(32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

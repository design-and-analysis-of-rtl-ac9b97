// tb_barrel_right_rotator: exhaustive self-check of the 4-bit right rotator.
//
// For all 16 operands and all four control words, the result is compared
// with a rotate-right computed by shift operators, and bit by bit with the
// rotator's truth table (row = control word, entry = index of the operand bit
// seen on y3, y2, y1, y0). Combinational: each vector is checked 1 ns after
// it is applied. A watchdog ends the run with a failure after 10 us.
module tb_barrel_right_rotator;
  import shifter_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  word_t a, y;
  sel_t  s;
  int    checks   = 0;
  int    failures = 0;

  localparam int TABLE [4][4] = '{
    '{3, 2, 1, 0},   // s = 00
    '{0, 3, 2, 1},   // s = 01
    '{1, 0, 3, 2},   // s = 10
    '{2, 1, 0, 3}    // s = 11
  };

  barrel_right_rotator dut (.a(a), .s(s), .y(y));

  function automatic word_t rotr(word_t v, int n);
    return word_t'((v >> n) | (v << (4 - n)));
  endfunction

  initial begin
    for (int v = 0; v < 64; v++) begin
      {s, a} = 6'(v);
      #1;
      checks++;
      if (y !== rotr(a, int'(s))) begin
        failures++;
        $display("FAIL rotr s=%b a=%b y=%b", s, a, y);
      end
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (y[3-b] !== a[TABLE[s][b]]) begin
          failures++;
          $display("FAIL table s=%b a=%b y%0d=%b", s, a, 3-b, y[3-b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog: run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_barrel_bidir_shifter: exhaustive self-check of the bidirectional shifter.
//
// For all 16 operands and all four control words the result is compared
// with a reference computed by the shift operators: s1 = 0 passes the
// operand, {1,0} is a logical left shift by one, {1,1} a logical right shift
// by one, both zero-filling. The zero-filled end bit is also checked on its
// own. Combinational: each vector is checked 1 ns after it is applied. A
// watchdog ends the run with a failure after 10 us.
module tb_barrel_bidir_shifter;
  import shifter_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  word_t a, y, exp_y;
  sel_t  s;
  int    checks   = 0;
  int    failures = 0;

  barrel_bidir_shifter dut (.a(a), .s(s), .y(y));

  initial begin
    for (int v = 0; v < 64; v++) begin
      {s, a} = 6'(v);
      #1;
      if (!s[1])         exp_y = a;
      else if (!s[0])    exp_y = a << 1;
      else               exp_y = a >> 1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL s=%b a=%b y=%b expected %b", s, a, y, exp_y);
      end
      if (s == 2'b10) begin
        checks++;
        if (y[0] !== 1'b0) begin
          failures++;
          $display("FAIL left shift did not fill y0 with 0, a=%b", a);
        end
      end
      if (s == 2'b11) begin
        checks++;
        if (y[3] !== 1'b0) begin
          failures++;
          $display("FAIL right shift did not fill y3 with 0, a=%b", a);
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

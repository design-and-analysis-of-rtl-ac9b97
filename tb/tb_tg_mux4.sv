// tb_tg_mux4: exhaustive self-check of the 4x1 mux built from three 2x1 cells.
//
// Applies all 64 combinations of the four data inputs and the select pair
// {s1,s0} and checks that y equals data input number {s1,s0}. Combinational:
// each vector is checked 1 ns after it is applied. A watchdog ends the run
// with a failure if it has not finished by 10 us.
module tb_tg_mux4;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] d;
  logic [1:0] s;
  logic       y;
  int         checks   = 0;
  int         failures = 0;

  tg_mux4 dut (
    .i0(d[0]), .i1(d[1]), .i2(d[2]), .i3(d[3]),
    .s1(s[1]), .s0(s[0]), .y(y)
  );

  initial begin
    for (int v = 0; v < 64; v++) begin
      {s, d} = 6'(v);
      #1;
      checks++;
      if (y !== d[s]) begin
        failures++;
        $display("FAIL s=%b d=%b y=%b", s, d, y);
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

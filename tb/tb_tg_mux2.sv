// tb_tg_mux2: exhaustive self-check of the 2x1 transmission-gate mux.
//
// Applies all eight combinations of (i0, i1, sel) and compares y with the
// selection rule y = sel ? i1 : i0, worked out here from the inputs. The mux
// is combinational, so each vector is checked 1 ns after it is applied. A
// watchdog ends the run with a failure if it has not finished by 1 us.
module tb_tg_mux2;
  timeunit 1ns; timeprecision 1ps;

  logic i0, i1, sel, y;
  int   checks   = 0;
  int   failures = 0;

  tg_mux2 dut (.i0(i0), .i1(i1), .sel(sel), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, i1, i0} = 3'(v);
      #1;
      checks++;
      if (y !== (sel ? i1 : i0)) begin
        failures++;
        $display("FAIL sel=%b i1=%b i0=%b y=%b", sel, i1, i0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog: run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

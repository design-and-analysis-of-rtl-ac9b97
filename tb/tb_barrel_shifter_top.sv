// tb_barrel_shifter_top: end-to-end check of the three barrel shifters.
//
// Phase 1 replays the pulse stimulus used to characterise the circuits:
// every input is a square wave, low for one pulse width and high for the
// next, with pulse widths a0 = 10 ns, a1 = 20 ns, a2 = 30 ns, a3 = 40 ns,
// s0 = 50 ns and s1 = 60 ns (period twice the pulse width). The same
// waveforms drive all three shifters. Over one common period (1200 ns) the
// outputs are sampled 5 ns into every 10 ns slot, away from the edges, which
// fall on multiples of 10 ns.
//
// Phase 2 sweeps every operand and control word through each shifter, with
// each shifter given a different operand at the same time so that crossed
// wiring between them would show.
//
// Results are compared with references computed here by shift operators.
// The shifters are combinational, so the check also confirms the result is
// there 1 ns after the inputs change (no clock, no extra cycle). Each
// mechanism of the design is counted and must occur at least once: a
// rotation whose wrapped bit is a 1 (in each direction), the pass-through
// code of each shifter, both no-shift codes of the bidirectional shifter,
// and a logical shift that drops a 1 off the end and zero-fills the other.
// A watchdog ends the run with a failure after 100 us.
module tb_barrel_shifter_top;
  import shifter_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  word_t a, lrot_y, rrot_y, bidir_y;
  sel_t  s;
  word_t lrot_a, rrot_a, bidir_a;
  sel_t  lrot_s, rrot_s, bidir_s;
  bit    sweep;        // 0: pulse stimulus drives all shifters, 1: sweep
  word_t sw_a[3];
  sel_t  sw_s[3];
  int    checks   = 0;
  int    failures = 0;

  // Mechanism counters.
  int n_lrot_wrap = 0, n_rrot_wrap = 0;
  int n_lrot_pass = 0, n_rrot_pass = 0;
  int n_bidir_pass00 = 0, n_bidir_pass01 = 0;
  int n_lsl_drop = 0, n_lsr_drop = 0;

  always_comb begin
    lrot_a  = sweep ? sw_a[0] : a;   lrot_s  = sweep ? sw_s[0] : s;
    rrot_a  = sweep ? sw_a[1] : a;   rrot_s  = sweep ? sw_s[1] : s;
    bidir_a = sweep ? sw_a[2] : a;   bidir_s = sweep ? sw_s[2] : s;
  end

  barrel_shifter_top dut (
    .lrot_a (lrot_a),  .lrot_s (lrot_s),  .lrot_y (lrot_y),
    .rrot_a (rrot_a),  .rrot_s (rrot_s),  .rrot_y (rrot_y),
    .bidir_a(bidir_a), .bidir_s(bidir_s), .bidir_y(bidir_y)
  );

  // ---- pulse sources -------------------------------------------------
  initial begin
    a = '0; s = '0;
  end
  always #10 a[0] = ~a[0];
  always #20 a[1] = ~a[1];
  always #30 a[2] = ~a[2];
  always #40 a[3] = ~a[3];
  always #50 s[0] = ~s[0];
  always #60 s[1] = ~s[1];

  // ---- references ----------------------------------------------------
  function automatic word_t ref_rotl(word_t v, sel_t n);
    return word_t'((v << n) | (v >> (3'd4 - 3'(n))));
  endfunction
  function automatic word_t ref_rotr(word_t v, sel_t n);
    return word_t'((v >> n) | (v << (3'd4 - 3'(n))));
  endfunction
  function automatic word_t ref_bidir(word_t v, sel_t c);
    if (!c[1])     return v;
    else if (!c[0]) return word_t'(v << 1);
    else           return v >> 1;
  endfunction

  task automatic check_all();
    checks++;
    if (lrot_y !== ref_rotl(lrot_a, lrot_s)) begin
      failures++;
      $display("%0t FAIL left rotator a=%b s=%b y=%b", $time, lrot_a, lrot_s, lrot_y);
    end
    checks++;
    if (rrot_y !== ref_rotr(rrot_a, rrot_s)) begin
      failures++;
      $display("%0t FAIL right rotator a=%b s=%b y=%b", $time, rrot_a, rrot_s, rrot_y);
    end
    checks++;
    if (bidir_y !== ref_bidir(bidir_a, bidir_s)) begin
      failures++;
      $display("%0t FAIL bidirectional a=%b s=%b y=%b", $time, bidir_a, bidir_s, bidir_y);
    end
    // Mechanism coverage, judged from the inputs only.
    if (lrot_s == 2'd0) n_lrot_pass++;
    else if (|(lrot_a >> (3'd4 - 3'(lrot_s)))) n_lrot_wrap++;     // a 1 leaves y3 and re-enters at y0
    if (rrot_s == 2'd0) n_rrot_pass++;
    else if (|(rrot_a & 4'((1 << rrot_s) - 1))) n_rrot_wrap++;   // a 1 leaves y0 and re-enters at y3
    case (bidir_s)
      2'b00: n_bidir_pass00++;
      2'b01: n_bidir_pass01++;
      2'b10: if (bidir_a[3]) n_lsl_drop++;
      2'b11: if (bidir_a[0]) n_lsr_drop++;
    endcase
  endtask

  initial begin
    sweep = 1'b0;
    for (int k = 0; k < 3; k++) begin sw_a[k] = '0; sw_s[k] = '0; end
    // Phase 1: one common period of the pulse stimulus.
    #5;
    for (int slot = 0; slot < 120; slot++) begin
      check_all();
      #10;
    end
    // Phase 2: exhaustive sweep, a different operand on each shifter.
    sweep = 1'b1;
    for (int v = 0; v < 64; v++) begin
      sw_a[0] = word_t'(v);       sw_s[0] = sel_t'(v >> 4);
      sw_a[1] = word_t'(v + 5);   sw_s[1] = sel_t'((v >> 4) + 1);
      sw_a[2] = word_t'(v + 11);  sw_s[2] = sel_t'((v >> 4) + 2);
      #1;
      check_all();
    end

    if (n_lrot_wrap == 0)    begin failures++; $display("never seen: left rotation with wrap-around"); end
    if (n_rrot_wrap == 0)    begin failures++; $display("never seen: right rotation with wrap-around"); end
    if (n_lrot_pass == 0)    begin failures++; $display("never seen: left rotator pass-through"); end
    if (n_rrot_pass == 0)    begin failures++; $display("never seen: right rotator pass-through"); end
    if (n_bidir_pass00 == 0) begin failures++; $display("never seen: bidirectional no-shift code 00"); end
    if (n_bidir_pass01 == 0) begin failures++; $display("never seen: bidirectional no-shift code 01"); end
    if (n_lsl_drop == 0)     begin failures++; $display("never seen: logical left shift dropping a 1"); end
    if (n_lsr_drop == 0)     begin failures++; $display("never seen: logical right shift dropping a 1"); end
    $display("mechanisms: lrot_wrap=%0d rrot_wrap=%0d lrot_pass=%0d rrot_pass=%0d bidir_00=%0d bidir_01=%0d lsl_drop=%0d lsr_drop=%0d",
             n_lrot_wrap, n_rrot_wrap, n_lrot_pass, n_rrot_pass,
             n_bidir_pass00, n_bidir_pass01, n_lsl_drop, n_lsr_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

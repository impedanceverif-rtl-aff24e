// tb_freq_plan: checks the logarithmic frequency plan against an
// independent computation (exp/ln instead of pow): first and last points,
// every point within 1 Hz, tuning words within 1 LSB of f * 2^32 / F_CLK,
// strictly increasing frequencies and the sine/pulse split at 25 MHz.
module tb_freq_plan;
  import iv_pkg::*;
  int checks = 0, failures = 0;
  function automatic real rabs(input real x); return x < 0.0 ? -x : x; endfunction
  logic [FIDX_W-1:0] idx;
  fpoint_t p;
  freq_plan dut (.idx, .point(p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real f, tw, step;
    longint prev;
    int npulse;
    prev = 0; npulse = 0;
    step = $ln(588000000.0 / 100.0) / 151.0;
    for (int i = 0; i < 152; i++) begin
      idx = FIDX_W'(i);
      #1;
      f  = 100.0 * $exp(step * i);
      tw = f * 4294967296.0 / 100000000.0;
      check(rabs(real'(p.freq_hz) - f) <= 1.0, $sformatf("freq %0d: %0d vs %f", i, p.freq_hz, f));
      check(rabs(real'(p.ftw) - tw) <= 1.0 || (tw > 4294967295.0 && p.ftw == 32'hFFFF_FFFF),
            $sformatf("ftw %0d: %0d vs %f", i, p.ftw, tw));
      check(longint'(p.freq_hz) > prev, $sformatf("increasing at %0d", i));
      check(p.pulse == (f >= 25.0e6), $sformatf("pulse flag %0d", i));
      npulse += int'(p.pulse);
      prev = longint'(p.freq_hz);
    end
    check(prev == 588000000, "last point is 588 MHz");
    idx = 8'd0; #1;
    check(p.freq_hz == 100 && p.ftw == 4295, "first point 100 Hz, ftw 4295");
    idx = 8'd200; #1;
    check(p.freq_hz == 588000000, "index beyond the plan saturates");
    $display("pulse-mode points: %0d", npulse);
    check(npulse > 0 && npulse < 152, "both activation modes are used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sine_pulse_modulator: drives the modulator in sine mode with a known
// tuning word and compares the number of active rows each clock with
// round(ROWS/2 * (1 + sin(phase))) computed here from its own phase model;
// checks the thermometer coding, the one-clock lag, the period of the
// activation, pulse mode (all rows follow the pulse input) and that a
// disabled modulator draws nothing.
module tb_sine_pulse_modulator;
  localparam int ROWS = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, pulse_mode = 0, pulse_in = 0;
  logic [31:0] ftw = 0;
  logic [ROWS-1:0] act;

  sine_pulse_modulator #(.ROWS(ROWS), .LUT_BITS(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int expect_level(input longint unsigned ph);
    real s;
    s = real'(ROWS) / 2.0 * (1.0 + $sin(2.0 * 3.14159265358979 * real'(ph >> 24) / 256.0));
    return $rtoi(s + 0.5);
  endfunction

  initial begin
    longint unsigned ph;
    int lvl, sum, maxl, minl;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(act == '0, "idle: no active row");
    // sine mode, period 64 clocks
    ftw = 32'h0400_0000;
    @(negedge clk) en = 1;
    ph = 0; sum = 0; maxl = 0; minl = ROWS;
    @(posedge clk); // phase register starts advancing
    for (int n = 0; n < 256; n++) begin
      @(negedge clk);
      lvl = $countones(act);
      check(lvl == expect_level(ph), $sformatf("cycle %0d level %0d expected %0d", n, lvl, expect_level(ph)));
      check(act == ROWS'((65'(1) << lvl) - 1), "thermometer code");
      ph = (ph + 64'(ftw)) & 64'hFFFF_FFFF;
      if (n >= 64 && n < 128) sum += lvl;
      if (lvl > maxl) maxl = lvl;
      if (lvl < minl) minl = lvl;
    end
    check(sum >= 64 * 31 && sum <= 64 * 33, $sformatf("mean over one period %0d/64", sum));
    check(maxl == ROWS && minl == 0, "full swing");
    // pulse mode
    pulse_mode = 1;
    for (int n = 0; n < 20; n++) begin
      pulse_in = n[1];
      #1;
      check(act == {ROWS{pulse_in}}, "pulse mode follows pulse_in");
      @(negedge clk);
    end
    en = 0;
    pulse_in = 1; #1;
    check(act == '0, "pulse mode disabled");
    pulse_mode = 0;
    repeat (2) @(negedge clk);
    check(act == '0, "sine mode disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

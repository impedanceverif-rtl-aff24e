// tb_z_estimator: random and corner count pairs; the result must equal
// floor(|off - on| * 1000 / off) milliohm (1 V supply, 1 A current step),
// saturated at 16 bits, and arrive a fixed number of clocks after start.
module tb_z_estimator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [23:0] cnt_off, cnt_on;
  logic [15:0] z_mohm;

  z_estimator #(.CNT_W(24), .Z_W(16), .V_SUPPLY_MV(1000), .DELTA_I_MA(1000)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one(input int unsigned off, input int unsigned on);
    longint unsigned d, e;
    int lat;
    cnt_off = 24'(off); cnt_on = 24'(on);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    d = (off >= on) ? longint'(off - on) : longint'(on - off);
    e = (off == 0) ? 65535 : d * 1000 / longint'(off);
    if (e > 65535) e = 65535;
    check(z_mohm == 16'(e), $sformatf("off %0d on %0d: %0d expected %0d", off, on, z_mohm, e));
    check(lat == 24 + 10 + 3, $sformatf("latency %0d", lat));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(163840, 147456);   // 10 % drop -> 100 mOhm
    one(2560, 2559);
    one(2560, 2560);
    one(1000, 1200);
    one(0, 5);
    one(100, 16000000);    // saturates
    for (int i = 0; i < 200; i++) begin
      int unsigned off, on;
      off = ($urandom % 200000) + 1000;
      on  = off - ($urandom % (off / 5));
      one(off, on);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_default_point: the top at its default parameters (152 points, 105
// repetitions, 65,536-clock gate, 115,200 baud at 100 MHz) through the
// first frequency point of an enrollment scan. A whole scan at these
// settings is about 2e9 clocks, far too long to simulate; one point is
// 105 complete measurements and shows that the full-precision settings work.
//
// Board model: the core supply drops by Z * I, I proportional to the
// enabled rows (32 rows = 1 A), Z = 100 milliohm. During every "on" gate the
// testbench averages the supply it applies; since the ring-oscillator rate
// follows the supply, the expected estimate is that mean sag in mV
// (1 mV at 1 A = 1 milliohm). At 100 Hz the 655 us gate sees only the
// start of the sine period, so the mean current is above 1 A; the
// expectation accounts for that.
// Checks: the status byte over the UART while the scan runs; the 105
// stored samples are sorted and each matches the expected value within
// 1 milliohm; the time of the point against the measurement timing
// (2 * (GATE + SETTLE + 1) + lead + estimator + state clocks per sample).
module tb_default_point;
  import iv_pkg::*;
  localparam int ROWS = 64, IO_ROWS = 8, CPB = 868, Z_MOHM = 100;
  localparam int GATE = 65536, SETTLE = 8, LEAD = 16, Z_LAT = 37;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic [15:0] vccint_mv, vcco_mv;
  logic [ROWS-1:0] waste_act;
  logic [IO_ROWS-1:0] io_waste_pins;
  logic [31:0] mmcm_freq_hz;
  logic mmcm_req, mmcm_pulse = 0;
  logic [127:0] key_in = 0, key_out;
  logic key_load = 0, tamper_alarm, scan_busy, waste_obs;
  logic [FIDX_W-1:0] worst_fidx;
  logic [WD_W-1:0] worst_wd_sum;

  impedance_verif_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always_comb begin
    vccint_mv = 16'(1000 - Z_MOHM * $countones(waste_act) / 32);
    vcco_mv   = 16'd3300;
  end

  // mean sag over each "on" gate of the core counter
  int expect_q [$];
  longint sag_sum = 0;
  int sag_n = 0;
  logic gate_q = 0;
  always @(posedge clk) begin
    logic g;
    g = rst_n && dut.u_cnt_core.gate && dut.stress_en;
    if (g) begin sag_sum += 1000 - int'(vccint_mv); sag_n++; end
    if (gate_q && !g && sag_n > 0) begin
      expect_q.push_back(int'((sag_sum + sag_n / 2) / sag_n));
      sag_sum = 0;
      sag_n = 0;
    end
    gate_q <= g;
  end

  // host side of the UART
  logic [7:0] rxq [$];
  task automatic send(input logic [7:0] b);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = fr[i];
      repeat (CPB) @(posedge clk);
    end
  endtask
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      if (!rst_n) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      rxq.push_back(b);
    end
  end

  initial begin
    status_t st;
    longint t0, t1, lo, hi;
    int n_bad = 0, n_unsorted = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    send(CMD_ENROLL);
    repeat (10) @(posedge clk);
    check(scan_busy, "enrollment started");
    t0 = longint'($time / 10);
    // status while the scan runs
    rxq.delete();
    send(CMD_STATUS);
    for (int t = 0; t < 20 * CPB && rxq.size() == 0; t++) @(posedge clk);
    st = (rxq.size() > 0) ? status_t'(rxq[0]) : '0;
    check(rxq.size() == 1 && st.busy && !st.done && !st.enrolled && !st.pdn_io,
          $sformatf("status while scanning: %02h", st));

    // first point done when the controller moves to point 1
    while (dut.u_ctrl.fidx == 0) @(posedge clk);
    t1 = longint'($time / 10);
    repeat (5) @(posedge clk);

    expect_q.sort();
    check(expect_q.size() == NUM_REP, $sformatf("%0d on-gates seen", expect_q.size()));
    for (int k = 0; k < NUM_REP && k < expect_q.size(); k++) begin
      int g;
      g = int'(dut.u_gold.mem[k]);
      if (k > 0 && g < int'(dut.u_gold.mem[k-1])) n_unsorted++;
      if (g < expect_q[k] - 1 || g > expect_q[k] + 1) begin
        n_bad++;
        if (n_bad < 4) $display("sample %0d: stored %0d mOhm, expected %0d", k, g, expect_q[k]);
      end
    end
    $display("point 0: median %0d mOhm, expected %0d; %0d clocks",
             dut.u_gold.mem[NUM_REP / 2], expect_q.size() > 0 ? expect_q[expect_q.size() / 2] : -1, t1 - t0);
    check(n_unsorted == 0, "stored samples sorted");
    check(n_bad == 0, $sformatf("%0d samples off the expected value", n_bad));
    lo = longint'(NUM_REP) * (2 * (GATE + SETTLE + 1) + LEAD + Z_LAT);
    hi = lo + NUM_REP * 20 + NUM_REP + 20;
    check(t1 - t0 >= lo - 20 && t1 - t0 <= hi,
          $sformatf("point time %0d clocks, expected %0d..%0d", t1 - t0, lo, hi));
    check(scan_busy && !tamper_alarm, "scan continues with no alarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

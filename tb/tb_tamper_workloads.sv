// tb_tamper_workloads: the tamper experiments run over the full frequency
// plan (152 points, 100 Hz - 588 MHz) with 3 repetitions per point and a
// 1024-clock gate, so that each scan stays within simulation time.
//
// The testbench plays the board and the host as in tb_impedance_verif_top:
// the core supply drops by Z(f) * I with I set by the enabled rows (32 rows
// on average = 1 A; a pulse-wave stimulus is taken at its mean), the I/O
// supply drops by Z_io(f) * I with I set by the toggling I/O pins, and a
// square-wave source stands in for the clock manager. The board model is
// free of noise, so the genuine re-scan differs from the enrollment only
// by counter quantization.
//
// Each tamper class is modelled as an impedance change in the band where
// it acts, in whole milliohms (the model's supply resolution is 1 mV):
//   shunt resistor   +10 everywhere, +52 from 400 MHz up
//   470 nF removed   +4 at 1-3 kHz, +2 elsewhere below 9.4 MHz
//   47 nF removed    +6 at 30-50 MHz, +3 elsewhere in 3.69-60.36 MHz
//   EM probe         +14 at 250-320 MHz
//   package polished +18 at 400-470 MHz
//   scope probe      -4 everywhere (a resistance in parallel with the shunt)
//   cable on an I/O  +22 at 150-190 MHz, +5 below 10 MHz (I/O supply)
// Sizes and bands follow the deviations reported for these experiments;
// the band edges around each peak are this testbench's own.
// Checks: the core and the I/O re-scans of the genuine board pass with every
// point under the threshold; every tamper class raises the alarm; the worst
// point lies in the band where the class acts; the key is zeroized.
module tb_tamper_workloads;
  import iv_pkg::*;
  localparam int NF = 152, NR = 3, CPB = 16, ROWS = 64, IO_ROWS = 8;
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

  impedance_verif_top #(
    .NUM_FREQ_P(NF), .NUM_REP_P(NR), .ROWS(ROWS), .IO_ROWS(IO_ROWS),
    .GATE_CYCLES(1024), .CLKS_PER_BIT(CPB)
  ) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- board model ----------------
  typedef enum int {GENUINE, SHUNT, CAP470, CAP47, EM_PROBE, POLISH, SCOPE, IO_CABLE} scen_e;
  scen_e scen = GENUINE;

  function automatic int z_core(input longint f, input scen_e s);
    int z;
    if      (f < 1000)       z = 100;
    else if (f < 100000)     z = 110;
    else if (f < 10000000)   z = 120;
    else if (f < 100000000)  z = 150;
    else                     z = 200;
    case (s)
      SHUNT:    z += (f >= 400000000) ? 52 : 10;
      CAP470:   z += (f >= 1000 && f < 3000) ? 4 : (f < 9400000) ? 2 : 0;
      CAP47:    z += (f >= 30000000 && f < 50000000) ? 6 :
                     (f >= 3690000 && f < 60360000) ? 3 : 0;
      EM_PROBE: z += (f >= 250000000 && f < 320000000) ? 14 : 0;
      POLISH:   z += (f >= 400000000 && f < 470000000) ? 18 : 0;
      SCOPE:    z -= 4;
      default: ;
    endcase
    return z;
  endfunction

  function automatic int z_io(input longint f, input scen_e s);
    int z = 200;
    if (s == IO_CABLE) z += (f >= 150000000 && f < 190000000) ? 22 : (f < 10000000) ? 5 : 0;
    return z;
  endfunction

  logic [IO_ROWS-1:0] io_prev = '0;
  int io_toggles = 0;
  always @(posedge clk) begin
    io_toggles <= $countones(io_waste_pins ^ io_prev);
    io_prev    <= io_waste_pins;
  end
  always_comb begin
    vccint_mv = 16'(1000 - z_core(longint'(mmcm_freq_hz), scen) *
                (mmcm_req ? ROWS / 2 : $countones(waste_act)) / 32);
    vcco_mv   = 16'(3300 - z_io(longint'(mmcm_freq_hz), scen) *
                (mmcm_req ? IO_ROWS / 2 : io_toggles) / 4);
  end

  always begin
    if (mmcm_req) #(1.0e9 / real'(mmcm_freq_hz) / 2.0) mmcm_pulse = ~mmcm_pulse;
    else begin mmcm_pulse = 0; @(posedge mmcm_req); end
  end

  // ---------------- mechanism counters ----------------
  int n_sine = 0, n_pulse = 0, n_enroll = 0, n_pass = 0, n_detect = 0, n_io_scan = 0;
  always @(posedge clk) if (rst_n && dut.ro_start && dut.stress_en) begin
    if (mmcm_req) n_pulse++; else n_sine++;
  end

  // ---------------- host ----------------
  logic [7:0] rxq [$];
  task automatic send(input logic [7:0] b);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = fr[i];
      repeat (CPB) @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
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
  task automatic wait_bytes(input int n);
    int t = 0;
    while (rxq.size() < n && t < 400000) begin @(posedge clk); t++; end
  endtask
  task automatic get_status(output status_t s);
    rxq.delete();
    send(CMD_STATUS);
    wait_bytes(1);
    s = (rxq.size() > 0) ? status_t'(rxq[0]) : '0;
  endtask
  task automatic run(input logic [7:0] cmd);
    send(cmd);
    repeat (5) @(posedge clk);
    while (scan_busy) @(posedge clk);
  endtask
  // genuine re-scan: every point of the WD profile under the threshold
  task automatic check_genuine(input string what);
    status_t st;
    int bad = 0, worst = 0;
    run(CMD_VERIFY);
    get_status(st);
    check(st.done && !st.tamper, {what, ": genuine board passes"});
    if (st.done && !st.tamper) n_pass++;
    rxq.delete();
    send(CMD_WDUMP);
    wait_bytes(3 * NF);
    check(rxq.size() == 3 * NF, {what, ": full WD profile received"});
    for (int i = 0; i < NF && 3 * i + 2 < rxq.size(); i++) begin
      int s;
      s = int'({rxq[3*i], rxq[3*i+1], rxq[3*i+2]});
      if (s > NR * WD_THRESH_MOHM) bad++;
      if (s > worst) worst = s;
    end
    $display("%s: largest genuine WD sum %0d (limit %0d)", what, worst, NR * WD_THRESH_MOHM);
    check(bad == 0, $sformatf("%s: %0d genuine points over the threshold", what, bad));
  endtask
  // tamper scan: alarm, and the worst point inside [lo, hi) Hz
  task automatic check_tamper(input scen_e s, input longint lo, input longint hi);
    status_t st;
    longint wf;
    scen = s;
    run(CMD_VERIFY);
    get_status(st);
    wf = longint'(dut.u_plan.FREQ_HZ[worst_fidx]);
    $display("%s: alarm=%0b worst point %0d (%0d Hz), WD sum %0d",
             s.name(), st.tamper, worst_fidx, wf, worst_wd_sum);
    check(st.tamper && tamper_alarm, {s.name(), ": detected"});
    if (st.tamper) n_detect++;
    check(wf >= lo && wf < hi, $sformatf("%s: worst point %0d Hz outside %0d..%0d Hz", s.name(), wf, lo, hi));
    check(key_out == '0 && st.zeroized, {s.name(), ": key zeroized"});
    scen = GENUINE;
  endtask

  initial begin
    status_t st;
    logic [127:0] key;
    key = 128'hA5A5_5A5A_0F0F_F0F0_1234_5678_9ABC_DEF0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin key_in = key; key_load = 1; end
    @(negedge clk) key_load = 0;

    // core PDN: enrollment, genuine re-scan, the tamper classes
    run(CMD_ENROLL);
    get_status(st);
    check(st.enrolled && st.done && !st.tamper, "core enrolled");
    if (st.enrolled) n_enroll++;
    check_genuine("core");
    check(key_out == key, "key kept after genuine scans");
    check_tamper(SHUNT,    400000000, 600000000);
    check_tamper(CAP470,   1000,      3000);
    check_tamper(CAP47,    30000000,  50000000);
    check_tamper(EM_PROBE, 250000000, 320000000);
    check_tamper(POLISH,   400000000, 470000000);
    check_tamper(SCOPE,    0,         600000000);

    // I/O PDN: enrollment, genuine re-scan, a cable on an I/O pin
    send(CMD_IO);
    run(CMD_ENROLL);
    get_status(st);
    // the tamper flag reports the last verification, so it is not checked here
    check(st.pdn_io && st.enrolled && st.done, "I/O PDN enrolled");
    if (st.pdn_io && st.enrolled) n_io_scan++;
    check_genuine("I/O");
    check_tamper(IO_CABLE, 150000000, 190000000);

    $display("mechanisms: sine=%0d pulse=%0d enroll=%0d pass=%0d detect=%0d io=%0d",
             n_sine, n_pulse, n_enroll, n_pass, n_detect, n_io_scan);
    check(n_sine > 0,     "sine activation used");
    check(n_pulse > 0,    "pulse activation used");
    check(n_enroll > 0,   "enrollment happened");
    check(n_pass == 2,    "both genuine re-scans passed");
    check(n_detect == 7,  "every tamper class detected");
    check(n_io_scan > 0,  "I/O PDN scan happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

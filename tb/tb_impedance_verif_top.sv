// tb_impedance_verif_top: end-to-end run of the tamper sensor at reduced
// size (6 frequency points, 5 repetitions, 1024-clock gate, fast UART).
//
// The testbench plays the board and the host:
//  - PDN model: the supply seen by the core RO drops by Z(f) * I, with I
//    proportional to the number of enabled core rows (64 rows, 32 on
//    average = 1 A); the I/O supply drops by Z_io * I, I proportional to
//    the number of I/O pins that toggled (4 on average = 1 A).
//    Z(f) is 100..200 milliohm by frequency band; a "shunt resistor" tamper
//    adds 10 milliohm everywhere. A pulse-wave stimulus switches faster
//    than the sensor samples, so for it the model uses the mean current.
//  - clock manager: a square wave at the requested frequency.
//  - host: sends command bytes over the UART and decodes the replies.
// Sequence: refused verification, core enrollment, clean verification,
// WD dump, tamper (shunt) -> alarm and key zeroization, WD dump, I/O PDN
// enrollment and verification. Checks the status bytes, the key, the
// enrolled impedances at points where the stimulus averages to 1 A
// (100 Hz sine and pulse points: within 2 milliohm of the model), the WD
// profile against the threshold and the worst point, and that each
// mechanism (sine activation, pulse activation, enrollment, clean pass,
// detection, zeroization, refused command, status reply, WD dump, I/O PDN
// scan) happened at least once.
module tb_impedance_verif_top;
  import iv_pkg::*;
  localparam int NF = 6, NR = 5, CPB = 16, ROWS = 64, IO_ROWS = 8;
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
  int shunt_mohm = 0;
  function automatic int z_core(input longint f);
    int z;
    if      (f < 1000)       z = 100;
    else if (f < 100000)     z = 110;
    else if (f < 10000000)   z = 120;
    else if (f < 100000000)  z = 150;
    else                     z = 200;
    return z + shunt_mohm;
  endfunction
  localparam int Z_IO = 200;

  logic [IO_ROWS-1:0] io_prev = '0;
  int io_toggles = 0;
  always @(posedge clk) begin
    io_toggles <= $countones(io_waste_pins ^ io_prev);
    io_prev    <= io_waste_pins;
  end
  always_comb begin
    // a pulse-wave stimulus switches faster than the sensor samples; the
    // network averages it to its mean, half of the rows
    vccint_mv = 16'(1000 - z_core(longint'(mmcm_freq_hz)) *
                (mmcm_req ? ROWS / 2 : $countones(waste_act)) / 32);
    vcco_mv   = 16'(3300 - Z_IO * io_toggles / 4);
  end

  // clock manager: square wave at the requested frequency
  always begin
    if (mmcm_req) #(1.0e9 / real'(mmcm_freq_hz) / 2.0) mmcm_pulse = ~mmcm_pulse;
    else begin mmcm_pulse = 0; @(posedge mmcm_req); end
  end

  // ---------------- mechanism counters ----------------
  int n_sine = 0, n_pulse = 0, n_enroll = 0, n_pass = 0, n_detect = 0, n_zero = 0;
  int n_refused = 0, n_status = 0, n_dump = 0, n_io_scan = 0;
  always @(posedge clk) if (rst_n && dut.ro_start && dut.stress_en) begin
    if (mmcm_req) n_pulse++; else n_sine++;
  end
  // in pulse mode all core rows follow the clock-manager wave
  int pulse_edges = 0, pulse_shape_err = 0;
  always @(posedge mmcm_pulse) if (mmcm_req && !dut.scan_pdn) begin
    pulse_edges++;
    #0.01;
    if (waste_act != '1) pulse_shape_err++;
  end
  always @(negedge mmcm_pulse) if (mmcm_req && !dut.scan_pdn) begin
    #0.01;
    if (waste_act != '0) pulse_shape_err++;
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
  // receiver: sample in the middle of each bit
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
    while (rxq.size() < n && t < 200000) begin @(posedge clk); t++; end
  endtask
  task automatic get_status(output status_t s);
    rxq.delete();
    send(CMD_STATUS);
    wait_bytes(1);
    s = (rxq.size() > 0) ? status_t'(rxq[0]) : '0;
    n_status++;
  endtask
  task automatic run(input logic [7:0] cmd);
    send(cmd);
    repeat (5) @(posedge clk);
    while (scan_busy) @(posedge clk);
  endtask
  task automatic dump(output int sums [NF]);
    rxq.delete();
    send(CMD_WDUMP);
    wait_bytes(3 * NF);
    for (int i = 0; i < NF; i++)
      sums[i] = (rxq.size() >= 3 * NF) ? int'({rxq[3*i], rxq[3*i+1], rxq[3*i+2]}) : -1;
    n_dump++;
  endtask

  initial begin
    status_t st;
    int sums [NF];
    int maxs, maxi;
    logic [127:0] key;
    key = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin key_in = key; key_load = 1; end
    @(negedge clk) key_load = 0;
    check(key_out == key, "key loaded");

    // verification before enrollment is refused
    get_status(st);
    check(!st.enrolled && !st.busy, "initially not enrolled");
    send(CMD_VERIFY);
    repeat (5) @(posedge clk);
    check(!scan_busy, "verify refused without signature");
    if (!scan_busy) n_refused++;

    // enrollment
    run(CMD_ENROLL);
    get_status(st);
    check(st.enrolled && st.done && !st.tamper, "core enrolled");
    n_enroll++;
    // enrolled impedances where the stimulus averages to 1 A
    for (int f = 0; f < NF; f++) begin
      longint fr;
      int med;
      fr  = longint'(dut.u_plan.FREQ_HZ[f]);
      med = int'(dut.u_gold.mem[f * NR + NR / 2]);
      if (f == 0 || fr >= 25000000)
        check(med >= z_core(fr) - 2 && med <= z_core(fr) + 2,
              $sformatf("point %0d (%0d Hz): median %0d mOhm, model %0d", f, fr, med, z_core(fr)));
    end

    // clean verification
    run(CMD_VERIFY);
    get_status(st);
    check(st.done && !st.tamper && !tamper_alarm, "genuine board passes");
    check(key_out == key, "key kept");
    if (!st.tamper) n_pass++;
    dump(sums);
    for (int i = 0; i < NF; i++) check(sums[i] >= 0 && sums[i] <= NR * WD_THRESH_MOHM, $sformatf("genuine WD %0d: %0d", i, sums[i]));

    // tamper: add a 10 milliohm shunt resistor
    shunt_mohm = 10;
    run(CMD_VERIFY);
    get_status(st);
    check(st.tamper && tamper_alarm, "shunt resistor detected");
    if (tamper_alarm) n_detect++;
    check(key_out == '0 && st.zeroized, "key zeroized");
    if (st.zeroized) n_zero++;
    dump(sums);
    maxs = -1; maxi = 0;
    for (int i = 0; i < NF; i++) begin
      check(sums[i] > NR * WD_THRESH_MOHM, $sformatf("tampered WD %0d: %0d", i, sums[i]));
      if (sums[i] > maxs) begin maxs = sums[i]; maxi = i; end
    end
    check(int'(worst_fidx) == maxi && int'(worst_wd_sum) == maxs, "worst point reported");

    // I/O PDN
    shunt_mohm = 0;
    send(CMD_IO);
    get_status(st);
    check(st.pdn_io && !st.enrolled, "I/O PDN selected, not enrolled");
    run(CMD_ENROLL);
    run(CMD_VERIFY);
    get_status(st);
    check(st.pdn_io && st.enrolled && !st.tamper, "I/O PDN enrolled and verified");
    if (st.pdn_io && st.enrolled) n_io_scan++;
    begin
      int med;
      med = int'(dut.u_gold.mem[(NF + 0) * NR + NR / 2]);
      check(med >= Z_IO - 30 && med <= Z_IO + 30, $sformatf("I/O impedance %0d mOhm", med));
    end

    $display("mechanisms: sine=%0d pulse=%0d enroll=%0d pass=%0d detect=%0d zeroize=%0d refused=%0d status=%0d dump=%0d io=%0d",
             n_sine, n_pulse, n_enroll, n_pass, n_detect, n_zero, n_refused, n_status, n_dump, n_io_scan);
    check(pulse_edges > 0 && pulse_shape_err == 0, $sformatf("rows follow the pulse wave (%0d edges, %0d errors)", pulse_edges, pulse_shape_err));
    check(n_sine > 0,    "sine activation used");
    check(n_pulse > 0,   "pulse activation used");
    check(n_enroll > 0,  "enrollment happened");
    check(n_pass > 0,    "clean pass happened");
    check(n_detect > 0,  "detection happened");
    check(n_zero > 0,    "zeroization happened");
    check(n_refused > 0, "refused command happened");
    check(n_status > 0,  "status reply happened");
    check(n_dump > 0,    "WD dump happened");
    check(n_io_scan > 0, "I/O PDN scan happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

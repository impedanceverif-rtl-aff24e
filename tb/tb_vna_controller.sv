// tb_vna_controller: runs the sequencer with stand-in RO counter and
// impedance estimator (so that every impedance sample is known exactly)
// and the real sorter, golden store and Wasserstein detector.
// The stand-in counter returns 10000 with the stressor idle and
// 10000 - z with it active, z = 100 + 10*f + ((7*r) % 5) + offset(f) for
// point f and repetition r; the stand-in estimator returns off - on = z.
// Checks: the off/on order and stressor state of every measurement, the
// lead time, the enrolled golden words (count, sorted order, values), a
// refused verification on a PDN without signature, a clean verification
// (all WD sums 0), a sub-threshold change (WD = 2, no alarm, profile value
// 2*N), a tamper (WD = 5: alarm, one tamper pulse, worst point and sum), and
// that enrolling the second PDN leaves the first one's signature intact.
module tb_vna_controller;
  import iv_pkg::*;
  localparam int NF = 4, NR = 6, LEAD = 3;
  localparam int GA_W = $clog2(2 * NF * NR);
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic start_enroll = 0, start_verify = 0, pdn_sel = 0;
  logic [FIDX_W-1:0] fidx, wdp_idx = 0, worst_fidx;
  logic stress_en, ro_start, ro_done = 0, z_start, z_done = 0;
  logic [CNT_W-1:0] ro_count = 0, cnt_off, cnt_on;
  logic [Z_W-1:0] z_mohm = 0, s_din, s_data, g_wdata, g_rdata, wd_g, wd_t;
  logic s_clear, s_ins, g_we, wd_clear, wd_valid, wd_over;
  logic [RIDX_W-1:0] s_idx;
  logic [GA_W-1:0] g_addr;
  logic [WD_W-1:0] wd_sum, wdp_sum, worst_sum;
  logic busy, done, tamper, tamper_pulse, scan_pdn;
  logic [1:0] enrolled;

  vna_controller #(.NUM_FREQ_P(NF), .NUM_REP_P(NR), .STRESS_LEAD(LEAD), .GA_W(GA_W)) dut (.*);

  sample_sorter #(.N(NR), .W(Z_W)) u_sort (.clk, .rst_n, .clear(s_clear), .ins(s_ins), .din(s_din),
    .rd_idx(s_idx[$clog2(NR)-1:0]), .rd_data(s_data), .fill());
  golden_store #(.DEPTH(2 * NF * NR), .W(Z_W)) u_gold (.clk, .we(g_we), .addr(g_addr), .wdata(g_wdata), .rdata(g_rdata));
  wd_detector #(.N(NR), .W(Z_W), .SUM_W(WD_W), .WD_THRESH_MOHM(3)) u_wd (.clk, .rst_n, .clear(wd_clear),
    .valid(wd_valid), .g(wd_g), .t(wd_t), .sum(wd_sum), .over(wd_over));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- stimulus model ----
  int offset [NF];
  int pdn_base = 0;
  int rep_of_f [NF];
  function automatic int zval(input int f, input int r);
    return 100 + pdn_base + 10 * f + ((7 * r) % 5) + offset[f];
  endfunction

  // stand-in RO counter and estimator
  int ro_timer = -1, z_timer = -1;
  bit ro_was_on, expect_on = 0;
  int n_off = 0, n_on = 0, order_err = 0, lead_err = 0, stress_cycles = 0;
  int n_gwe = 0, n_tpulse = 0;
  always @(posedge clk) begin
    ro_done <= 1'b0;
    z_done  <= 1'b0;
    if (stress_en) stress_cycles++; else stress_cycles = 0;
    if (rst_n && ro_start) begin
      ro_was_on = stress_en;
      if (stress_en != expect_on) order_err++;
      if (stress_en && stress_cycles < LEAD) lead_err++;
      if (stress_en) n_on++; else n_off++;
      expect_on = !expect_on;
      ro_timer  = 5;
    end else if (ro_timer > 0) begin
      ro_timer--;
      if (ro_timer == 0) begin
        ro_done  <= 1'b1;
        ro_count <= ro_was_on ? CNT_W'(10000 - zval(int'(fidx), rep_of_f[fidx])) : CNT_W'(10000);
        if (ro_was_on) rep_of_f[fidx] = rep_of_f[fidx] + 1;
        ro_timer = -1;
      end
    end
    if (rst_n && z_start) z_timer = 2;
    else if (z_timer > 0) begin
      z_timer--;
      if (z_timer == 0) begin
        z_done <= 1'b1;
        z_mohm <= Z_W'(cnt_off - cnt_on);
        z_timer = -1;
      end
    end
    if (rst_n && g_we) n_gwe++;
    if (rst_n && tamper_pulse) n_tpulse++;
  end

  task automatic run_scan(input bit verify, input bit pdn);
    foreach (rep_of_f[i]) rep_of_f[i] = 0;
    n_tpulse = 0;
    @(negedge clk);
    pdn_sel = pdn;
    if (verify) start_verify = 1; else start_enroll = 1;
    @(negedge clk) begin start_verify = 0; start_enroll = 0; end
    check(busy, "scan starts");
    while (busy) @(negedge clk);
    check(done, "done after scan");
  endtask

  task automatic check_profile(input int expect_sum [NF]);
    for (int f = 0; f < NF; f++) begin
      wdp_idx = FIDX_W'(f); #1;
      check(int'(wdp_sum) == expect_sum[f], $sformatf("WD profile %0d: %0d expected %0d", f, wdp_sum, expect_sum[f]));
    end
  endtask

  initial begin
    int e [NF];
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (offset[i]) offset[i] = 0;
    // verification without signature is refused
    @(negedge clk) start_verify = 1;
    @(negedge clk) start_verify = 0;
    check(!busy && enrolled == 2'b00, "verify refused before enrollment");
    // enrollment of the core PDN
    run_scan(0, 0);
    check(enrolled == 2'b01, "core PDN enrolled");
    check(n_gwe == NF * NR, $sformatf("golden writes %0d", n_gwe));
    check(n_off == NF * NR && n_on == NF * NR && order_err == 0, "off/on measurement order");
    check(lead_err == 0, "stressor lead time");
    for (int f = 0; f < NF; f++) begin
      int vals [$];
      vals.delete();
      for (int r = 0; r < NR; r++) vals.push_back(zval(f, r));
      vals.sort();
      for (int r = 0; r < NR; r++)
        check(int'(u_gold.mem[f * NR + r]) == vals[r], $sformatf("golden f%0d r%0d %0d vs %0d", f, r, u_gold.mem[f * NR + r], vals[r]));
    end
    // clean verification
    run_scan(1, 0);
    check(!tamper && n_tpulse == 0, "genuine: no tamper");
    e = '{default: 0};
    check_profile(e);
    // sub-threshold change at point 1 (WD = 2)
    offset[1] = 2;
    run_scan(1, 0);
    check(!tamper && n_tpulse == 0, "WD 2: below threshold");
    e = '{0, 2 * NR, 0, 0};
    check_profile(e);
    check(worst_fidx == 1 && int'(worst_sum) == 2 * NR, "worst point, small change");
    // tamper at points 2 and 3 (WD = 5 and 4)
    offset[1] = 0; offset[2] = 5; offset[3] = -4;
    run_scan(1, 0);
    check(tamper && n_tpulse == 1, $sformatf("tamper detected, %0d pulses", n_tpulse));
    check(worst_fidx == 2 && int'(worst_sum) == 5 * NR, "worst point is 2");
    e = '{0, 0, 5 * NR, 4 * NR};
    check_profile(e);
    // enroll the I/O PDN with other values; the core signature must survive
    offset[2] = 0; offset[3] = 0;
    pdn_base = 50;
    run_scan(0, 1);
    check(enrolled == 2'b11, "both PDNs enrolled");
    run_scan(1, 1);
    check(!tamper, "I/O PDN genuine");
    pdn_base = 0;
    run_scan(1, 0);
    check(!tamper && scan_pdn == 1'b0, "core signature intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// impedance_verif_top: self-contained tamper sensor that characterizes the
// impedance of the chip's power distribution network (PDN) and compares it
// with an enrolled golden signature.
//
// Data path, per selected PDN (core V_CCINT or I/O V_CCO):
//   freq_plan -> sine_pulse_modulator -> power_waster  (draws a current at
//   the stimulus frequency from the PDN)
//   ring_oscillator -> ro_counter (supply voltage as an RO frequency)
//   z_estimator (|Z| from the RO counts with the stressor off and on)
//   -> sample_sorter (NUM_REP repetitions, sorted)
//   -> golden_store (enrollment) or wd_detector (verification)
//   -> tamper_response (key zeroization).
// vna_controller sequences the scan; host_cmd with uart_rx/uart_tx is the
// host link. The core PDN is stressed by a CLB current source of ROWS
// rows and sensed by a logic RO; the I/O PDN by IO_ROWS toggling I/O pins
// (`io_waste_pins`) and an RO through an I/O buffer.
//
// Off-chip and vendor parts are ports: the supply voltages that the two
// ROs see (`vccint_mv`, `vcco_mv`, from the analog PDN), the clock manager
// that makes the pulse activation wave (`mmcm_freq_hz`/`mmcm_req` out,
// `mmcm_pulse` in), and `waste_act`, the enabled core rows, which sets the
// current the core current source draws.
//
// The structure follows the described embedded network analyser and
// detection scheme; the sizes marked as such in each module, the command
// set and the on-chip Wasserstein check are this design's choices.
module impedance_verif_top
  import iv_pkg::*;
#(
  parameter int unsigned NUM_FREQ_P    = iv_pkg::NUM_FREQ,
  parameter int unsigned NUM_REP_P     = iv_pkg::NUM_REP,
  parameter int unsigned ROWS          = 64,
  parameter int unsigned IO_ROWS       = 8,
  parameter int unsigned CHAIN_LEN     = 8,
  parameter int unsigned GATE_CYCLES   = 65536,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned STRESS_LEAD   = 16,
  parameter int unsigned CLKS_PER_BIT  = 868,
  parameter int unsigned CORE_MV       = 1000,  // V_CCINT
  parameter int unsigned IO_MV         = 3300,  // V_CCO
  parameter int unsigned CORE_DI_MA    = 1000,  // I_OFF - I_ON, core source
  parameter int unsigned IO_DI_MA      = 1000,  // I_OFF - I_ON, I/O source
  parameter int unsigned KEY_W         = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  // host link
  input  logic               uart_rxd,
  output logic               uart_txd,
  // analog PDN (supply seen by the sensors) and current-source activity
  input  logic [15:0]        vccint_mv,
  input  logic [15:0]        vcco_mv,
  output logic [ROWS-1:0]    waste_act,
  output logic [IO_ROWS-1:0] io_waste_pins,
  // clock manager for pulse activation
  output logic [31:0]        mmcm_freq_hz,
  output logic               mmcm_req,
  input  logic               mmcm_pulse,
  // protected key
  input  logic [KEY_W-1:0]   key_in,
  input  logic               key_load,
  output logic [KEY_W-1:0]   key_out,
  output logic               tamper_alarm,
  output logic               scan_busy,
  output logic [FIDX_W-1:0]  worst_fidx,    // point with the largest WD
  output logic [WD_W-1:0]    worst_wd_sum,  // its NUM_REP x WD, milliohm
  output logic               waste_obs      // parity of the buffer-chain ends
);

  localparam int unsigned GA_W = $clog2(2 * NUM_FREQ_P * NUM_REP_P);

  // ---------------- controller ----------------
  logic [FIDX_W-1:0] fidx;
  logic              stress_en, ro_start, ro_done, z_start, z_done;
  logic [CNT_W-1:0]  ro_count, cnt_off, cnt_on;
  logic [Z_W-1:0]    z_mohm, z_core, z_io;
  logic              s_clear, s_ins;
  logic [Z_W-1:0]    s_din, s_data;
  logic [RIDX_W-1:0] s_idx;
  logic              g_we;
  logic [GA_W-1:0]   g_addr;
  logic [Z_W-1:0]    g_wdata, g_rdata;
  logic              wd_clear, wd_valid, wd_over;
  logic [Z_W-1:0]    wd_g, wd_t;
  logic [WD_W-1:0]   wd_sum, wdp_sum;
  logic [FIDX_W-1:0] wdp_idx;
  logic              busy, done, tamper, tamper_pulse, scan_pdn;
  logic [1:0]        enrolled;
  logic              start_enroll, start_verify, pdn_sel;
  logic              zeroized;

  vna_controller #(
    .NUM_FREQ_P(NUM_FREQ_P), .NUM_REP_P(NUM_REP_P), .STRESS_LEAD(STRESS_LEAD), .GA_W(GA_W)
  ) u_ctrl (
    .clk, .rst_n,
    .start_enroll, .start_verify, .pdn_sel,
    .fidx, .stress_en,
    .ro_start, .ro_done, .ro_count,
    .z_start, .cnt_off, .cnt_on, .z_done, .z_mohm,
    .s_clear, .s_ins, .s_din, .s_idx, .s_data,
    .g_we, .g_addr, .g_wdata, .g_rdata,
    .wd_clear, .wd_valid, .wd_g, .wd_t, .wd_sum, .wd_over,
    .wdp_idx, .wdp_sum,
    .busy, .done, .tamper, .tamper_pulse, .enrolled, .scan_pdn,
    .worst_fidx, .worst_sum(worst_wd_sum)
  );

  // ---------------- stimulus ----------------
  fpoint_t point;

  freq_plan #(.NUM_FREQ_P(NUM_FREQ_P)) u_plan (.idx(fidx), .point);

  assign mmcm_freq_hz = point.freq_hz;
  assign mmcm_req     = stress_en && point.pulse;

  logic [ROWS-1:0]    core_act;
  logic [IO_ROWS-1:0] io_act;
  logic [ROWS-1:0]    core_rows;

  sine_pulse_modulator #(.ROWS(ROWS)) u_mod_core (
    .clk, .rst_n, .en(stress_en && scan_pdn == PDN_CORE), .pulse_mode(point.pulse),
    .ftw(point.ftw), .pulse_in(mmcm_pulse), .act(core_act)
  );

  sine_pulse_modulator #(.ROWS(IO_ROWS)) u_mod_io (
    .clk, .rst_n, .en(stress_en && scan_pdn == PDN_IO), .pulse_mode(point.pulse),
    .ftw(point.ftw), .pulse_in(mmcm_pulse), .act(io_act)
  );

  power_waster #(.ROWS(ROWS), .CHAIN_LEN(CHAIN_LEN)) u_waste_core (
    .clk, .rst_n, .act(core_act), .row_out(core_rows)
  );

  power_waster #(.ROWS(IO_ROWS), .CHAIN_LEN(1)) u_waste_io (
    .clk, .rst_n, .act(io_act), .row_out(io_waste_pins)
  );

  assign waste_act = core_act;
  assign waste_obs = ^core_rows;

  // ---------------- sensing ----------------
  logic ro_core, ro_io;
  logic done_core, done_io, busy_core, busy_io;
  logic [CNT_W-1:0] count_core, count_io;

  ring_oscillator u_ro_core (.en(1'b1), .vdd_mv(vccint_mv), .ro_out(ro_core));
  ring_oscillator u_ro_io   (.en(1'b1), .vdd_mv(vcco_mv),   .ro_out(ro_io));

  ro_counter #(.CNT_W(CNT_W), .GATE_CYCLES(GATE_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)) u_cnt_core (
    .clk, .rst_n, .ro_clk(ro_core), .start(ro_start && scan_pdn == PDN_CORE),
    .busy(busy_core), .done(done_core), .count(count_core)
  );

  ro_counter #(.CNT_W(CNT_W), .GATE_CYCLES(GATE_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)) u_cnt_io (
    .clk, .rst_n, .ro_clk(ro_io), .start(ro_start && scan_pdn == PDN_IO),
    .busy(busy_io), .done(done_io), .count(count_io)
  );

  assign ro_done  = (scan_pdn == PDN_IO) ? done_io  : done_core;
  assign ro_count = (scan_pdn == PDN_IO) ? count_io : count_core;

  logic zd_core, zd_io, zb_core, zb_io;

  z_estimator #(.CNT_W(CNT_W), .Z_W(Z_W), .V_SUPPLY_MV(CORE_MV), .DELTA_I_MA(CORE_DI_MA)) u_z_core (
    .clk, .rst_n, .start(z_start && scan_pdn == PDN_CORE), .cnt_off, .cnt_on,
    .busy(zb_core), .done(zd_core), .z_mohm(z_core)
  );

  z_estimator #(.CNT_W(CNT_W), .Z_W(Z_W), .V_SUPPLY_MV(IO_MV), .DELTA_I_MA(IO_DI_MA)) u_z_io (
    .clk, .rst_n, .start(z_start && scan_pdn == PDN_IO), .cnt_off, .cnt_on,
    .busy(zb_io), .done(zd_io), .z_mohm(z_io)
  );

  assign z_done = (scan_pdn == PDN_IO) ? zd_io : zd_core;
  assign z_mohm = (scan_pdn == PDN_IO) ? z_io  : z_core;

  // ---------------- statistics and decision ----------------
  sample_sorter #(.N(NUM_REP_P), .W(Z_W)) u_sort (
    .clk, .rst_n, .clear(s_clear), .ins(s_ins), .din(s_din),
    .rd_idx(s_idx[$clog2(NUM_REP_P)-1:0]), .rd_data(s_data), .fill()
  );

  golden_store #(.DEPTH(2 * NUM_FREQ_P * NUM_REP_P), .W(Z_W)) u_gold (
    .clk, .we(g_we), .addr(g_addr), .wdata(g_wdata), .rdata(g_rdata)
  );

  wd_detector #(.N(NUM_REP_P), .W(Z_W), .SUM_W(WD_W), .WD_THRESH_MOHM(WD_THRESH_MOHM)) u_wd (
    .clk, .rst_n, .clear(wd_clear), .valid(wd_valid), .g(wd_g), .t(wd_t),
    .sum(wd_sum), .over(wd_over)
  );

  tamper_response #(.KEY_W(KEY_W)) u_resp (
    .clk, .rst_n, .tamper(tamper_pulse), .key_load, .key_in, .key_out, .zeroized
  );

  assign tamper_alarm = tamper;
  assign scan_busy    = busy;

  // ---------------- host link ----------------
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_start, tx_busy;
  status_t    status;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (.clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (.clk, .rst_n, .data(tx_data), .start(tx_start), .txd(uart_txd), .busy(tx_busy));

  always_comb begin
    status          = '0;
    status.busy     = busy;
    status.done     = done;
    status.tamper   = tamper;
    status.enrolled = enrolled[pdn_sel];
    status.pdn_io   = pdn_sel;
    status.zeroized = zeroized;
  end

  host_cmd #(.NUM_FREQ_P(NUM_FREQ_P)) u_host (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_start, .tx_busy,
    .status, .wdp_idx, .wdp_sum, .start_enroll, .start_verify, .pdn_sel
  );

endmodule

// vna_controller: sequencer of the on-chip network analyser and of the
// tamper decision.
//
// A scan visits the NUM_FREQ frequency points in order. At each point it
// repeats NUM_REP measurements. One measurement is:
//   1. stressor idle: gate the ring-oscillator counter -> cnt_off
//      (the reference f_RO_OFF is re-measured every time, which cancels slow
//      temperature drift of the oscillator);
//   2. stressor active at the point's frequency: wait STRESS_LEAD clocks,
//      gate the counter again -> cnt_on;
//   3. impedance estimate from the two counts, inserted into the sorter.
// When the NUM_REP samples of a point are in, the sorted samples are
//   - in an enrollment scan, written into the golden store;
//   - in a verification scan, read back pairwise with the golden samples
//     into the Wasserstein detector. Its sum is kept in the WD profile
//     (readable per point through wdp_idx/wdp_sum) and, if it exceeds the
//     threshold, `tamper` is set and `tamper_pulse` fires once per scan.
// A verification is refused while the selected PDN has no enrolled
// signature. `busy` covers the scan, `done` rises when it ends and stays
// until the next start. `pdn_sel` is sampled at the start of a scan.
//
// The off/on measurement pair, the repetitions, the log frequency sweep,
// the stored golden signature and the Wasserstein threshold follow the
// described method. The order of operations, the lead time, the one-shot
// tamper pulse and all handshakes are this design's own.
//
// s_din and wd_g are the estimator output and the golden-store read data,
// registered or passed on unchanged: the controller only routes them.
//
// Timing per measurement: 2 * (GATE + SETTLE + 1) clocks of the RO counter,
// STRESS_LEAD, the estimator latency and a few state clocks; per point
// NUM_REP measurements plus NUM_REP + 3 clocks to store or compare.
module vna_controller
  import iv_pkg::*;
#(
  parameter int unsigned NUM_FREQ_P  = iv_pkg::NUM_FREQ,
  parameter int unsigned NUM_REP_P   = iv_pkg::NUM_REP,
  parameter int unsigned STRESS_LEAD = 16,
  parameter int unsigned GA_W        = $clog2(2 * NUM_FREQ_P * NUM_REP_P)
) (
  input  logic                clk,
  input  logic                rst_n,
  // commands
  input  logic                start_enroll,
  input  logic                start_verify,
  input  logic                pdn_sel,        // 0 core, 1 I/O
  // frequency plan and stressor
  output logic [FIDX_W-1:0]   fidx,
  output logic                stress_en,
  // ring-oscillator counter
  output logic                ro_start,
  input  logic                ro_done,
  input  logic [CNT_W-1:0]    ro_count,
  // impedance estimator
  output logic                z_start,
  output logic [CNT_W-1:0]    cnt_off,
  output logic [CNT_W-1:0]    cnt_on,
  input  logic                z_done,
  input  logic [Z_W-1:0]      z_mohm,
  // sorter
  output logic                s_clear,
  output logic                s_ins,
  output logic [Z_W-1:0]      s_din,
  output logic [RIDX_W-1:0]   s_idx,
  input  logic [Z_W-1:0]      s_data,
  // golden store
  output logic                g_we,
  output logic [GA_W-1:0]     g_addr,
  output logic [Z_W-1:0]      g_wdata,
  input  logic [Z_W-1:0]      g_rdata,
  // Wasserstein detector
  output logic                wd_clear,
  output logic                wd_valid,
  output logic [Z_W-1:0]      wd_g,
  output logic [Z_W-1:0]      wd_t,
  input  logic [WD_W-1:0]     wd_sum,
  input  logic                wd_over,
  // WD profile readout
  input  logic [FIDX_W-1:0]   wdp_idx,
  output logic [WD_W-1:0]     wdp_sum,
  // status
  output logic                busy,
  output logic                done,
  output logic                tamper,
  output logic                tamper_pulse,
  output logic [1:0]          enrolled,
  output logic                scan_pdn,
  output logic [FIDX_W-1:0]   worst_fidx,
  output logic [WD_W-1:0]     worst_sum
);

  typedef enum logic [3:0] {
    S_IDLE, S_OFF_GO, S_OFF_WAIT, S_LEAD, S_ON_WAIT, S_Z_WAIT,
    S_SORTED, S_STORE, S_CMP, S_CMP_END, S_NEXT
  } state_e;

  state_e              state;
  logic                verify;      // 0 enrollment scan, 1 verification scan
  logic [RIDX_W-1:0]   rep;
  logic [RIDX_W-1:0]   k;
  logic [$clog2(STRESS_LEAD+1)-1:0] lead;
  logic [GA_W-1:0]     base;
  logic                cmp_v;       // golden word of the previous clock is valid
  logic [Z_W-1:0]      t_d;         // measured sample aligned with g_rdata
  logic [WD_W-1:0]     wdp [NUM_FREQ_P];

  assign base = GA_W'((32'(scan_pdn) * NUM_FREQ_P + 32'(fidx)) * NUM_REP_P);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      verify       <= 1'b0;
      scan_pdn     <= 1'b0;
      fidx         <= '0;
      rep          <= '0;
      k            <= '0;
      lead         <= '0;
      stress_en    <= 1'b0;
      ro_start     <= 1'b0;
      z_start      <= 1'b0;
      cnt_off      <= '0;
      cnt_on       <= '0;
      s_clear      <= 1'b0;
      s_ins        <= 1'b0;
      s_din        <= '0;
      cmp_v        <= 1'b0;
      t_d          <= '0;
      busy         <= 1'b0;
      done         <= 1'b0;
      tamper       <= 1'b0;
      tamper_pulse <= 1'b0;
      enrolled     <= '0;
      worst_fidx   <= '0;
      worst_sum    <= '0;
    end else begin
      ro_start     <= 1'b0;
      z_start      <= 1'b0;
      s_clear      <= 1'b0;
      s_ins        <= 1'b0;
      tamper_pulse <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_enroll || (start_verify && enrolled[pdn_sel])) begin
            verify     <= !start_enroll;
            scan_pdn   <= pdn_sel;
            fidx       <= '0;
            rep        <= '0;
            busy       <= 1'b1;
            done       <= 1'b0;
            s_clear    <= 1'b1;
            if (!start_enroll) begin
              tamper     <= 1'b0;
              worst_fidx <= '0;
              worst_sum  <= '0;
            end
            state      <= S_OFF_GO;
          end
        end
        // 1. reference count with the stressor idle
        S_OFF_GO: begin
          ro_start <= 1'b1;
          state    <= S_OFF_WAIT;
        end
        S_OFF_WAIT: if (ro_done) begin
          cnt_off   <= ro_count;
          stress_en <= 1'b1;
          lead      <= '0;
          state     <= S_LEAD;
        end
        // 2. count with the stressor running at f_i
        S_LEAD: begin
          if (32'(lead) == STRESS_LEAD) begin
            ro_start <= 1'b1;
            state    <= S_ON_WAIT;
          end else lead <= lead + 1'b1;
        end
        S_ON_WAIT: if (ro_done) begin
          cnt_on    <= ro_count;
          stress_en <= 1'b0;
          z_start   <= 1'b1;
          state     <= S_Z_WAIT;
        end
        // 3. impedance sample into the sorter
        S_Z_WAIT: if (z_done) begin
          s_ins <= 1'b1;
          s_din <= z_mohm;
          if (32'(rep) == NUM_REP_P - 1) begin
            rep   <= '0;
            k     <= '0;
            cmp_v <= 1'b0;
            state <= S_SORTED;
          end else begin
            rep   <= rep + 1'b1;
            state <= S_OFF_GO;
          end
        end
        // the last sample enters the sorter during this clock
        S_SORTED: state <= verify ? S_CMP : S_STORE;
        // enrollment: sorted samples -> golden store
        S_STORE: begin
          if (32'(k) == NUM_REP_P - 1) state <= S_NEXT;
          k <= k + 1'b1;
        end
        // verification: stream golden and measured samples into the detector
        S_CMP: begin
          cmp_v <= 1'b1;
          t_d   <= s_data;
          if (32'(k) == NUM_REP_P - 1) state <= S_CMP_END;
          else                         k <= k + 1'b1;
        end
        S_CMP_END: begin
          cmp_v <= 1'b0;
          if (!cmp_v) begin            // last pair has been accumulated
            if (wd_over) begin
              tamper <= 1'b1;
              if (!tamper) tamper_pulse <= 1'b1;
            end
            if (wd_sum > worst_sum) begin
              worst_sum  <= wd_sum;
              worst_fidx <= fidx;
            end
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          s_clear <= 1'b1;
          k       <= '0;
          if (32'(fidx) == NUM_FREQ_P - 1) begin
            if (!verify) enrolled[scan_pdn] <= 1'b1;
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            fidx  <= fidx + 1'b1;
            state <= S_OFF_GO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // WD profile of the last verification scan
  always_ff @(posedge clk) begin
    if (state == S_CMP_END && !cmp_v) wdp[fidx] <= wd_sum;
  end
  assign wdp_sum = (32'(wdp_idx) < NUM_FREQ_P) ? wdp[wdp_idx] : '0;

  // golden store and detector ports
  assign s_idx    = k;
  assign g_we     = (state == S_STORE);
  assign g_addr   = base + GA_W'(k);
  assign g_wdata  = s_data;
  assign wd_clear = (state == S_Z_WAIT);
  assign wd_valid = cmp_v;
  assign wd_g     = g_rdata;
  assign wd_t     = t_d;

  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    !(ro_start && z_start));

endmodule

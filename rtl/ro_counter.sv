// ro_counter: measures the frequency of a ring oscillator as the number of
// its cycles within a fixed gate window of the system clock.
//
// A `start` pulse opens the gate for GATE_CYCLES system clocks. The binary
// counter runs in the oscillator's own clock domain: it sees the gate
// through a two-flop synchronizer, restarts from 1 on the first oscillator
// edge after the gate opens and counts every following edge while the gate
// stays open. After the gate closes the controller waits SETTLE_CYCLES more
// system clocks, by which time the oscillator-domain count has stopped
// changing, copies it into `count` and pulses `done`; `busy` is high from
// `start` to `done`. A measurement thus takes GATE_CYCLES + SETTLE_CYCLES + 1
// clocks. The oscillator must make at least three edges during the settle
// time (an RO runs at hundreds of MHz, so this holds easily).
//
// Counting RO cycles with a binary counter follows the described sensor;
// the gate length, the synchronizer and the settle scheme are this design's
// own. The count is f_RO * GATE_CYCLES / F_CLK, so the relative RO
// frequency change that the impedance estimate needs is a ratio of counts.
module ro_counter #(
  parameter int unsigned CNT_W         = 24,
  parameter int unsigned GATE_CYCLES   = 65536,
  parameter int unsigned SETTLE_CYCLES = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ro_clk,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] count
);

  localparam int unsigned TW = $clog2(GATE_CYCLES + SETTLE_CYCLES + 1);

  typedef enum logic [1:0] {IDLE, GATE, SETTLE} state_e;
  state_e        state;
  logic [TW-1:0] timer;
  logic          gate;
  logic             gate_m, gate_s, gate_d;   // gate in the RO domain
  logic [CNT_W-1:0] ro_cnt;                   // RO-domain counter

  // ---- system clock domain -------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      timer <= '0;
      gate  <= 1'b0;
      done  <= 1'b0;
      count <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= GATE;
          gate  <= 1'b1;
          timer <= TW'(GATE_CYCLES - 1);
        end
        GATE: begin
          if (timer == '0) begin
            gate  <= 1'b0;
            state <= SETTLE;
            timer <= TW'(SETTLE_CYCLES - 1);
          end else timer <= timer - 1'b1;
        end
        SETTLE: begin
          if (timer == '0) begin
            count <= ro_cnt;   // stable: the RO-domain gate is closed
            done  <= 1'b1;
            state <= IDLE;
          end else timer <= timer - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // ---- ring-oscillator clock domain ----------------------------------

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_m <= 1'b0;
      gate_s <= 1'b0;
      gate_d <= 1'b0;
      ro_cnt <= '0;
    end else begin
      gate_m <= gate;
      gate_s <= gate_m;
      gate_d <= gate_s;
      if (gate_s) ro_cnt <= gate_d ? ro_cnt + 1'b1 : CNT_W'(1);
    end
  end

endmodule

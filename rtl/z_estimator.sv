// z_estimator: turns the two ring-oscillator counts of one measurement into
// the magnitude of the PDN impedance at the stimulus frequency.
//
// With the stressor off the RO runs at f_OFF ~ k * V_SUPPLY; with it on, at
// f_ON ~ k * V_ON. The impedance magnitude is estimated as
//   |Z| = |(f_OFF - f_ON) / f_OFF| * V_SUPPLY / |I_OFF - I_ON|.
// I_OFF and I_ON are constants of the implementation, so
//   z_mohm = |cnt_off - cnt_on| * K / cnt_off,
//   K      = V_SUPPLY_MV * 1000 / DELTA_I_MA  (milliohm per unit ratio),
// with the result in milliohm (1 milliohm resolution), rounded down and
// saturated to Z_W bits. A `start` pulse latches the counts; the product is
// formed in one clock and divided by a restoring divider, one quotient bit
// per clock, so `done` pulses PW + 3 clocks after `start`, PW being the
// product width. A zero `cnt_off` gives the saturated value.
//
// The formula is the published estimate; the fixed-point arithmetic, the
// divider and the default supply step (1 V supply, 1 A current step, an
// assumed value) are this design's own.
module z_estimator #(
  parameter int unsigned CNT_W       = 24,
  parameter int unsigned Z_W         = 16,
  parameter int unsigned V_SUPPLY_MV = 1000,
  parameter int unsigned DELTA_I_MA  = 1000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] cnt_off,
  input  logic [CNT_W-1:0] cnt_on,
  output logic             busy,
  output logic             done,
  output logic [Z_W-1:0]   z_mohm
);

  localparam longint unsigned K  = (64'(V_SUPPLY_MV) * 1000) / 64'(DELTA_I_MA);
  localparam int unsigned     KW = $clog2(K + 1);
  localparam int unsigned     PW = CNT_W + KW;          // product width
  localparam int unsigned     CW = $clog2(PW + 1);

  typedef enum logic [1:0] {IDLE, MUL, DIV} state_e;
  state_e          state;
  logic [CNT_W-1:0] diff, den;
  logic [PW-1:0]   num;      // dividend, shifted out MSB first
  logic [PW-1:0]   quo;
  logic [CNT_W-1:0] rem;
  logic [CW-1:0]   step;
  logic [CNT_W:0]  rem_sh;

  assign rem_sh = {rem, num[PW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      diff   <= '0;
      den    <= '0;
      num    <= '0;
      quo    <= '0;
      rem    <= '0;
      step   <= '0;
      done   <= 1'b0;
      z_mohm <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          diff  <= (cnt_off >= cnt_on) ? cnt_off - cnt_on : cnt_on - cnt_off;
          den   <= cnt_off;
          state <= MUL;
        end
        MUL: begin
          num   <= PW'(diff) * PW'(K);
          quo   <= '0;
          rem   <= '0;
          step  <= CW'(PW);
          state <= DIV;
        end
        DIV: begin
          if (step == '0) begin
            if (den == '0 || |quo[PW-1:Z_W]) z_mohm <= '1;
            else                           z_mohm <= quo[Z_W-1:0];
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            num <= num << 1;
            if (rem_sh >= {1'b0, den}) begin
              rem <= CNT_W'(rem_sh - {1'b0, den});
              quo <= {quo[PW-2:0], 1'b1};
            end else begin
              rem <= rem_sh[CNT_W-1:0];
              quo <= {quo[PW-2:0], 1'b0};
            end
            step <= step - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule

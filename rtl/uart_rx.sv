// uart_rx: serial receiver for the host command link, 8 data bits, no
// parity, one stop bit, least significant bit first.
//
// The line is synchronized by two flip-flops. A falling edge starts a
// frame; the start bit is checked at its middle, and each data bit is
// sampled CLKS_PER_BIT clocks later, at the middle of its bit time. If the
// stop bit is high, `data` is updated and `valid` pulses for one clock
// about half a bit after the middle of the stop bit has been seen. The
// default divisor gives 115200 baud from 100 MHz. The format and rate are
// this design's choice; the host link is only named as a UART.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, BITS, STOP} state_e;
  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic          rx_m, rx_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_m <= 1'b1;
      rx_s <= 1'b1;
    end else begin
      rx_m <= rxd;
      rx_s <= rx_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        IDLE: if (!rx_s) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        START: begin
          if (cnt == '0) begin
            if (!rx_s) begin
              state <= BITS;
              cnt   <= CW'(CLKS_PER_BIT - 1);
              bitn  <= '0;
            end else state <= IDLE;   // glitch, not a start bit
          end else cnt <= cnt - 1'b1;
        end
        BITS: begin
          if (cnt == '0) begin
            shreg <= {rx_s, shreg[7:1]};
            cnt   <= CW'(CLKS_PER_BIT - 1);
            if (bitn == 3'd7) state <= STOP;
            bitn  <= bitn + 1'b1;
          end else cnt <= cnt - 1'b1;
        end
        STOP: begin
          if (cnt == '0) begin
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end
            state <= IDLE;
          end else cnt <= cnt - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule

// uart_tx: serial transmitter for the host command link, 8 data bits, no
// parity, one stop bit, least significant bit first.
//
// A `start` pulse while idle latches `data` and sends start bit, eight data
// bits and stop bit, each CLKS_PER_BIT clocks long; `busy` is high for the
// whole frame (10 bit times) and the line idles high. The format and rate
// are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       txd,
  output logic       busy
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    left;    // bits still to send
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1;
      left  <= '0;
      cnt   <= '0;
      txd   <= 1'b1;
    end else if (left == '0) begin
      txd <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        left  <= 4'd10;
        cnt   <= CW'(CLKS_PER_BIT - 1);
        txd   <= 1'b0;
      end
    end else if (cnt == '0) begin
      frame <= {1'b1, frame[9:1]};
      left  <= left - 1'b1;
      cnt   <= CW'(CLKS_PER_BIT - 1);
      txd   <= (left == 4'd1) ? 1'b1 : frame[1];
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

  assign busy = (left != '0);

endmodule

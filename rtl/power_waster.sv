// power_waster: the buffer-based current source that stimulates the power
// distribution network.
//
// ROWS rows, each a toggle flip-flop driving a chain of CHAIN_LEN buffers.
// A row whose enable `act[r]` is high toggles on every clock edge, so its
// flip-flop and every buffer of its chain switch once per cycle and draw
// dynamic current; a disabled row holds its value and draws none. The total
// current is therefore proportional to the number of enabled rows, which
// the modulator varies to shape the stimulus. The buffer nets carry `keep`
// so that synthesis does not collapse the chains; `row_out` is the end of
// each chain and lets the switching be observed.
//
// The rows of buffer chains follow the described current source; the
// toggle-flip-flop drive and the sizes are this design's choices. The same
// module, with its row outputs on pins, serves as the I/O-bank current
// source.
module power_waster #(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned CHAIN_LEN = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ROWS-1:0] act,
  output logic [ROWS-1:0] row_out
);

  logic [ROWS-1:0] tog;
  (* keep *) logic [CHAIN_LEN-1:0] chain [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tog <= '0;
    else        tog <= tog ^ act;
  end

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    assign chain[r][0] = tog[r];
    for (genvar j = 1; j < int'(CHAIN_LEN); j++) begin : g_buf
      assign chain[r][j] = chain[r][j-1];
    end
    assign row_out[r] = chain[r][CHAIN_LEN-1];
  end

endmodule

// golden_store: on-chip memory for the golden impedance signature.
//
// During enrollment the sorted samples of every frequency point are written
// here; during verification they are read back and compared with a fresh
// measurement. The signature never leaves the chip. The address is
// {pdn, frequency index, sample index} flattened as
//   addr = (pdn * NUM_FREQ + freq) * NUM_REP + sample,
// so DEPTH = 2 * 152 * 105 words by default. One port, synchronous write,
// registered read (one clock of latency), which maps onto block RAM.
// Keeping the signature on chip follows the described threat model; the
// layout and word width are this design's own.
module golden_store #(
  parameter int unsigned DEPTH = 31920,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule

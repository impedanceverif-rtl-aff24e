// sample_sorter: collects the N repeated impedance samples of one frequency
// point and keeps them in ascending order, i.e. it holds the empirical
// distribution of the measurement that the Wasserstein comparison needs.
//
// It is an insertion-sort shift register. On `ins` the new sample goes to
// the first position whose value is larger (or the first empty one), and
// every entry from there on moves one place up, all in one clock. `clear`
// empties it. After k insertions entries 0..k-1 are the k samples in
// ascending order; `rd_data` is entry `rd_idx`, combinationally. Inserting
// into a full sorter is ignored (and flagged by an assertion). `fill` is the
// number of stored samples.
//
// Sorting the repetitions follows the use of empirical distributions in the
// detection; the shift-register sorter is this design's own choice.
module sample_sorter #(
  parameter int unsigned N = 105,
  parameter int unsigned W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   ins,
  input  logic [W-1:0]           din,
  input  logic [$clog2(N)-1:0]   rd_idx,
  output logic [W-1:0]           rd_data,
  output logic [$clog2(N+1)-1:0] fill
);

  localparam int unsigned FW = $clog2(N + 1);

  logic [W-1:0] v [N];
  logic [N-1:0] after;   // entry k is at or past the insertion point

  always_comb begin
    for (int k = 0; k < int'(N); k++)
      after[k] = (FW'(k) >= fill) || (v[k] > din);
  end

  always_ff @(posedge clk) begin
    if (ins && fill < FW'(N)) begin
      for (int k = 0; k < int'(N); k++) begin
        if (after[k]) begin
          if (k == 0)             v[k] <= din;
          else if (!after[k-1])   v[k] <= din;
          else                    v[k] <= v[k-1];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     fill <= '0;
    else if (clear)                 fill <= '0;
    else if (ins && fill < FW'(N))  fill <= fill + 1'b1;
  end

  assign rd_data = (32'(rd_idx) < N) ? v[rd_idx] : '0;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    ins && !clear |-> fill < FW'(N));

endmodule

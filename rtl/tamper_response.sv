// tamper_response: the anti-tamper reaction, key zeroization.
//
// Holds a KEY_W-bit secret. `key_load` stores `key_in` while no tamper has
// been seen. A `tamper` pulse clears the key in the same clock edge and sets
// the sticky `zeroized` flag; from then on the key stays zero and loads are
// refused until reset. Zeroizing a key as the response follows the
// described threat model; the refusal of later loads is this design's
// choice.
module tamper_response #(
  parameter int unsigned KEY_W = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tamper,
  input  logic             key_load,
  input  logic [KEY_W-1:0] key_in,
  output logic [KEY_W-1:0] key_out,
  output logic             zeroized
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_out  <= '0;
      zeroized <= 1'b0;
    end else if (tamper || zeroized) begin
      key_out  <= '0;
      zeroized <= 1'b1;
    end else if (key_load) begin
      key_out  <= key_in;
    end
  end

  a_zero: assert property (@(posedge clk) disable iff (!rst_n) zeroized |-> key_out == '0);

endmodule

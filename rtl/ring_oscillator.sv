// ring_oscillator: behavioural model of the ring-oscillator voltage sensor.
// It is a simulation model, not synthesizable logic: on silicon this is a
// ring of STAGES inverting cells closed through an enable gate (or through
// an I/O buffer when it senses the I/O supply).
//
// The oscillation frequency is proportional to the local supply voltage,
// f_RO = k * V, the property the impedance measurement relies on. Each stage
// delays by STAGE_PS_1V picoseconds at 1000 mV, scaled by 1000 / vdd_mv, so
// the output is a square wave of period 2 * STAGES * stage delay
// (4 ns, 250 MHz, at 1 V with the defaults). The voltage is sampled at every
// half period. With `en` low, or no supply, the output rests at 0. The
// linear voltage law follows the sensor's description; the numbers are this
// model's own.
module ring_oscillator #(
  parameter int unsigned STAGES      = 5,
  parameter int unsigned STAGE_PS_1V = 400
) (
  input  logic        en,
  input  logic [15:0] vdd_mv,
  output logic        ro_out
);

  real half_ns;

  initial ro_out = 1'b0;

  always begin
    if (!en || vdd_mv == 16'd0) begin
      ro_out = 1'b0;
      @(en or vdd_mv);
    end else begin
      // half period = STAGES * stage delay, stage delay ~ 1 / V
      half_ns = real'(STAGES) * real'(STAGE_PS_1V) * 1000.0 / real'(vdd_mv) / 1000.0;
      #(half_ns) ro_out = ~ro_out;
    end
  end

endmodule

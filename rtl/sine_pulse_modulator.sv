// sine_pulse_modulator: decides, cycle by cycle, how many rows of the
// buffer-based current source switch, so that the current drawn from the
// power distribution network follows the stimulus wave.
//
// Sine mode (low frequencies): a 32-bit phase accumulator advances by the
// tuning word `ftw` every clock; its top LUT_BITS bits address a sine lookup
// table whose entry is the number of active rows,
//   level(k) = round(ROWS/2 * (1 + sin(2*pi*k / 2^LUT_BITS))).
// The level is turned into a thermometer code on `act` (rows 0..level-1 on)
// and registered, so `act` lags the phase by one clock.
// Pulse mode (high frequencies): every row follows `pulse_in`, the pulse
// wave from the clock manager, combinationally, for as long as `en` is high.
// With `en` low no row is active and the phase restarts at zero, so every
// activation starts at the same phase.
//
// The sine table and the pulse fallback follow the described modulator;
// the table size, the row count and the thermometer coding are this
// design's choices.
module sine_pulse_modulator #(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned LUT_BITS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,          // stressor active
  input  logic            pulse_mode,  // 1: follow pulse_in
  input  logic [31:0]     ftw,         // tuning word, f = ftw * F_CLK / 2^32
  input  logic            pulse_in,    // pulse wave from the clock manager
  output logic [ROWS-1:0] act          // row enables
);

  localparam int unsigned LVL_W   = $clog2(ROWS + 1);
  localparam int unsigned ENTRIES = 2 ** LUT_BITS;

  typedef logic [LVL_W-1:0] lut_t [ENTRIES];

  function automatic lut_t build_lut();
    lut_t t;
    real pi, s;
    pi = 3.14159265358979323846;
    for (int k = 0; k < int'(ENTRIES); k++) begin
      s = real'(ROWS) / 2.0 * (1.0 + $sin(2.0 * pi * real'(k) / real'(ENTRIES)));
      t[k] = LVL_W'($rtoi(s + 0.5));
    end
    return t;
  endfunction

  localparam lut_t SINE_LUT = build_lut();

  logic [31:0]       phase;
  logic [ROWS-1:0]   sine_act;
  logic [LVL_W-1:0]  level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                phase <= '0;
    else if (en && !pulse_mode) phase <= phase + ftw;
    else                       phase <= '0;
  end

  assign level = SINE_LUT[phase[31 -: LUT_BITS]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sine_act <= '0;
    else begin
      for (int r = 0; r < int'(ROWS); r++)
        sine_act[r] <= en && !pulse_mode && (LVL_W'(r) < level);
    end
  end

  assign act = pulse_mode ? {ROWS{en & pulse_in}} : sine_act;

endmodule

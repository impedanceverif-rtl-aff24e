// freq_plan: the list of stimulus frequencies swept by one impedance scan.
//
// NUM_FREQ points are spaced logarithmically from F_MIN_HZ to F_MAX_HZ
// (f_i = F_MIN * (F_MAX/F_MIN)^(i/(NUM_FREQ-1))), as in the published
// measurement campaign (152 points, 100 Hz to 588 MHz, logarithmic steps).
// For each point the table gives the frequency in Hz, the tuning word of a
// 32-bit phase accumulator clocked at F_CLK_HZ (ftw = f * 2^32 / F_CLK), and
// whether the point is driven with a pulse wave from the clock manager
// instead of the sine lookup table. Sine synthesis only works up to a few
// tens of MHz, so points at or above PULSE_MIN_HZ use the pulse wave; that
// boundary and the 100 MHz system clock are this design's choices.
//
// The table is computed at elaboration time; the lookup is combinational.
module freq_plan
  import iv_pkg::*;
#(
  parameter int unsigned     NUM_FREQ_P   = iv_pkg::NUM_FREQ,
  parameter longint unsigned F_MIN_P      = iv_pkg::F_MIN_HZ,
  parameter longint unsigned F_MAX_P      = iv_pkg::F_MAX_HZ,
  parameter longint unsigned F_CLK_P      = iv_pkg::F_CLK_HZ,
  parameter longint unsigned PULSE_MIN_P  = iv_pkg::PULSE_MIN_HZ
) (
  input  logic [FIDX_W-1:0] idx,
  output fpoint_t           point
);

  typedef logic [31:0] table_t [NUM_FREQ_P];

  // sel = 0: frequency in Hz, sel = 1: tuning word
  function automatic table_t build_table(input bit sel);
    table_t t;
    real ratio, f, tw;
    ratio = $pow(real'(F_MAX_P) / real'(F_MIN_P), 1.0 / real'(NUM_FREQ_P - 1));
    f = real'(F_MIN_P);
    for (int i = 0; i < int'(NUM_FREQ_P); i++) begin
      tw = f * 4294967296.0 / real'(F_CLK_P);
      if (tw > 4294967295.0) tw = 4294967295.0;
      t[i] = sel ? 32'(longint'(tw)) : 32'(longint'(f));
      f = f * ratio;
    end
    return t;
  endfunction

  localparam table_t FREQ_HZ = build_table(1'b0);
  localparam table_t FTW     = build_table(1'b1);

  logic [FIDX_W-1:0] i_sat;
  assign i_sat = (idx < FIDX_W'(NUM_FREQ_P)) ? idx : FIDX_W'(NUM_FREQ_P - 1);

  always_comb begin
    point.freq_hz = FREQ_HZ[i_sat];
    point.ftw     = FTW[i_sat];
    point.pulse   = (64'(FREQ_HZ[i_sat]) >= PULSE_MIN_P);
  end

endmodule

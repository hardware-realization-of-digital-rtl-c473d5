// walsh_wave_top: the three Walsh-series waveform generators side by side.
//
// Sinusoidal, triangular and trapezoidal waves are produced in digital form
// directly from Rademacher and Walsh functions, with no lookup table of
// samples and no multiplier: each channel is a walsh_wave_gen with its own
// coefficient table. The sine and trapezoid use 64-term series (six
// Rademacher functions, 64 steps per period) and the triangle a 32-term
// series (five Rademacher functions, 32 steps per period), the term counts
// the document works with. The channels share clock, reset and enable but
// count their own phase.
//
// Interface: *_p are the samples (16-bit two's complement, 14 fraction
// bits, amplitude 1.0 = 16384); *_rad and *_walsh bring out the Rademacher
// and Walsh functions of each channel (1 means -1), and *_phase the step
// index of each channel. Timing: one sample per enabled clock, one clock
// of latency from phase to sample.
module walsh_wave_top
  import walsh_pkg::*;
#(
  parameter int unsigned SINE_RAD = 6,
  parameter int unsigned TRI_RAD  = 5,
  parameter int unsigned TRAP_RAD = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  output logic [SINE_RAD-1:0]           sine_phase,
  output logic [TRI_RAD-1:0]            tri_phase,
  output logic [TRAP_RAD-1:0]           trap_phase,
  output logic signed [COEF_W-1:0]      sine_p,
  output logic signed [COEF_W-1:0]      tri_p,
  output logic signed [COEF_W-1:0]      trap_p,
  output logic [SINE_RAD:1]             sine_rad,
  output logic [TRI_RAD:1]              tri_rad,
  output logic [TRAP_RAD:1]             trap_rad,
  output logic [(1<<SINE_RAD)-1:0]      sine_walsh,
  output logic [(1<<TRI_RAD)-1:0]       tri_walsh,
  output logic [(1<<TRAP_RAD)-1:0]      trap_walsh
);

  walsh_wave_gen #(.WAVE(WAVE_SINE), .NUM_RAD(SINE_RAD)) u_sine (
    .clk (clk), .rst_n (rst_n), .en (en),
    .phase (sine_phase), .rad (sine_rad), .walsh (sine_walsh), .p (sine_p)
  );

  walsh_wave_gen #(.WAVE(WAVE_TRIANGLE), .NUM_RAD(TRI_RAD)) u_tri (
    .clk (clk), .rst_n (rst_n), .en (en),
    .phase (tri_phase), .rad (tri_rad), .walsh (tri_walsh), .p (tri_p)
  );

  walsh_wave_gen #(.WAVE(WAVE_TRAPEZOID), .NUM_RAD(TRAP_RAD)) u_trap (
    .clk (clk), .rst_n (rst_n), .en (en),
    .phase (trap_phase), .rad (trap_rad), .walsh (trap_walsh), .p (trap_p)
  );

endmodule

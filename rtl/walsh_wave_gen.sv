// walsh_wave_gen: one digital waveform generator built from orthogonal
// (Rademacher and Walsh) functions.
//
// A phase counter yields the Rademacher functions R1..RN (rademacher_gen),
// XOR gates combine them into the 2^N Walsh functions (walsh_gen), and the
// Walsh bits set the signs of the constant series coefficients that are
// summed into the 16-bit sample (walsh_series_sum). The waveform is chosen
// by WAVE, which selects the coefficient table of walsh_pkg; any other
// periodic shape only needs another table. The output is, on each of the
// 2^N steps of the period, the mean of the ideal amplitude-1 waveform over
// that step.
//
// Interface: en advances the phase; p is the sample (Q2.14, two's
// complement); rad and walsh bring out the Rademacher and Walsh functions
// (1 means -1) and phase the step index. Timing: one step per enabled clock,
// period 2^NUM_RAD steps; p lags phase, rad and walsh by one clock.
// The structure (Rademacher -> Walsh by XOR -> signed sum) follows the
// document; the Q2.14 format, the register at the output and the enable
// are choices of this design.
module walsh_wave_gen
  import walsh_pkg::*;
#(
  parameter wave_e       WAVE    = WAVE_SINE,
  parameter int unsigned NUM_RAD = 6
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  output logic [NUM_RAD-1:0]           phase,
  output logic [NUM_RAD:1]             rad,
  output logic [(1<<NUM_RAD)-1:0]      walsh,
  output logic signed [COEF_W-1:0]     p
);

  rademacher_gen #(.NUM_RAD(NUM_RAD)) u_rad (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .rad   (rad),
    .phase (phase)
  );

  walsh_gen #(.NUM_RAD(NUM_RAD)) u_walsh (
    .rad   (rad),
    .walsh (walsh)
  );

  walsh_series_sum #(
    .NUM_RAD (NUM_RAD),
    .OUT_W   (COEF_W),
    .COEF    (wave_table(WAVE))
  ) u_sum (
    .clk   (clk),
    .rst_n (rst_n),
    .walsh (walsh),
    .p     (p)
  );

endmodule

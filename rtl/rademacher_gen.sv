// rademacher_gen: generates the Rademacher functions R1..RN in digital form.
//
// R_(n+1)(x) = Sgn(sin(2*pi*2^n*x)) is a square wave that is +1 on the first
// half and -1 on the second half of each of its 2^n periods inside [0,1).
// With the period [0,1) divided into 2^N clock-wide steps and an N-bit
// phase counter k (x = k/2^N), R_(n+1) is -1 exactly when bit N-1-n of k is
// set: R1 is the counter's top bit, RN its bottom bit. Following the usual
// digital mapping, +1 is carried as logic 0 and -1 as logic 1, so the
// counter bits are the Rademacher functions directly.
//
// Interface: rad[k] is R_k (k = 1..NUM_RAD, 1 means -1); phase is the step
// index k. Timing: the counter advances by one on every clock with en high,
// so one period of every wave is 2^NUM_RAD enabled clocks. Synchronous
// active-low reset to phase 0 (all R = +1). The count enable is a choice of
// this design; the document clocks the functions straight from the clock.
module rademacher_gen #(
  parameter int unsigned NUM_RAD = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic [NUM_RAD:1]   rad,
  output logic [NUM_RAD-1:0] phase
);

  always_ff @(posedge clk) begin
    if (!rst_n)  phase <= '0;
    else if (en) phase <= phase + 1'b1;
  end

  always_comb begin
    for (int k = 1; k <= NUM_RAD; k++) rad[k] = phase[NUM_RAD-k];
  end

endmodule

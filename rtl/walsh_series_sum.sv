// walsh_series_sum: adds the Walsh series sum_n A_n * psi(n) into one sample.
//
// Each Walsh function is +1 or -1, so the product A_n * psi(n) is A_n or
// -A_n: the Walsh bit (1 means -1) picks the sign of a constant coefficient
// and no multiplier is needed. All 2^NUM_RAD signed terms are added in one
// combinational sum; terms with a zero coefficient vanish at synthesis. The
// sum is formed in a wider accumulator; since a truncated Walsh series of a
// function bounded by 1.0 is itself bounded by 1.0 (it is a mean of the
// function over each step), the result always fits the OUT_W-bit output,
// which an assertion checks in simulation.
//
// Interface: walsh[n] is psi(n); COEF holds A_n in Q2.14 (walsh_pkg); p is
// the sample, two's complement, 14 fraction bits. Timing: p is registered,
// so it shows the sum for the Walsh values present one clock earlier; a new
// sample every clock. Synchronous active-low reset clears p. The register
// is a choice of this design.
module walsh_series_sum
  import walsh_pkg::*;
#(
  parameter int unsigned NUM_RAD = 6,
  parameter int unsigned OUT_W   = COEF_W,
  parameter coef_table_t COEF    = SINE_COEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [(1<<NUM_RAD)-1:0]       walsh,
  output logic signed [OUT_W-1:0]       p
);

  localparam int unsigned ACC_W = COEF_W + NUM_RAD + 1;
  localparam logic signed [ACC_W-1:0] MAX_OUT = (ACC_W'(1) <<< (OUT_W-1)) - 1;
  localparam logic signed [ACC_W-1:0] MIN_OUT = -(ACC_W'(1) <<< (OUT_W-1));

  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int n = 0; n < (1 << NUM_RAD); n++) begin
      if (walsh[n]) acc = acc - ACC_W'(COEF[n]);
      else          acc = acc + ACC_W'(COEF[n]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) p <= '0;
    else        p <= acc[OUT_W-1:0];
  end

  // The series sum must be representable in the output format.
  always_ff @(posedge clk) begin
    if (rst_n)
      assert (acc <= MAX_OUT && acc >= MIN_OUT)
        else $error("walsh_series_sum: sum %0d does not fit %0d bits", acc, OUT_W);
  end

  initial begin
    assert (NUM_RAD >= 1 && NUM_RAD <= MAX_RAD)
      else $error("walsh_series_sum: NUM_RAD must be 1..%0d", MAX_RAD);
  end

endmodule

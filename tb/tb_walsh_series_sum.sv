// tb_walsh_series_sum: feeds the Walsh values of every step of a period
// (built here from the definition, not by walsh_gen) into three summers
// loaded with the sine, triangle and trapezoid tables and compares each
// registered sample, one clock later, with the mean of the ideal waveform
// over that step. The triangle and trapezoid must match exactly, the sine
// within the rounding of its 16 non-zero coefficients (8 LSB).
module tb_walsh_series_sum;
  import walsh_pkg::*;
  import walsh_ref_pkg::*;

  localparam int NRAD = 6;
  localparam int M    = 1 << NRAD;

  logic clk = 0, rst_n = 0;
  logic [M-1:0] walsh;
  logic signed [COEF_W-1:0] p_sin, p_tri, p_trap;

  int checks = 0, failures = 0;

  walsh_series_sum #(.NUM_RAD(NRAD), .COEF(SINE_COEF))      u_sin  (.clk, .rst_n, .walsh, .p(p_sin));
  walsh_series_sum #(.NUM_RAD(NRAD), .COEF(TRIANGLE_COEF))  u_tri  (.clk, .rst_n, .walsh, .p(p_tri));
  walsh_series_sum #(.NUM_RAD(NRAD), .COEF(TRAPEZOID_COEF)) u_trap (.clk, .rst_n, .walsh, .p(p_trap));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, int wave, int k, logic signed [COEF_W-1:0] got, real tol);
    real ref_v;
    ref_v = ideal_mean(wave, k, NRAD);
    checks++;
    if (absr(real'(got) - ref_v) > tol) begin
      failures++;
      $display("%s step %0d: p=%0d expected %0.2f", name, k, got, ref_v);
    end
  endtask

  initial begin
    walsh = '0;
    @(posedge clk); @(negedge clk);
    checks++;
    if (p_sin !== '0) begin failures++; $display("reset did not clear p"); end
    rst_n = 1;
    for (int k = 0; k < M; k++) begin
      int rbits;
      rbits = 0;
      for (int n = 0; n < NRAD; n++) rbits[n] = rad_bit(n, k, NRAD);
      for (int n = 0; n < M; n++) walsh[n] = walsh_sign(n, rbits, NRAD) < 0;
      // sample must not change before the clock edge
      @(posedge clk); #1;
      check("sine",      0, k, p_sin,  8.0);
      check("triangle",  1, k, p_tri,  0.01);
      check("trapezoid", 2, k, p_trap, 0.01);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

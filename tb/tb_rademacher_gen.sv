// tb_rademacher_gen: checks the Rademacher functions against
// Sgn(sin(2*pi*2^n*x)) at every step, with the count enable toggled at
// random, and checks that every function repeats after 2^N enabled clocks.
module tb_rademacher_gen;
  import walsh_ref_pkg::*;

  localparam int NRAD = 6;
  localparam int M    = 1 << NRAD;

  logic            clk = 0;
  logic            rst_n = 0;
  logic            en = 0;
  logic [NRAD:1]   rad;
  logic [NRAD-1:0] phase;

  int checks = 0, failures = 0;
  int k_model = 0;
  int wraps = 0;

  rademacher_gen #(.NUM_RAD(NRAD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 4 * M * 2; cyc++) begin
      @(negedge clk);
      // compare with the definition at the current step
      checks++;
      if (phase !== NRAD'(k_model)) begin
        failures++;
        $display("phase %0d expected %0d", phase, k_model);
      end
      for (int n = 0; n < NRAD; n++) begin
        checks++;
        if (rad[n+1] !== rad_bit(n, k_model, NRAD)) begin
          failures++;
          $display("step %0d: R%0d=%0b expected %0b", k_model, n+1, rad[n+1],
                   rad_bit(n, k_model, NRAD));
        end
      end
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        k_model = (k_model + 1) % M;
        if (k_model == 0) wraps++;
      end
    end
    // period: after wrapping, all Rademacher functions are +1 again
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("only %0d periods completed", wraps);
    end
    // synchronous reset returns to phase 0
    @(negedge clk); en = 1; rst_n = 0;
    @(posedge clk); @(negedge clk);
    checks++;
    if (phase !== '0 || rad !== '0) begin
      failures++;
      $display("reset did not clear phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

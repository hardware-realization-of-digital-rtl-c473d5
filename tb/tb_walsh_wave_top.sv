// tb_walsh_wave_top: end-to-end test of the three-channel generator at its
// default sizes (64-term sine, 32-term triangle, 64-term trapezoid).
//
// Runs about five sine periods, holding the enable low on random clocks and
// applying one reset in the middle. Every clock it checks each channel's
// sample against the mean of the ideal waveform over the step shown one
// clock earlier, the Rademacher outputs against Sgn(sin(2*pi*2^n*x)) and the
// Walsh outputs against the product of Rademacher values. It counts how
// often each mechanism happened (period wrap of each channel, enable held
// low, mid-run reset, a term entering the sum negated by its Walsh bit,
// negative and positive samples) and fails any that never happened. It also
// records the peak values of each wave and checks them against the ideal
// step means.
module tb_walsh_wave_top;
  import walsh_pkg::*;
  import walsh_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [5:0] sine_phase, trap_phase;
  logic [4:0] tri_phase;
  logic signed [15:0] sine_p, tri_p, trap_p;
  logic [6:1] sine_rad, trap_rad;
  logic [5:1] tri_rad;
  logic [63:0] sine_walsh, trap_walsh;
  logic [31:0] tri_walsh;

  walsh_wave_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wrap_s = 0, n_wrap_t = 0, n_wrap_p = 0, n_hold = 0, n_reset = 0;
  int n_neg_term = 0, n_neg_s = 0, n_neg_t = 0, n_pos_s = 0, n_pos_t = 0;
  int max_s = -100000, min_s = 100000, max_t = -100000, min_t = 100000;
  int max_p = -100000, min_p = 100000;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_val(string name, int wave, int k, int nrad,
                           logic signed [15:0] got, real tol);
    real ref_v;
    ref_v = ideal_mean(wave, k, nrad);
    checks++;
    if (absr(real'(got) - ref_v) > tol) begin
      failures++;
      $display("%s step %0d: p=%0d expected %0.2f", name, k, got, ref_v);
    end
  endtask

  task automatic check_funcs(string name, int k, int nrad,
                             logic [6:1] rad, logic [63:0] walsh);
    int rbits;
    rbits = 0;
    for (int n = 0; n < nrad; n++) begin
      rbits[n] = rad_bit(n, k, nrad);
      checks++;
      if (rad[n+1] !== rbits[n]) begin
        failures++; $display("%s step %0d: R%0d wrong", name, k, n+1);
      end
    end
    for (int n = 0; n < (1 << nrad); n++) begin
      checks++;
      if (walsh[n] !== (walsh_sign(n, rbits, nrad) < 0)) begin
        failures++; $display("%s step %0d: psi(%0d) wrong", name, k, n);
      end
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, count);
  endtask

  int ks = 0, kt = 0, kp = 0;
  int ks_prev, kt_prev, kp_prev;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      checks += 3;
      if (sine_phase != 6'(ks)) begin failures++; $display("sine phase %0d vs %0d", sine_phase, ks); end
      if (tri_phase  != 5'(kt)) begin failures++; $display("tri phase %0d vs %0d", tri_phase, kt); end
      if (trap_phase != 6'(kp)) begin failures++; $display("trap phase %0d vs %0d", trap_phase, kp); end
      check_funcs("sine", ks, 6, sine_rad, sine_walsh);
      check_funcs("triangle", kt, 5, {1'b0, tri_rad}, {32'b0, tri_walsh});
      check_funcs("trapezoid", kp, 6, trap_rad, trap_walsh);
      for (int n = 0; n < 64; n++)
        if (SINE_COEF[n] != 0 && sine_walsh[n]) n_neg_term++;
      ks_prev = ks; kt_prev = kt; kp_prev = kp;
      en = ($urandom_range(0, 4) != 0);
      if (cyc == 200) begin
        rst_n = 0; en = 1;
      end else rst_n = 1;
      @(posedge clk);
      if (!rst_n) begin
        n_reset++;
        ks = 0; kt = 0; kp = 0;
      end else if (en) begin
        ks = (ks + 1) % 64; kt = (kt + 1) % 32; kp = (kp + 1) % 64;
        if (ks == 0) n_wrap_s++;
        if (kt == 0) n_wrap_t++;
        if (kp == 0) n_wrap_p++;
      end else n_hold++;
      #1;
      if (!rst_n) begin
        checks++;
        if (sine_p != 0 || tri_p != 0 || trap_p != 0) begin
          failures++; $display("reset did not clear the samples");
        end
      end else if (cyc > 0 && cyc != 201) begin
        check_val("sine",      0, ks_prev, 6, sine_p, 8.0);
        check_val("triangle",  1, kt_prev, 5, tri_p,  0.01);
        check_val("trapezoid", 2, kp_prev, 6, trap_p, 0.01);
        if (sine_p < 0) n_neg_s++; else if (sine_p > 0) n_pos_s++;
        if (tri_p  < 0) n_neg_t++; else if (tri_p  > 0) n_pos_t++;
        if (int'(sine_p) > max_s) max_s = int'(sine_p);
        if (int'(sine_p) < min_s) min_s = int'(sine_p);
        if (int'(tri_p)  > max_t) max_t = int'(tri_p);
        if (int'(tri_p)  < min_t) min_t = int'(tri_p);
        if (int'(trap_p) > max_p) max_p = int'(trap_p);
        if (int'(trap_p) < min_p) min_p = int'(trap_p);
      end
    end
    // Peaks: the steps next to x = 1/4 and 3/4.
    checks += 6;
    if (absr(real'(max_s) - ideal_mean(0, 15, 6)) > 8.0) begin failures++; $display("sine max %0d", max_s); end
    if (absr(real'(min_s) - ideal_mean(0, 47, 6)) > 8.0) begin failures++; $display("sine min %0d", min_s); end
    if (real'(max_t) != ideal_mean(1, 7, 5) || real'(min_t) != ideal_mean(1, 23, 5)) begin failures++; $display("triangle peaks %0d %0d", max_t, min_t); end
    if (real'(max_p) != ideal_mean(2, 32, 6)) begin failures++; $display("trapezoid max %0d", max_p); end
    if (real'(min_p) != ideal_mean(2, 0, 6)) begin failures++; $display("trapezoid min %0d", min_p); end
    if (max_s <= 0 || min_s >= 0) begin failures++; $display("sine does not swing both ways"); end
    $display("mechanisms:");
    need("sine period wrap",          n_wrap_s);
    need("triangle period wrap",      n_wrap_t);
    need("trapezoid period wrap",     n_wrap_p);
    need("enable held low",           n_hold);
    need("mid-run reset",             n_reset);
    need("term negated by Walsh bit", n_neg_term);
    need("negative sine sample",      n_neg_s);
    need("positive sine sample",      n_pos_s);
    need("negative triangle sample",  n_neg_t);
    need("positive triangle sample",  n_pos_t);
    $display("peaks: sine %0d/%0d triangle %0d/%0d trapezoid %0d/%0d",
             max_s, min_s, max_t, min_t, max_p, min_p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

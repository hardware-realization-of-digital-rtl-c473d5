// tb_walsh_wave_gen: runs a sine, a triangle (five Rademacher functions) and
// a trapezoid generator for several periods with the enable toggled at
// random. Every clock it checks that the sample equals the mean of the
// ideal waveform over the step shown one clock earlier (one-clock latency),
// that the phase advances only when enabled, and that each wave repeats
// after exactly 2^N enabled clocks.
module tb_walsh_wave_gen;
  import walsh_pkg::*;
  import walsh_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;

  logic [5:0] ph_s, ph_p;
  logic [4:0] ph_t;
  logic [6:1] rad_s, rad_p;
  logic [5:1] rad_t;
  logic [63:0] w_s, w_p;
  logic [31:0] w_t;
  logic signed [15:0] p_s, p_t, p_p;

  int checks = 0, failures = 0;

  walsh_wave_gen #(.WAVE(WAVE_SINE), .NUM_RAD(6)) u_s
    (.clk, .rst_n, .en, .phase(ph_s), .rad(rad_s), .walsh(w_s), .p(p_s));
  walsh_wave_gen #(.WAVE(WAVE_TRIANGLE), .NUM_RAD(5)) u_t
    (.clk, .rst_n, .en, .phase(ph_t), .rad(rad_t), .walsh(w_t), .p(p_t));
  walsh_wave_gen #(.WAVE(WAVE_TRAPEZOID), .NUM_RAD(6)) u_p
    (.clk, .rst_n, .en, .phase(ph_p), .rad(rad_p), .walsh(w_p), .p(p_p));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, int wave, int k, int nrad,
                       logic signed [15:0] got, real tol);
    real ref_v;
    ref_v = ideal_mean(wave, k, nrad);
    checks++;
    if (absr(real'(got) - ref_v) > tol) begin
      failures++;
      $display("%s step %0d: p=%0d expected %0.2f", name, k, got, ref_v);
    end
  endtask

  int ks = 0, kt = 0, kp = 0;          // model phase
  int ks_prev, kt_prev, kp_prev;
  int en_count = 0, first_wrap_s = -1, second_wrap_s = -1;
  int first_wrap_t = -1, second_wrap_t = -1;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      checks += 3;
      if (ph_s != 6'(ks)) begin failures++; $display("sine phase %0d vs %0d", ph_s, ks); end
      if (ph_t != 5'(kt)) begin failures++; $display("tri phase %0d vs %0d", ph_t, kt); end
      if (ph_p != 6'(kp)) begin failures++; $display("trap phase %0d vs %0d", ph_p, kp); end
      ks_prev = ks; kt_prev = kt; kp_prev = kp;
      en = (cyc < 150) ? 1'b1 : ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (en) begin
        en_count++;
        ks = (ks + 1) % 64; kt = (kt + 1) % 32; kp = (kp + 1) % 64;
        if (ks == 0) begin
          if (first_wrap_s < 0) first_wrap_s = en_count;
          else if (second_wrap_s < 0) second_wrap_s = en_count;
        end
        if (kt == 0) begin
          if (first_wrap_t < 0) first_wrap_t = en_count;
          else if (second_wrap_t < 0) second_wrap_t = en_count;
        end
      end
      #1;
      // sample now reflects the phase held before this edge
      check("sine",      0, ks_prev, 6, p_s, 8.0);
      check("triangle",  1, kt_prev, 5, p_t, 0.01);
      check("trapezoid", 2, kp_prev, 6, p_p, 0.01);
    end
    checks += 2;
    if (second_wrap_s - first_wrap_s != 64) begin
      failures++; $display("sine period %0d enabled clocks", second_wrap_s - first_wrap_s);
    end
    if (second_wrap_t - first_wrap_t != 32) begin
      failures++; $display("triangle period %0d enabled clocks", second_wrap_t - first_wrap_t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

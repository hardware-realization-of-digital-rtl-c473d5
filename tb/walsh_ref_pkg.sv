// walsh_ref_pkg: reference values for the waveform testbenches, worked out
// from the ideal waveforms and not from any coefficient table.
//
// A Walsh series truncated to 2^N terms equals, on each of the 2^N steps of
// the period, the mean of the ideal function over that step. ideal_mean()
// returns that mean in output LSBs (2^-14): for the sine it integrates
// sin(2*pi*x) in closed form, for the triangle and trapezoid (straight
// pieces with corners on step boundaries) it is the value at the step's
// midpoint. rad_bit() and walsh_sign() give the Rademacher and Walsh values
// from their definitions Sgn(sin(2*pi*2^n*x)) and product of Rademachers.
package walsh_ref_pkg;

  localparam real PI  = 3.14159265358979323846;
  localparam real LSB = 16384.0;

  // 0 = sine, 1 = triangle, 2 = trapezoid (same order as walsh_pkg::wave_e)
  function automatic real ideal_f(int wave, real x);
    case (wave)
      1: begin
        if (x <= 0.25)      return 4.0 * x;
        else if (x <= 0.75) return 2.0 - 4.0 * x;
        else                return 4.0 * (x - 1.0);
      end
      2: begin
        if (x <= 0.25)      return 4.0 * x;
        else if (x <= 0.75) return 1.0;
        else                return 4.0 - 4.0 * x;
      end
      default: return $sin(2.0 * PI * x);
    endcase
  endfunction

  function automatic real ideal_mean(int wave, int k, int nrad);
    real a, b, m;
    m = real'(1 << nrad);
    a = real'(k) / m;
    b = real'(k + 1) / m;
    if (wave == 0)
      return LSB * ($cos(2.0 * PI * a) - $cos(2.0 * PI * b)) / (2.0 * PI * (b - a));
    return LSB * ideal_f(wave, (a + b) / 2.0);
  endfunction

  // Rademacher R_(n+1) at the midpoint of step k: 1 when it is -1.
  function automatic bit rad_bit(int n, int k, int nrad);
    real x;
    x = (real'(k) + 0.5) / real'(1 << nrad);
    return $sin(2.0 * PI * real'(1 << n) * x) < 0.0;
  endfunction

  // Walsh psi(n) as +1/-1 from a vector of Rademacher bits (bit i = R_(i+1)).
  function automatic int walsh_sign(int n, int radbits, int nrad);
    int s;
    s = 1;
    for (int i = 0; i < nrad; i++)
      if (n[i]) s = s * (radbits[i] ? -1 : 1);
    return s;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage

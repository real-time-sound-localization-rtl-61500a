// tb_sound_pkg: test signals and reference arithmetic shared by testbenches.
//
// noise(n, seed) is a repeatable white-noise sample for any index n (an
// integer hash), so a microphone signal delayed by d samples is simply
// noise(n - d). mic_delay() gives the far-field arrival delay of each
// microphone for a source at azimuth theta: the three microphones sit on a
// circle of radius R samples (R * 16 kHz / speed of sound) at 0, +120 and
// -120 degrees. ref_azimuth() is the floating-point answer the chip should
// give for a set of integer pair delays.
package tb_sound_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic logic signed [15:0] noise(int n, int seed, int shift = 2);
    logic [31:0] h;
    h = 32'(n) * 32'h9E3779B1 ^ (32'(seed) * 32'h85EBCA6B);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return signed'(h[15:0]) >>> shift;
  endfunction

  // arrival delay of microphone m (0..2), in samples, plus a common offset
  function automatic int mic_delay(real theta_deg, int m, real radius);
    real phi, t;
    phi = (m == 0) ? 0.0 : (m == 1) ? 120.0 : -120.0;
    t   = -radius * $cos((theta_deg - phi) * PI / 180.0);
    return 40 + int'($floor(t + 0.5));
  endfunction

  function automatic real ref_azimuth(int d12, int d13, int d23);
    real x, y;
    x = -real'(d12 + d13);
    y = -$sqrt(3.0) * real'(d23);
    if (x == 0.0 && y == 0.0) return 0.0;
    return $atan2(y, x) * 180.0 / PI;
  endfunction

  // smallest difference between two angles in degrees
  function automatic real ang_diff(real a, real b);
    real d;
    d = a - b;
    while (d > 180.0)   d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return (d < 0.0) ? -d : d;
  endfunction

endpackage

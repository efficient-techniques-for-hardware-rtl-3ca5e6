// array_scenario_pkg: test signals for the four-element CMA array.
//
// Builds 8-bit I/Q snapshots of a four-element circular array (radius
// 0.375 wavelength, 30 deg elevation tilt, elements every 90 deg) that
// receives a QPSK desired signal and a QPSK interferer 3 dB weaker from two
// azimuths, plus a little uniform noise. An optional one-bit phase pattern
// (+/-47.7 deg per element, bit = 1 for +) models the RF phase shifters in
// front of the processor. Amplitudes are chosen so that samples stay well
// inside the 8-bit range. Used only by testbenches.
package array_scenario_pkg;

  localparam real PI    = 3.14159265358979;
  localparam real KA    = 2.0 * PI * 0.375 * 0.5;   // k a sin(30 deg)
  localparam real PS    = 47.7 * PI / 180.0;        // one-bit phase step

  class scenario;
    real az_d, az_i, amp_d, amp_i, noise;
    int  sd, si;                                    // current symbols 0..3

    function new(real az_d_deg = 30.0, real az_i_deg = 120.0,
                 real amp_d = 0.30, real noise = 0.01);
      this.az_d  = az_d_deg * PI / 180.0;
      this.az_i  = az_i_deg * PI / 180.0;
      this.amp_d = amp_d;
      this.amp_i = amp_d / $sqrt(2.0);              // 3 dB weaker
      this.noise = noise;
    endfunction

    // Draw new symbols for the next snapshot.
    function void next();
      sd = $urandom_range(3);
      si = $urandom_range(3);
    endfunction

    // Element n (0..3) sample with phase pattern ps, as 8-bit Q1.7 words.
    function void elem(int n, logic [3:0] ps, output int re, output int im);
      real pn, ph_d, ph_i, a, r, q;
      pn   = n * PI / 2.0;
      a    = ps[n] ? PS : -PS;
      ph_d = KA * $cos(az_d - pn) + a + PI / 4.0 + sd * PI / 2.0;
      ph_i = KA * $cos(az_i - pn) + a + PI / 4.0 + si * PI / 2.0;
      r = amp_d * $cos(ph_d) + amp_i * $cos(ph_i) + noise * ($urandom_range(2000) / 1000.0 - 1.0);
      q = amp_d * $sin(ph_d) + amp_i * $sin(ph_i) + noise * ($urandom_range(2000) / 1000.0 - 1.0);
      re = $rtoi(r * 128.0 + (r >= 0 ? 0.5 : -0.5));
      im = $rtoi(q * 128.0 + (q >= 0 ? 0.5 : -0.5));
    endfunction

    // Expected received power of beam pattern ps (array sum, both signals).
    function real beam_power(logic [3:0] ps);
      real sdr, sdi, sir, sii, pn, a, ph;
      sdr = 0; sdi = 0; sir = 0; sii = 0;
      for (int n = 0; n < 4; n++) begin
        pn = n * PI / 2.0;
        a  = ps[n] ? PS : -PS;
        ph = KA * $cos(az_d - pn) + a; sdr += $cos(ph); sdi += $sin(ph);
        ph = KA * $cos(az_i - pn) + a; sir += $cos(ph); sii += $sin(ph);
      end
      return amp_d * amp_d * (sdr * sdr + sdi * sdi) + amp_i * amp_i * (sir * sir + sii * sii);
    endfunction
  endclass

endpackage

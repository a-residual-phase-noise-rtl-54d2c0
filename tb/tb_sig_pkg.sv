// tb_sig_pkg: stimulus for the receiver testbenches, independent of the RTL.
//
// Builds IEEE 802.15.4 frames (eight zero symbols of preamble, SFD 0xA7,
// length byte, payload; each byte sent low nibble first), spreads them into
// chips with the standard's table (written out here, not taken from the RTL
// package) and produces half-sine O-QPSK baseband samples: chip n has its
// pulse peak at time n (in chip periods), even chips on I, odd on Q, pulse
// cos(pi*u/2) for |u| < 1. Sample s is taken at t = (s - tau0)/sps. The
// carrier offset is f cycles per chip, the phase offset theta radians, and
// Gaussian noise of standard deviation sigma is added per rail. Before the
// first chip the preamble continues periodically.
package tb_sig_pkg;
  localparam real PI = 3.14159265358979323846;

  // 802.15.4 2.4 GHz chip sequences, c0 first
  localparam string SEQ [16] = '{
    "11011001110000110101001000101110", "11101101100111000011010100100010",
    "00101110110110011100001101010010", "00100010111011011001110000110101",
    "01010010001011101101100111000011", "00110101001000101110110110011100",
    "11000011010100100010111011011001", "10011100001101010010001011101101",
    "10001100100101100000011101111011", "10111000110010010110000001110111",
    "01111011100011001001011000000111", "01110111101110001100100101100000",
    "00000111011110111000110010010110", "01100000011101111011100011001001",
    "10010110000001110111101110001100", "11001001011000000111011110111000"};

  function automatic bit chip_of(int sym, int n);
    return SEQ[sym][n] == "1";
  endfunction

  // symbols of a frame: preamble, SFD, PHR, payload
  function automatic void frame_symbols(input byte unsigned payload[$], output int syms[$]);
    byte unsigned bytes[$];
    syms = {};
    bytes = {8'h00, 8'h00, 8'h00, 8'h00, 8'hA7, 8'(payload.size())};
    foreach (payload[i]) bytes.push_back(payload[i]);
    foreach (bytes[i]) begin
      syms.push_back(int'(bytes[i][3:0]));
      syms.push_back(int'(bytes[i][7:4]));
    end
  endfunction

  function automatic void spread(input int syms[$], output bit chips[$]);
    chips = {};
    foreach (syms[i])
      for (int n = 0; n < 32; n++) chips.push_back(chip_of(syms[i], n));
  endfunction

  // MSK-equivalent bit of chip n (needs chip n-1)
  function automatic bit msk_equiv(int n, bit c, bit c_prev);
    return (n % 2 == 1) ? (c ^ c_prev) : !(c ^ c_prev);
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic bit chip_at(ref bit chips[$], input int n, output bit valid);
    valid = 1'b1;
    if (n < 0) return chips[((n % 32) + 32) % 32];
    if (n >= chips.size()) begin
      valid = 1'b0;
      return 1'b0;
    end
    return chips[n];
  endfunction

  // baseband sample s; returns the noiseless phase too
  function automatic void sample(ref bit chips[$], input int s, input int sps, input real tau0,
                                 input real f, input real theta, input real amp,
                                 input real sigma, output shortint x, output shortint y);
    real t, i_s, q_s, ph, xr, yr, u;
    int n0;
    bit c, v;
    t   = (real'(s) - tau0) / real'(sps);
    n0  = $floor(t);
    i_s = 0.0;
    q_s = 0.0;
    for (int n = n0; n <= n0 + 1; n++) begin
      u = t - real'(n);
      if (u > -1.0 && u < 1.0) begin
        c = chip_at(chips, n, v);
        if (v) begin
          if (n % 2 == 0) i_s += (c ? 1.0 : -1.0) * $cos(PI * u / 2.0);
          else            q_s += (c ? 1.0 : -1.0) * $cos(PI * u / 2.0);
        end
      end
    end
    ph = 2.0 * PI * f * t + theta;
    xr = amp * (i_s * $cos(ph) - q_s * $sin(ph)) + sigma * gauss();
    yr = amp * (i_s * $sin(ph) + q_s * $cos(ph)) + sigma * gauss();
    x = shortint'($rtoi(xr));
    y = shortint'($rtoi(yr));
  endfunction

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // phase in turns * 2**32 (0 .. 2**32-1)
  function automatic longint unsigned turns32(real x, real y);
    real a;
    a = $atan2(y, x) / (2.0 * PI);
    if (a < 0.0) a += 1.0;
    return longint'(a * 4294967296.0) & 64'hFFFF_FFFF;
  endfunction

  // signed distance between two phase words, in turns
  function automatic real pdiff(longint unsigned a, longint unsigned b);
    longint d;
    d = longint'(a) - longint'(b);
    d = ((d % 64'sd4294967296) + 64'sd4294967296) % 64'sd4294967296;
    if (d >= 64'sd2147483648) d -= 64'sd4294967296;
    return real'(d) / 4294967296.0;
  endfunction
endpackage

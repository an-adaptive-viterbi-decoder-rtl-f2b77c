// vit_tb_pkg - reference models used by the decoder testbenches.
//
// conv_encode: a rate-1/2 convolutional encoder of constraint length K with
// the standard octal generator pairs (7,5), (17,15), (35,23), (75,53) and
// (171,133); the shift register holds the last K-1 input bits with the newest
// in the MSB. The tables below are written out independently of the RTL.
package vit_tb_pkg;

  // Generator pair {first code bit, second code bit} for K = 3..7.
  function automatic int unsigned g_first(int k);
    int unsigned t [3:7] = '{'o7, 'o17, 'o35, 'o75, 'o171};
    return t[k];
  endfunction

  function automatic int unsigned g_second(int k);
    int unsigned t [3:7] = '{'o5, 'o15, 'o23, 'o53, 'o133};
    return t[k];
  endfunction

  // Encodes bit b from register sr (K-1 bits); returns {c1, c0} and updates sr.
  function automatic logic [1:0] conv_encode(int k, ref int unsigned sr, input logic b);
    int unsigned w;
    logic c0, c1;
    w  = (int'(b) << (k - 1)) | sr;
    c0 = ^(w & g_first(k));
    c1 = ^(w & g_second(k));
    sr = w >> 1;
    return {c1, c0};
  endfunction

  // Clocks per symbol of each decoder and its decoded-bit delay in symbols.
  function automatic int exp_cps(int k);
    int t [3:7] = '{4, 5, 5, 6, 7};
    return t[k];
  endfunction

  function automatic int exp_delay(int k);
    int t [3:7] = '{19, 29, 39, 48, 57};
    return t[k];
  endfunction

  // Requested clock (kHz): maximum frequency, or the one for 4.71 Mbit/s.
  function automatic int exp_khz(int k, bit max_rate);
    int mx [3:7] = '{39800, 44760, 37050, 36510, 32950};
    int fx [3:7] = '{18830, 23540, 23540, 28250, 32950};
    return max_rate ? mx[k] : fx[k];
  endfunction

  // Smallest K whose BER-1e-5 SNR (0.1 dB) is reached; 7 otherwise.
  function automatic int k_for_snr(int snr);
    if (snr >= 53) return 3;
    if (snr >= 49) return 4;
    if (snr >= 43) return 5;
    if (snr >= 38) return 6;
    return 7;
  endfunction

endpackage

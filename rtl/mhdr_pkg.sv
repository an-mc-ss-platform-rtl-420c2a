// Shared constants and types of the MC-SS (multicarrier spread-spectrum) modem.
// The numbers are those of the 40 MHz configuration: a 256-point FFT with 192
// data, 19 pilot and 45 null subcarriers, a 10-sample cyclic prefix and a
// spreading factor of 8. The six modulation/coding modes are QPSK, 16-QAM and
// 64-QAM combined with code rates 1/2, 2/3 and 3/4 of a K=7 convolutional code.
// Helper functions give bits per subcarrier, puncturing and subcarrier map;
// the subcarrier map and pilot spacing are this design's own choice.
package mhdr_pkg;

  localparam int N_FFT   = 256;
  localparam int N_DATA  = 192;
  localparam int N_PILOT = 19;
  localparam int N_GUARD = 45;
  localparam int N_CP    = 10;
  localparam int SF      = 8;
  localparam int K_CONV  = 7;
  localparam int N_TAIL  = 6;

  // Used bins: -106..-1 and +1..+105, i.e. FFT indices 150..255 and 1..105.
  localparam int USED_NEG = 106;
  localparam int USED_POS = 105;
  localparam int N_USED   = USED_NEG + USED_POS;  // 211 = N_DATA + N_PILOT
  localparam int PILOT_SPACING = 11;               // every 11th used bin is a pilot

  typedef enum logic [2:0] {
    M_QPSK_12  = 3'd0,
    M_QPSK_34  = 3'd1,
    M_QAM16_12 = 3'd2,
    M_QAM16_34 = 3'd3,
    M_QAM64_23 = 3'd4,
    M_QAM64_34 = 3'd5
  } mode_e;

  typedef enum logic [1:0] { R_12 = 2'd0, R_23 = 2'd1, R_34 = 2'd2 } rate_e;

  // coded bits per subcarrier (N in the modulation table)
  function automatic int unsigned bits_per_sym(mode_e m);
    case (m)
      M_QPSK_12, M_QPSK_34:   return 2;
      M_QAM16_12, M_QAM16_34: return 4;
      default:                return 6;
    endcase
  endfunction

  function automatic rate_e code_rate(mode_e m);
    case (m)
      M_QPSK_12, M_QAM16_12: return R_12;
      M_QAM64_23:            return R_23;
      default:               return R_34;
    endcase
  endfunction

  // information bits (encoder input) carried by one OFDM symbol
  function automatic int unsigned info_bits_per_ofdm(mode_e m);
    int unsigned c;
    c = N_DATA * bits_per_sym(m);
    case (code_rate(m))
      R_12:    return c / 2;
      R_23:    return (c * 2) / 3;
      default: return (c * 3) / 4;
    endcase
  endfunction

  // used-bin ordinal (0..210) to FFT index
  function automatic int unsigned used_to_fft(int unsigned u);
    if (u < USED_NEG) return N_FFT - USED_NEG + u;
    else              return u - USED_NEG + 1;
  endfunction

  // Subcarrier map by FFT index, evaluated at elaboration time.
  // used_mask: bin carries a pilot or data; pilot_mask: bin is a pilot
  // (every PILOT_SPACING-th used bin, from the 6th: 19 pilots); sign_mask: BPSK sign of the known
  // value on a bin (1 -> negative), from a 7-bit LFSR run over the used bins.
  function automatic logic [N_FFT-1:0] used_mask();
    logic [N_FFT-1:0] m;
    m = '0;
    for (int u = 0; u < N_USED; u++) m[used_to_fft(u)] = 1'b1;
    return m;
  endfunction

  function automatic logic [N_FFT-1:0] pilot_mask();
    logic [N_FFT-1:0] m;
    m = '0;
    for (int u = 0; u < N_USED; u++) if (u % PILOT_SPACING == PILOT_SPACING / 2) m[used_to_fft(u)] = 1'b1;
    return m;
  endfunction

  function automatic logic [N_FFT-1:0] sign_mask();
    logic [N_FFT-1:0] m;
    logic [6:0] s;
    m = '0;
    s = 7'h5B;
    for (int u = 0; u < N_USED; u++) begin
      m[used_to_fft(u)] = s[0];
      s = {s[5:0], s[6] ^ s[3]};
    end
    return m;
  endfunction

  localparam int PILOT_AMP = 4096;

  // Time-domain synchronisation preamble: PRE_REPS repetitions of a
  // PRE_PERIOD-sample pattern with I and Q each +-PRE_AMP. Bit n of
  // pre_sign_i/q (1 -> negative) comes from a 7-bit LFSR.
  localparam int PRE_PERIOD = 64;
  localparam int PRE_REPS   = 4;
  localparam int PRE_LEN    = PRE_PERIOD * PRE_REPS;
  localparam int PRE_AMP    = 256;

  function automatic logic [PRE_PERIOD-1:0] pre_sign(input logic [6:0] seed);
    logic [PRE_PERIOD-1:0] m;
    logic [6:0] s;
    s = seed;
    for (int n = 0; n < PRE_PERIOD; n++) begin
      m[n] = s[0];
      s = {s[5:0], s[6] ^ s[5]};
    end
    return m;
  endfunction

  localparam logic [PRE_PERIOD-1:0] PRE_SIGN_I = pre_sign(7'h01);
  localparam logic [PRE_PERIOD-1:0] PRE_SIGN_Q = pre_sign(7'h4D);

endpackage

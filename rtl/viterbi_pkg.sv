// viterbi_pkg - constants, types and elaboration-time functions shared by the
// adaptive Viterbi decoder.
//
// The decoder family covers constraint lengths K = 3..7, code rate 1/2,
// trace-back length 5(K-1) and 1-bit input/output, as the design specifies.
// Trellis convention: a state is the last K-1 input bits with the newest bit
// in the MSB, so states 2n and 2n+1 at time t both lead to states n (input 0)
// and n + 2^(K-2) (input 1) at time t+1.
//
// Per-K schedule (clocks per symbol, number of systolic trace-back context
// groups) follows the design's context mapping: K=7 uses seven clocks per
// symbol with the trace-back split over three contexts, K=6 six clocks with
// two, K=4/5 five clocks with one, K=3 four clocks with ranking folded into
// the last context. The generator polynomials are not specified; the common
// maximum-free-distance rate-1/2 codes are used (this design's choice).
package viterbi_pkg;

  localparam int unsigned K_MIN = 3;
  localparam int unsigned K_MAX = 7;

  // Path-metric width: one 8-bit processing-element word.
  localparam int unsigned PM_W = 8;

  // Hardware contexts of one decoder, in schedule order.
  typedef enum logic [2:0] {
    CTX_INIT      = 3'd0,  // context 0: init
    CTX_INPUT1    = 3'd1,  // context 1: first code bit of the symbol
    CTX_INPUT2    = 3'd2,  // context 1: second code bit of the symbol
    CTX_ACS       = 3'd3,  // context 2: add-compare-select
    CTX_RANK1     = 3'd4,  // context 3: ranking, first half
    CTX_RANK2_SA1 = 3'd5,  // context 4: ranking second half, PM update, systolic array 1
    CTX_SA2       = 3'd6,  // context 5: systolic array 2
    CTX_SA3_OUT   = 3'd7   // context 6: systolic array 3 and output
  } ctx_e;

  typedef logic [2:0] k_t;  // constraint length code, 3..7

  function automatic int unsigned num_states(int unsigned k);
    return 1 << (k - 1);
  endfunction

  function automatic int unsigned tb_length(int unsigned k);
    return 5 * (k - 1);
  endfunction

  // Octal generator polynomials, MSB taps the current input bit.
  function automatic int unsigned gen_poly0(int unsigned k);
    case (k)
      3:       return 'o7;
      4:       return 'o17;
      5:       return 'o35;
      6:       return 'o75;
      default: return 'o171;
    endcase
  endfunction

  function automatic int unsigned gen_poly1(int unsigned k);
    case (k)
      3:       return 'o5;
      4:       return 'o15;
      5:       return 'o23;
      6:       return 'o53;
      default: return 'o133;
    endcase
  endfunction

  function automatic int unsigned clocks_per_symbol(int unsigned k);
    case (k)
      3:       return 4;
      4, 5:    return 5;
      6:       return 6;
      default: return 7;
    endcase
  endfunction

  // Number of contexts the systolic trace-back array is spread over.
  function automatic int unsigned sa_groups(int unsigned k);
    case (k)
      7:       return 3;
      6:       return 2;
      default: return 1;
    endcase
  endfunction

  // Stages per trace-back group (last group may be shorter).
  function automatic int unsigned sa_group_size(int unsigned k);
    return (tb_length(k) + sa_groups(k) - 1) / sa_groups(k);
  endfunction

  // Age, in symbols, of the trellis time whose state trace-back stage i
  // works on, relative to the symbol being processed. Two stages in the same
  // context see each other's results one symbol late (age +2 per stage);
  // the first stage of a later context sees its predecessor's result of the
  // same symbol (age +1).
  function automatic int unsigned sa_tap(int unsigned k, int unsigned i);
    int unsigned a;
    a = 0;
    for (int unsigned j = 1; j <= i; j++) begin
      if ((j / sa_group_size(k)) == ((j - 1) / sa_group_size(k))) a += 2;
      else a += 1;
    end
    return a;
  endfunction

  // Context that advances trace-back group g.
  function automatic ctx_e sa_group_ctx(int unsigned k, int unsigned g);
    if (g == 0)                  return CTX_RANK2_SA1;
    else if (g == sa_groups(k) - 1) return CTX_SA3_OUT;
    else                         return CTX_SA2;
  endfunction

  // Symbols between a code symbol entering and its decoded bit leaving.
  function automatic int unsigned decode_delay(int unsigned k);
    return sa_tap(k, tb_length(k) - 1) + 1;
  endfunction

  // SNR (in 0.1 dB) at which each K reaches BER = 1e-5.
  function automatic int snr_threshold_db10(int unsigned k);
    case (k)
      3:       return 53;
      4:       return 49;
      5:       return 43;
      6:       return 38;
      default: return 32;
    endcase
  endfunction

  // Clock frequency (kHz) each decoder is run at: its maximum, or the one
  // that gives 4.71 Mbit/s (the K=7 decoder's maximum throughput).
  function automatic int unsigned clk_khz_max(int unsigned k);
    case (k)
      3:       return 39800;
      4:       return 44760;
      5:       return 37050;
      6:       return 36510;
      default: return 32950;
    endcase
  endfunction

  function automatic int unsigned clk_khz_fixed(int unsigned k);
    case (k)
      3:       return 18830;
      4, 5:    return 23540;
      6:       return 28250;
      default: return 32950;
    endcase
  endfunction

  // Branch label (two code bits) leaving state `prev` with input `b`.
  function automatic logic [1:0] branch_label(int unsigned k, int unsigned prev, logic b);
    int unsigned w;
    w = (int'(b) << (k - 1)) | prev;
    return {^(w & gen_poly1(k)), ^(w & gen_poly0(k))};
  endfunction

endpackage

// Shared types, constants and elaboration-time table functions of the CBSR
// C-band transmitter core.
//
// The transmitter carries subframes of 5984 payload bits (187 words of 32
// bits) plus a 32-bit CRC, i.e. 6016 bits per turbo-coder block. The coding
// rate index (CRI, 0..6) sets the codeword length; each codeword is cut into
// partial codewords (PCWORD) of 330 OQPSK symbols = 660 samples/bits, with a
// phase midamble before each one and after the last. Frame parts are stored
// at 2 samples per symbol. Lengths of frame parts and codewords follow the
// design description; contents of the training sequences (PN seeds, the
// Zadoff-Chu root and shift) and the RRC span are this design's own choices.
package cbsr_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned WORD_BITS          = 32;
  localparam int unsigned WORDS_PER_SUBFRAME = 187;
  localparam int unsigned DATA_BITS          = WORDS_PER_SUBFRAME * WORD_BITS; // 5984
  localparam int unsigned CRC_BITS           = 32;
  localparam int unsigned BLOCK_BITS         = DATA_BITS + CRC_BITS;           // 6016
  localparam int unsigned PCWORD_LEN         = 660;  // samples (= bits) per PCWORD
  localparam int unsigned G_LEN              = 256;
  localparam int unsigned T_LEN              = 512;
  localparam int unsigned PRE_LEN            = G_LEN + T_LEN;                  // 768
  localparam int unsigned P_LEN              = 166;
  localparam int unsigned ZC_LEN             = 83;   // P_LEN / 2 symbols
  localparam int unsigned F_MAX_LEN          = 2080;
  localparam logic [2:0]  CRI_EOT            = 3'd7;

  // 32-bit CRC polynomial x^32+x^31+x^24+x^22+x^16+x^14+x^8+x^7+x^5+x^3+x+1
  localparam logic [31:0] CRC_POLY = 32'h8141_41AB;

  // Sample amplitude of training sequences and data (+/-1 maps to this).
  localparam int          AMP = 16384;

  // ---------------------------------------------------------------- types
  typedef enum logic [1:0] {
    MODE_CODED_SW  = 2'd0,  // coded data from software
    MODE_CODED_GEN = 2'd1,  // coded data from the internal PN generator
    MODE_UNCODED   = 2'd2,  // repeatable uncoded internal data
    MODE_CONT_PRE  = 2'd3   // continuous preamble (G_AMB + n x T_AMB)
  } tx_mode_e;

  // Which part of the radio frame feeds the shaping filter.
  typedef enum logic [2:0] {
    SEL_NONE = 3'd0,
    SEL_PRE  = 3'd1,   // G_AMB / T_AMB table
    SEL_FAMB = 3'd2,
    SEL_PAMB = 3'd3,
    SEL_DATA = 3'd4
  } tx_sel_e;

  typedef struct packed {
    logic signed [15:0] i;
    logic signed [15:0] q;
  } iq16_t;

  // ---------------------------------------------------------------- rates
  // Codeword length per CRI.
  function automatic int unsigned cw_len(input logic [2:0] cri);
    case (cri)
      3'd0:    return 6600;
      3'd1:    return 7260;
      3'd2:    return 7920;
      3'd3:    return 10560;
      3'd4:    return 15840;
      3'd5:    return 21120;
      default: return 31680;
    endcase
  endfunction

  // Number of PCWORDs per subframe (n); there are n+1 phase midambles.
  function automatic logic [5:0] n_pcwords(input logic [2:0] cri);
    case (cri)
      3'd0:    return 6'd10;
      3'd1:    return 6'd11;
      3'd2:    return 6'd12;
      3'd3:    return 6'd16;
      3'd4:    return 6'd24;
      3'd5:    return 6'd32;
      default: return 6'd48;
    endcase
  endfunction

  // F_AMB length per selection (samples).
  function automatic logic [11:0] famb_len(input logic [1:0] sel);
    case (sel)
      2'd0:    return 12'd544;
      2'd1:    return 12'd1056;
      default: return 12'd2080;
    endcase
  endfunction

  // ---------------------------------------------------------------- PN
  // x^20 + x^17 + 1 Fibonacci LFSR step: output is stage 20.
  function automatic logic [19:0] pn_step(input logic [19:0] s);
    return {s[18:0], s[19] ^ s[16]};
  endfunction

  // ---------------------------------------------------------------- tables
  // OQPSK-style training sample from one PN bit: even entries carry the bit
  // on I, odd entries on Q (entry 2m = (a_m, 0), entry 2m+1 = (0, b_m)),
  // bit 0 -> +AMP, bit 1 -> -AMP.
  function automatic iq16_t pn_oqpsk_sample(input logic bit_v, input logic odd);
    iq16_t r;
    logic signed [15:0] v;
    v   = bit_v ? -16'sd16384 : 16'sd16384;
    r.i = odd ? 16'sd0 : v;
    r.q = odd ? v : 16'sd0;
    return r;
  endfunction

  // Zadoff-Chu midamble entry: zc[n] = exp(-j*pi*u*n*(n+1)/N), symbol index
  // n = (idx/2 + shift) mod N, zero inserted at odd entries.
  function automatic iq16_t zc_entry(input int unsigned idx, input int unsigned shift,
                                     input int unsigned root);
    int unsigned n;
    real         ph;
    iq16_t       r;
    if (idx % 2 == 1) return '0;
    n  = (idx / 2 + shift) % ZC_LEN;
    ph = -3.14159265358979 * real'(root) * real'(n * (n + 1)) / real'(ZC_LEN);
    r.i = 16'(int'($floor(real'(AMP) * $cos(ph) + 0.5)));
    r.q = 16'(int'($floor(real'(AMP) * $sin(ph) + 0.5)));
    return r;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Root-raised-cosine impulse response, t in symbol periods.
  function automatic real rrc(input real t, input real b);
    real pi, x;
    pi = 3.14159265358979;
    if (rabs(t) < 1.0e-9) return 1.0 - b + 4.0 * b / pi;
    if (rabs(rabs(t) - 1.0 / (4.0 * b)) < 1.0e-9)
      return (b / $sqrt(2.0)) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b)) +
                                  (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    x = 4.0 * b * t;
    return ($sin(pi * t * (1.0 - b)) + x * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - x * x));
  endfunction

endpackage

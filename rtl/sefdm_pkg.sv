// sefdm_pkg - types, constants and helper functions shared by the SEFDM
// transmitter.
//
// The transmitter generates Spectrally Efficient FDM symbols, whose sub-carrier
// spacing is a fraction alpha = b/c of the OFDM spacing.  Three compression
// ratios are supported, selectable for every symbol: alpha = 1 (plain OFDM,
// c = 1), alpha = 2/3 (c = 3) and alpha = 1/2 ("Fast OFDM", c = 2).
//
// Word size: complex samples and symbols are SAMPLE_W bits per component
// (12 bits, the IFFT word size of the reference implementation).  Rotation and
// twiddle coefficients are COEF_W-bit signed fixed point with COEF_FRAC
// fractional bits, so 1.0 is 2**COEF_FRAC; the coefficient width is this
// design's own choice.
package sefdm_pkg;

  localparam int SAMPLE_W  = 12;            // component width of symbols/IFFT words
  localparam int COEF_W    = 14;            // coefficient width (own choice)
  localparam int COEF_FRAC = COEF_W - 2;    // 1.0 = 4096
  localparam int C_MAX     = 3;             // parallel IFFTs = largest c
  localparam int OUT_W     = SAMPLE_W + 2;  // sum of three IFFT rows needs 2 more bits

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [OUT_W-1:0]    out_sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    coef_t re;
    coef_t im;
  } ccoef_t;

  typedef struct packed {
    out_sample_t re;
    out_sample_t im;
  } cplx_out_t;

  // Bandwidth compression ratio of one symbol.
  typedef enum logic [1:0] {
    ALPHA_1   = 2'd0,   // b/c = 1/1, OFDM
    ALPHA_2_3 = 2'd1,   // b/c = 2/3
    ALPHA_1_2 = 2'd2    // b/c = 1/2, Fast OFDM
  } alpha_t;

  function automatic int unsigned alpha_b(alpha_t a);
    case (a)
      ALPHA_2_3: return 2;
      default:   return 1;
    endcase
  endfunction

  function automatic int unsigned alpha_c(alpha_t a);
    case (a)
      ALPHA_2_3: return 3;
      ALPHA_1_2: return 2;
      default:   return 1;
    endcase
  endfunction

  // Round a real to the nearest coefficient value, saturating at the
  // representable range.
  function automatic coef_t real_to_coef(real v);
    real    s;
    integer q;
    s = v * real'(1 << COEF_FRAC);
    q = (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
    if (q >  (1 << (COEF_W-1)) - 1) q =  (1 << (COEF_W-1)) - 1;
    if (q < -(1 << (COEF_W-1)))     q = -(1 << (COEF_W-1));
    return coef_t'(q);
  endfunction

  // e^{j*2*pi*num/den} as a complex coefficient.
  function automatic ccoef_t cexp_coef(int num, int den);
    ccoef_t r;
    r.re = real_to_coef($cos(2.0 * PI * real'(num) / real'(den)));
    r.im = real_to_coef($sin(2.0 * PI * real'(num) / real'(den)));
    return r;
  endfunction

endpackage

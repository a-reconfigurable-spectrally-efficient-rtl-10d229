// sefdm_rot_rom - rotation coefficient ROMs of the post-processing.
//
// Output k of IFFT row r is rotated by W_r[k] = e^{j*2*pi*r*k/(c*N)} before
// the rows are summed.  Row 0 needs no rotation, so c-1 tables serve each
// ratio, three in all:
//   H   c = 2, r = 1: e^{j*pi*k/N}          (alpha = 1/2)
//   T1  c = 3, r = 1: e^{j*2*pi*k/(3N)}     (alpha = 2/3)
//   T2  c = 3, r = 2: e^{j*4*pi*k/(3N)}     (alpha = 2/3)
// coef1 multiplies IFFT row 1 and comes from H or T1 according to cfg; coef2
// multiplies row 2 and comes from T2.  The address of a table that the
// current ratio does not use is held at 0, so it does not toggle; for
// alpha = 1 both coefficients are then 1 + j0, which is harmless because the
// rows they multiply are zero.  The outputs are registered (one cycle of
// latency), as in a synchronous ROM.  All tables are computed at elaboration.
//
// QUARTER_WAVE selects the storage:
//   0  each table holds all N complex words (default);
//   1  each table holds only the angles 0..pi/2 of its own step,
//      Q+1 words with Q = c*N/(4*r) (33, 49 and 25 words for N = 64).  Index
//      k is folded into quadrant q = k div Q and offset m = k mod Q: the
//      address counts up (m) in quadrants 0 and 2 and down (Q - m) in 1 and
//      3, and the real and/or imaginary part is negated:
//        q = 0: ( cos,  sin)   q = 1: (-cos,  sin)
//        q = 2: (-cos, -sin)   q = 3: ( cos, -sin)
//      The quadrant is found by comparison, since k < c*N/r <= 4Q.
//      N must be a multiple of 4 for this option.
//
// The three N-word tables, the address masking and the quarter-wave option
// with up/down addressing and conditional negation follow the reference
// design; the folding arithmetic is this design's own.
module sefdm_rot_rom
  import sefdm_pkg::*;
#(
  parameter int N            = 64,
  parameter bit QUARTER_WAVE = 1'b0
) (
  input  logic                  clk,
  input  alpha_t                cfg,
  input  logic [$clog2(N)-1:0]  k,
  output ccoef_t                coef1,
  output ccoef_t                coef2
);

  localparam int AW = $clog2(N);

  // quarter-wave sizes: angle step 2*pi*r/(c*N), pi/2 = Q steps
  localparam int Q_H  = (2 * N) / 4;
  localparam int Q_T1 = (3 * N) / 4;
  localparam int Q_T2 = (3 * N) / 8;

  typedef ccoef_t [N-1:0] table_t;

  // e^{j*2*pi*r*i/(c*N)} for i = 0..N-1 (entries past the quarter unused
  // in quarter-wave mode)
  function automatic table_t make_table(int r, int c);
    table_t t;
    for (int i = 0; i < N; i++) t[i] = cexp_coef(r * i, c * N);
    return t;
  endfunction

  typedef struct packed {
    logic [AW-1:0] addr;
    logic          neg_re;
    logic          neg_im;
  } fold_t;

  function automatic fold_t fold(logic [AW-1:0] kk, int q);
    fold_t f;
    int    kv;
    kv = int'(kk);
    if (kv < q) begin
      f.addr = AW'(kv);          f.neg_re = 1'b0; f.neg_im = 1'b0;
    end else if (kv < 2 * q) begin
      f.addr = AW'(2 * q - kv);  f.neg_re = 1'b1; f.neg_im = 1'b0;
    end else if (kv < 3 * q) begin
      f.addr = AW'(kv - 2 * q);  f.neg_re = 1'b1; f.neg_im = 1'b1;
    end else begin
      f.addr = AW'(4 * q - kv);  f.neg_re = 1'b0; f.neg_im = 1'b1;
    end
    return f;
  endfunction

  function automatic ccoef_t apply(ccoef_t c, logic neg_re, logic neg_im);
    ccoef_t r;
    r.re = neg_re ? -c.re : c.re;
    r.im = neg_im ? -c.im : c.im;
    return r;
  endfunction

  // quarter-wave tables: angles 0..pi/2 of each table's step
  typedef ccoef_t [Q_H:0]  qh_t;
  typedef ccoef_t [Q_T1:0] qt1_t;
  typedef ccoef_t [Q_T2:0] qt2_t;

  function automatic qh_t make_qh();
    qh_t t;
    for (int i = 0; i <= Q_H; i++) t[i] = cexp_coef(i, 2 * N);
    return t;
  endfunction
  function automatic qt1_t make_qt1();
    qt1_t t;
    for (int i = 0; i <= Q_T1; i++) t[i] = cexp_coef(i, 3 * N);
    return t;
  endfunction
  function automatic qt2_t make_qt2();
    qt2_t t;
    for (int i = 0; i <= Q_T2; i++) t[i] = cexp_coef(2 * i, 3 * N);
    return t;
  endfunction

  logic [AW-1:0] addr_h, addr_t;

  // masked addresses
  assign addr_h = (cfg == ALPHA_1_2) ? k : '0;
  assign addr_t = (cfg == ALPHA_2_3) ? k : '0;

  if (!QUARTER_WAVE) begin : g_full
    localparam table_t LUT_H  = make_table(1, 2);
    localparam table_t LUT_T1 = make_table(1, 3);
    localparam table_t LUT_T2 = make_table(2, 3);

    always_ff @(posedge clk) begin
      coef1 <= (cfg == ALPHA_1_2) ? LUT_H[addr_h] : LUT_T1[addr_t];
      coef2 <= LUT_T2[addr_t];
    end
  end else begin : g_quarter
    localparam qh_t  QLUT_H  = make_qh();
    localparam qt1_t QLUT_T1 = make_qt1();
    localparam qt2_t QLUT_T2 = make_qt2();

    fold_t f_h, f_t1, f_t2;
    assign f_h  = fold(addr_h, Q_H);
    assign f_t1 = fold(addr_t, Q_T1);
    assign f_t2 = fold(addr_t, Q_T2);

    always_ff @(posedge clk) begin
      coef1 <= (cfg == ALPHA_1_2) ? apply(QLUT_H[f_h.addr], f_h.neg_re, f_h.neg_im)
                                  : apply(QLUT_T1[f_t1.addr], f_t1.neg_re, f_t1.neg_im);
      coef2 <= apply(QLUT_T2[f_t2.addr], f_t2.neg_re, f_t2.neg_im);
    end
  end

endmodule

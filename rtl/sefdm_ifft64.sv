// sefdm_ifft64 - 64-point complex IFFT, RAM based, radix-8, with enable.
//
//   Y[k] = (1/64) * sum_{n=0..63} x[n] * e^{+j*2*pi*n*k/64},   k = 0..63
//
// Operation is frame by frame, in four phases:
//   LOAD  64 input words are written into a 64-word register file in natural
//         order, one per cycle when in_valid is high (in_ready is high then).
//   ST1   8 cycles. Cycle n1 reads the 8 words x[n1 + 8*n2], runs the radix-8
//         butterfly over n2, scales by 1/8, multiplies output k2 by the twiddle
//         e^{j*2*pi*n1*k2/64} and writes it back in place to word n1 + 8*k2.
//   ST2   8 cycles. Cycle k2 reads words n1 + 8*k2, runs the butterfly over n1,
//         scales by 1/8 and writes Y[8*k1 + k2] in place to word k1 + 8*k2.
//   OUT   64 cycles. Y[0..63] leave in natural order through an output
//         register, one per cycle, with out_valid and the index out_idx.
// The block returns to LOAD as the last output is registered, so a new frame
// may start in the next cycle.  Latency from the last input word to Y[0] is
// 17 cycles; a frame occupies the block for 64 + 16 + 64 cycles.
//
// en: when low, the block holds its state (the clock of a gated-clock
// implementation is stopped) and the output register is cleared to 0 + j0,
// so a disabled IFFT feeds zeros to the post-processing.  Here the gating is
// written as a clock enable; a gating cell is left to the implementation.
// idle is high in LOAD before the first word, the only safe point at which to
// change en.
//
// Fixed point: each radix-8 stage is followed by a 1/8 scaling with rounding
// and saturation to SAMPLE_W bits; twiddles are COEF_W-bit constants computed
// at elaboration.  Size (64), word width (12), radix (8), RAM base and the
// enable behaviour follow the reference design; the phase schedule, scaling
// and rounding are this design's own choices.
module sefdm_ifft64
  import sefdm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  output logic               in_ready,
  input  cplx_t              in_data,
  output logic               out_valid,
  output logic [5:0]         out_idx,
  output cplx_t              out_data,
  output logic               idle
);

  localparam int N  = 64;
  localparam int R  = 8;
  localparam int BW = SAMPLE_W + 4;        // butterfly output width
  localparam int PW = SAMPLE_W + COEF_W;   // twiddle product width

  typedef enum logic [1:0] {S_LOAD, S_ST1, S_ST2, S_OUT} state_t;

  typedef ccoef_t [R*R-1:0] tw_table_t;

  // twiddle table indexed by n1*8 + k2: e^{j*2*pi*n1*k2/64}
  function automatic tw_table_t make_twiddles();
    tw_table_t t;
    for (int n1 = 0; n1 < R; n1++)
      for (int k2 = 0; k2 < R; k2++)
        t[n1*R + k2] = cexp_coef(n1 * k2, N);
    return t;
  endfunction

  localparam tw_table_t TW = make_twiddles();

  function automatic sample_t sat(logic signed [PW:0] v);
    if (v > (PW+1)'(2**(SAMPLE_W-1) - 1))  return sample_t'(2**(SAMPLE_W-1) - 1);
    if (v < -(PW+1)'(2**(SAMPLE_W-1)))     return sample_t'(-(2**(SAMPLE_W-1)));
    return sample_t'(v);
  endfunction

  // scale a butterfly output by 1/8 with rounding
  function automatic sample_t scale8(logic signed [BW-1:0] v);
    logic signed [PW:0] w;
    w = ((PW+1)'(v) + (PW+1)'(4)) >>> 3;
    return sat(w);
  endfunction

  // round(a * c / 2**COEF_FRAC)
  function automatic logic signed [PW:0] cmul_part(sample_t a, coef_t c);
    logic signed [PW:0] p;
    p = (PW+1)'(a) * (PW+1)'(c);
    return p;
  endfunction

  function automatic cplx_t twiddle(cplx_t a, ccoef_t c);
    logic signed [PW:0] re, im;
    cplx_t r;
    re = cmul_part(a.re, c.re) - cmul_part(a.im, c.im) + (PW+1)'(1 <<< (COEF_FRAC-1));
    im = cmul_part(a.re, c.im) + cmul_part(a.im, c.re) + (PW+1)'(1 <<< (COEF_FRAC-1));
    r.re = sat(re >>> COEF_FRAC);
    r.im = sat(im >>> COEF_FRAC);
    return r;
  endfunction

  state_t         state;
  logic [5:0]     cnt;
  cplx_t          mem [N];

  // butterfly operands for the current stage cycle
  logic signed [SAMPLE_W-1:0] bf_in_re [R], bf_in_im [R];
  logic signed [BW-1:0]       bf_out_re [R], bf_out_im [R];
  cplx_t                      stage_res [R];
  logic [5:0]                 rd_addr [R];

  always_comb begin
    for (int m = 0; m < R; m++) begin
      // ST1: m is n2, word n1 + 8*n2 (n1 = cnt); ST2: m is n1, word n1 + 8*k2
      if (state == S_ST1) rd_addr[m] = 6'(cnt[2:0] + 8*m);
      else                rd_addr[m] = 6'(m + 8*cnt[2:0]);
      bf_in_re[m] = mem[rd_addr[m]].re;
      bf_in_im[m] = mem[rd_addr[m]].im;
    end
  end

  sefdm_radix8 #(.IW(SAMPLE_W), .OW(BW)) u_bf (
    .x_re (bf_in_re),  .x_im (bf_in_im),
    .y_re (bf_out_re), .y_im (bf_out_im)
  );

  always_comb begin
    for (int m = 0; m < R; m++) begin
      cplx_t s;
      s.re = scale8(bf_out_re[m]);
      s.im = scale8(bf_out_im[m]);
      stage_res[m] = (state == S_ST1) ? twiddle(s, TW[int'(cnt[2:0])*R + m]) : s;
    end
  end

  // Y[8*k1 + k2] is held in word k1 + 8*k2
  logic [5:0] out_addr;
  assign out_addr = {cnt[2:0], cnt[5:3]};

  assign in_ready = en && (state == S_LOAD);
  assign idle     = (state == S_LOAD) && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
    end else if (en) begin
      case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(N-1)) state <= S_ST1;
        end
        S_ST1: begin
          cnt <= (cnt == 6'(R-1)) ? '0 : cnt + 6'd1;
          if (cnt == 6'(R-1)) state <= S_ST2;
        end
        S_ST2: begin
          cnt <= (cnt == 6'(R-1)) ? '0 : cnt + 6'd1;
          if (cnt == 6'(R-1)) state <= S_OUT;
        end
        S_OUT: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(N-1)) state <= S_LOAD;
        end
      endcase
    end
  end

  // register file: natural-order load, in-place stage write-back
  always_ff @(posedge clk) begin
    if (en) begin
      if (state == S_LOAD && in_valid) mem[cnt] <= in_data;
      if (state == S_ST1 || state == S_ST2)
        for (int m = 0; m < R; m++) mem[rd_addr[m]] <= stage_res[m];
    end
  end

  // output register, cleared while disabled
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else if (!en) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= (state == S_OUT);
      out_idx   <= cnt;
      out_data  <= (state == S_OUT) ? mem[out_addr] : '0;
    end
  end

endmodule

// sefdm_radix8 - combinational radix-8 inverse butterfly (8-point inverse DFT).
//
//   y[k] = sum_{n=0..7} x[n] * e^{+j*2*pi*n*k/8},   k = 0..7   (no scaling)
//
// It is the arithmetic core of the radix-8 64-point IFFT.  The 8-point
// transform is split by decimation in time into two 4-point transforms (whose
// rotations are only +-1 and +-j) and a last radix-2 step with the rotations
// 1, e^{j*pi/4}, j and e^{j*3*pi/4}.  The two odd rotations share one constant
// multiplication by cos(pi/4), held as a 16-bit fraction and rounded to the
// nearest integer.  The outputs are 4 bits wider than the inputs, which covers
// the worst-case growth of 8*sqrt(2); the caller scales them.
//
// Interface: x[0:7] complex SAMPLE_W-bit inputs, y[0:7] complex (SAMPLE_W+4)-bit
// outputs.  Purely combinational, no clock.  The decomposition and widths are
// this design's own choice; the reference implementation only names its IFFT
// radix-8 and RAM based.
module sefdm_radix8
  import sefdm_pkg::*;
#(
  parameter int IW = SAMPLE_W,
  parameter int OW = SAMPLE_W + 4
) (
  input  logic signed [IW-1:0] x_re [8],
  input  logic signed [IW-1:0] x_im [8],
  output logic signed [OW-1:0] y_re [8],
  output logic signed [OW-1:0] y_im [8]
);

  localparam int        CF    = 16;
  localparam int signed C_R2  = 46341;       // round(cos(pi/4) * 2**16)

  typedef logic signed [OW-1:0]    w_t;
  typedef logic signed [OW+CF:0]   p_t;

  // multiply by cos(pi/4) with rounding to nearest
  function automatic w_t mul_r2(w_t v);
    p_t p;
    p = p_t'(v) * p_t'(C_R2) + p_t'(1 <<< (CF-1));
    return w_t'(p >>> CF);
  endfunction

  w_t e_re [4], e_im [4], o_re [4], o_im [4];
  w_t t_re [4], t_im [4];

  always_comb begin
    w_t a0r, a0i, a1r, a1i, a2r, a2i, a3r, a3i;
    // 4-point inverse DFT of the even samples x[0], x[2], x[4], x[6]
    a0r = w_t'(x_re[0]) + w_t'(x_re[4]);  a0i = w_t'(x_im[0]) + w_t'(x_im[4]);
    a1r = w_t'(x_re[0]) - w_t'(x_re[4]);  a1i = w_t'(x_im[0]) - w_t'(x_im[4]);
    a2r = w_t'(x_re[2]) + w_t'(x_re[6]);  a2i = w_t'(x_im[2]) + w_t'(x_im[6]);
    a3r = w_t'(x_re[2]) - w_t'(x_re[6]);  a3i = w_t'(x_im[2]) - w_t'(x_im[6]);
    e_re[0] = a0r + a2r;  e_im[0] = a0i + a2i;
    e_re[2] = a0r - a2r;  e_im[2] = a0i - a2i;
    e_re[1] = a1r - a3i;  e_im[1] = a1i + a3r;   // a1 + j*a3
    e_re[3] = a1r + a3i;  e_im[3] = a1i - a3r;   // a1 - j*a3
    // 4-point inverse DFT of the odd samples x[1], x[3], x[5], x[7]
    a0r = w_t'(x_re[1]) + w_t'(x_re[5]);  a0i = w_t'(x_im[1]) + w_t'(x_im[5]);
    a1r = w_t'(x_re[1]) - w_t'(x_re[5]);  a1i = w_t'(x_im[1]) - w_t'(x_im[5]);
    a2r = w_t'(x_re[3]) + w_t'(x_re[7]);  a2i = w_t'(x_im[3]) + w_t'(x_im[7]);
    a3r = w_t'(x_re[3]) - w_t'(x_re[7]);  a3i = w_t'(x_im[3]) - w_t'(x_im[7]);
    o_re[0] = a0r + a2r;  o_im[0] = a0i + a2i;
    o_re[2] = a0r - a2r;  o_im[2] = a0i - a2i;
    o_re[1] = a1r - a3i;  o_im[1] = a1i + a3r;
    o_re[3] = a1r + a3i;  o_im[3] = a1i - a3r;
    // rotate the odd half by e^{j*pi*k/4}
    t_re[0] = o_re[0];                        t_im[0] = o_im[0];
    t_re[1] = mul_r2(o_re[1] - o_im[1]);      t_im[1] = mul_r2(o_re[1] + o_im[1]);
    t_re[2] = -o_im[2];                       t_im[2] = o_re[2];
    t_re[3] = mul_r2(-o_re[3] - o_im[3]);     t_im[3] = mul_r2(o_re[3] - o_im[3]);
    // last radix-2 step
    for (int k = 0; k < 4; k++) begin
      y_re[k]   = e_re[k] + t_re[k];  y_im[k]   = e_im[k] + t_im[k];
      y_re[k+4] = e_re[k] - t_re[k];  y_im[k+4] = e_im[k] - t_im[k];
    end
  end

endmodule

// sefdm_cmac - pipelined complex multiply-accumulate of the post-processing.
//
//   acc_out = acc_in + round(data * coef / 2**COEF_FRAC)
//
// data is a SAMPLE_W-bit complex IFFT output, coef a COEF_W-bit complex
// rotation coefficient, acc_in/acc_out OUT_W-bit complex partial sums.  The
// product is rounded to the nearest integer (half rounds up) and the sum
// saturates at the OUT_W-bit range.  valid travels alongside the data.
//
// Latency is STAGES cycles.  With STAGES = 1 (default) the whole operation
// is combinational and the result is registered once.  With STAGES >= 2 the
// rounded products and acc_in are registered first, the sum is registered
// next, and STAGES - 2 further registers follow, which synthesis may retime
// into the multipliers.  Chained units form a feed-forward cutset, so extra
// stages change only the latency, not the result.  The operation and the
// option to pipeline it follow the reference design; widths, rounding and the
// placement of the stages are this design's own choices.
module sefdm_cmac
  import sefdm_pkg::*;
#(
  parameter int STAGES = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_out_t  acc_in,
  input  cplx_t      data,
  input  ccoef_t     coef,
  output logic       out_valid,
  output cplx_out_t  acc_out
);

  localparam int PW = SAMPLE_W + COEF_W + 2;

  typedef logic signed [PW-1:0] p_t;

  function automatic out_sample_t sat_out(p_t v);
    if (v > p_t'(2**(OUT_W-1) - 1)) return out_sample_t'(2**(OUT_W-1) - 1);
    if (v < -p_t'(2**(OUT_W-1)))    return out_sample_t'(-(2**(OUT_W-1)));
    return out_sample_t'(v);
  endfunction

  p_t pr, pi;

  always_comb begin
    pr = p_t'(data.re) * p_t'(coef.re) - p_t'(data.im) * p_t'(coef.im)
         + p_t'(1 <<< (COEF_FRAC-1));
    pi = p_t'(data.re) * p_t'(coef.im) + p_t'(data.im) * p_t'(coef.re)
         + p_t'(1 <<< (COEF_FRAC-1));
  end

  // rounded products
  p_t pr_r, pi_r;
  assign pr_r = pr >>> COEF_FRAC;
  assign pi_r = pi >>> COEF_FRAC;

  cplx_out_t sum;
  logic      sum_valid;

  if (STAGES <= 1) begin : g_one
    assign sum_valid = in_valid;
    always_comb begin
      sum.re = sat_out(p_t'(acc_in.re) + pr_r);
      sum.im = sat_out(p_t'(acc_in.im) + pi_r);
    end
  end else begin : g_prod
    p_t        pr_q, pi_q;
    cplx_out_t acc_q;
    logic      v_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pr_q  <= '0;
        pi_q  <= '0;
        acc_q <= '0;
        v_q   <= 1'b0;
      end else begin
        pr_q  <= pr_r;
        pi_q  <= pi_r;
        acc_q <= acc_in;
        v_q   <= in_valid;
      end
    end
    assign sum_valid = v_q;
    always_comb begin
      sum.re = sat_out(p_t'(acc_q.re) + pr_q);
      sum.im = sat_out(p_t'(acc_q.im) + pi_q);
    end
  end

  // output register and any further stages
  localparam int NOUT = (STAGES <= 1) ? 1 : STAGES - 1;

  cplx_out_t acc_pipe [NOUT];
  logic      v_pipe   [NOUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NOUT; i++) begin
        acc_pipe[i] <= '0;
        v_pipe[i]   <= 1'b0;
      end
    end else begin
      acc_pipe[0] <= sum;
      v_pipe[0]   <= sum_valid;
      for (int i = 1; i < NOUT; i++) begin
        acc_pipe[i] <= acc_pipe[i-1];
        v_pipe[i]   <= v_pipe[i-1];
      end
    end
  end

  assign acc_out   = acc_pipe[NOUT-1];
  assign out_valid = v_pipe[NOUT-1];

endmodule

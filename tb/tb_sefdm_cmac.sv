// tb_sefdm_cmac - checks the complex multiply-accumulate against a
// floating-point model: acc + data*coef/2**COEF_FRAC must match to within
// 1 LSB (saturated to the output range), one cycle after the inputs, with
// valid delayed by the same cycle.  A second instance with STAGES = 3 gets
// the same inputs and must give the same results three cycles after them.
module tb_sefdm_cmac;
  import sefdm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  cplx_out_t acc_in, acc_out;
  logic      out_valid3;
  cplx_out_t acc_out3;
  real       exp_re[3000], exp_im[3000];
  cplx_t data;
  ccoef_t coef;

  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  sefdm_cmac dut (.*);
  sefdm_cmac #(.STAGES(3)) dut3 (
    .clk, .rst_n, .in_valid, .acc_in, .data, .coef,
    .out_valid (out_valid3), .acc_out (acc_out3)
  );

  always #5 clk = ~clk;

  function automatic real satr(real v);
    real lim = real'(2**(OUT_W-1));
    if (v > lim - 1.0) return lim - 1.0;
    if (v < -lim) return -lim;
    return v;
  endfunction

  initial begin
    in_valid = 0; acc_in = '0; data = '0; coef = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      real er, ei, sc;
      @(negedge clk);
      in_valid  = t[0];
      acc_in.re = OUT_W'($urandom); acc_in.im = OUT_W'($urandom);
      if (t % 3 == 0) begin acc_in.re = acc_in.re >>> 2; acc_in.im = acc_in.im >>> 2; end
      data.re   = SAMPLE_W'($urandom); data.im = SAMPLE_W'($urandom);
      coef.re   = COEF_W'($urandom);   coef.im = COEF_W'($urandom);
      sc = real'(1 << COEF_FRAC);
      er = satr(acc_in.re + (real'(data.re) * coef.re - real'(data.im) * coef.im) / sc);
      ei = satr(acc_in.im + (real'(data.re) * coef.im + real'(data.im) * coef.re) / sc);
      exp_re[t] = er; exp_im[t] = ei;
      @(posedge clk); #1;
      if (t >= 2) begin
        checks++;
        if (fabs(real'(acc_out3.re) - exp_re[t-2]) > 1.0 ||
            fabs(real'(acc_out3.im) - exp_im[t-2]) > 1.0 || out_valid3 != t[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL STAGES=3 t=%0d got %0d %0dj exp %f %fj v=%b", t - 2,
                     acc_out3.re, acc_out3.im, exp_re[t-2], exp_im[t-2], out_valid3);
        end
      end
      checks++;
      if (fabs(real'(acc_out.re) - er) > 1.0 || fabs(real'(acc_out.im) - ei) > 1.0 ||
          out_valid != t[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d got %0d %0dj exp %f %fj v=%b", t, acc_out.re, acc_out.im, er, ei, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

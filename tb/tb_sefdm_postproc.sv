// tb_sefdm_postproc - drives the post-processing with random IFFT outputs,
// rows r >= c held at zero as the disabled IFFTs deliver them, and checks
//   X[k] = sum_{r<c} e^{j*2*pi*r*k/(c*N)} * Y_r[k]
// computed in floating point (within TOL LSB) for alpha = 1, 2/3 and 1/2,
// switching ratio from frame to frame.  Each result must appear exactly
// 3 cycles after its inputs with its index and ratio.
module tb_sefdm_postproc;
  import sefdm_pkg::*;

  localparam int  N   = 64;
  localparam int  AW  = $clog2(N);
  localparam int  LAT = 3;
  localparam real TOL = 1.5;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [AW-1:0] in_idx, out_idx;
  alpha_t in_cfg, out_cfg;
  cplx_t y0, y1, y2;
  cplx_out_t out_data;

  int checks = 0, failures = 0;
  int cyc = 0;

  // expected results, queued by the cycle they are due
  typedef struct { int due; int idx; alpha_t cfg; real re; real im; } exp_t;
  exp_t expq [$];

  sefdm_postproc #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic cplx_t rnd();
    cplx_t v;
    v.re = SAMPLE_W'($urandom % 2896) - 12'sd1448;
    v.im = SAMPLE_W'($urandom % 2896) - 12'sd1448;
    return v;
  endfunction

  // monitor
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (expq.size() > 0 && expq[0].due == cyc) begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (!out_valid || int'(out_idx) != e.idx || out_cfg != e.cfg ||
            fabs(out_data.re - e.re) > TOL || fabs(out_data.im - e.im) > TOL) begin
          failures++;
          if (failures < 20)
            $display("FAIL k=%0d cfg=%0d got v=%b idx=%0d %0d %0dj exp %f %fj",
                     e.idx, e.cfg, out_valid, out_idx, out_data.re, out_data.im, e.re, e.im);
        end
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("FAIL unexpected output at cycle %0d", cyc);
      end
    end
  end

  initial begin
    static alpha_t cfgs [6] = '{ALPHA_1, ALPHA_2_3, ALPHA_1_2, ALPHA_2_3, ALPHA_1, ALPHA_1_2};
    in_valid = 0; in_idx = '0; in_cfg = ALPHA_1; y0 = '0; y1 = '0; y2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      int c;
      c = alpha_c(cfgs[f % 6]);
      for (int k = 0; k < N; k++) begin
        exp_t e;
        real er, ei;
        @(negedge clk);
        if (f >= 6) while ($urandom % 5 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_idx   = AW'(k);
        in_cfg   = cfgs[f % 6];
        y0 = rnd();
        y1 = (c > 1) ? rnd() : '0;
        y2 = (c > 2) ? rnd() : '0;
        er = 0.0; ei = 0.0;
        for (int r = 0; r < c; r++) begin
          cplx_t y;
          real ph;
          y  = (r == 0) ? y0 : (r == 1) ? y1 : y2;
          ph = 2.0 * PI * r * k / (c * N);
          er += y.re * $cos(ph) - y.im * $sin(ph);
          ei += y.re * $sin(ph) + y.im * $cos(ph);
        end
        e.due = cyc + LAT;
        e.idx = k; e.cfg = cfgs[f % 6]; e.re = er; e.im = ei;
        expq.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Body of the end-to-end transmitter testbenches (tb_sefdm_tx and
// tb_sefdm_tx_mod).  The including module defines localparams AGU_MODE and
// CMAC_ST (CMAC pipeline depth) and instantiates sefdm_tx as dut.
//
// Frames of N random QPSK or 16-QAM symbols are sent with a ratio chosen per
// frame, sometimes with gaps in in_valid and sometimes back to back.  Every
// output sample is compared with the SEFDM symbol computed in floating point,
//   X[k] = (1/N) sum_n s_n e^{j*2*pi*n*k*b/(c*N)},
// and must be within TOL LSB; the samples of a frame must arrive in k order on
// N consecutive cycles carrying the frame's ratio.  For frames sent to an idle
// transmitter the latency from the last accepted symbol to X[0] must be
// N + 19 + 2*CMAC_ST cycles whatever the ratio.  The test counts how often each mechanism
// occurs and fails if one never does: every ratio, a ratio change between
// consecutive frames, zero insertion at an IFFT input, a disabled IFFT, input
// back-pressure (in_ready low while in_valid is high), a gap in in_valid, and
// loading of the next frame while the IFFTs are still busy.  The including
// module holds the watchdog.

  localparam int  N   = 64;
  localparam int  AW  = $clog2(N);
  localparam real TOL = 4.0;
  localparam int  NFRAMES = 24;
  localparam int  LAT = N + 19 + 2 * CMAC_ST;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  cplx_t in_sym;
  alpha_t in_cfg, out_cfg;
  logic [AW-1:0] out_idx;
  cplx_out_t out_sample;

  int checks = 0, failures = 0;
  int cyc = 0;
  real max_err = 0.0;

  // mechanism counters
  int n_alpha [3];
  int n_switch = 0, n_zero_ins = 0, n_disabled = 0, n_backpressure = 0;
  int n_gap = 0, n_overlap = 0, n_latency = 0;

  typedef struct { alpha_t cfg; real re [N]; real im [N]; bit timed; int last_cyc; } frame_t;
  frame_t frames [$];

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------- monitors
  int out_k = 0;
  frame_t cur;
  int prev_valid_cyc = -10;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_backpressure++;
      if (in_valid && in_ready && !(&dut.ifft_idle)) n_overlap++;
      if (dut.state == 1'b1 /* C_FEED */)
        for (int r = 0; r < C_MAX; r++)
          if (dut.ifft_en[r] && !dut.nz[r]) n_zero_ins++;
      if (dut.ifft_en != '1) n_disabled++;
      if (out_valid) begin
        real d;
        if (out_k == 0) begin
          check(frames.size() > 0, "output without a frame");
          if (frames.size() > 0) cur = frames.pop_front();
          if (cur.timed) begin
            check(cyc - cur.last_cyc == LAT,
                  $sformatf("latency %0d (alpha code %0d)", cyc - cur.last_cyc, cur.cfg));
            n_latency++;
          end
        end else begin
          check(prev_valid_cyc == cyc - 1, "samples of a frame not consecutive");
        end
        prev_valid_cyc = cyc;
        check(int'(out_idx) == out_k && out_cfg == cur.cfg,
              $sformatf("order/ratio: idx %0d exp %0d cfg %0d exp %0d", out_idx, out_k, out_cfg, cur.cfg));
        d = fabs(out_sample.re - cur.re[out_k]);
        if (fabs(out_sample.im - cur.im[out_k]) > d) d = fabs(out_sample.im - cur.im[out_k]);
        if (d > max_err) max_err = d;
        check(d <= TOL, $sformatf("alpha code %0d k=%0d got %0d %0dj exp %f %fj", cur.cfg, out_k,
              out_sample.re, out_sample.im, cur.re[out_k], cur.im[out_k]));
        out_k = (out_k + 1) % N;
      end
    end
  end

  // --------------------------------------------------------------- driver
  task automatic send_frame(alpha_t cfg, bit gaps, bit qam16, bit wait_idle);
    cplx_t s [N];
    frame_t f;
    int b, c;
    b = alpha_b(cfg);
    c = alpha_c(cfg);
    for (int n = 0; n < N; n++) begin
      if (qam16) begin
        s[n].re = SAMPLE_W'((int'($urandom % 4) * 2 - 3) * 300);
        s[n].im = SAMPLE_W'((int'($urandom % 4) * 2 - 3) * 300);
      end else begin
        s[n].re = ($urandom % 2 != 0) ? 12'sd1024 : -12'sd1024;
        s[n].im = ($urandom % 2 != 0) ? 12'sd1024 : -12'sd1024;
      end
    end
    f.cfg = cfg;
    for (int k = 0; k < N; k++) begin
      f.re[k] = 0.0; f.im[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real ph;
        ph = 2.0 * PI * real'((n * k * b) % (c * N)) / real'(c * N);
        f.re[k] += (s[n].re * $cos(ph) - s[n].im * $sin(ph)) / N;
        f.im[k] += (s[n].re * $sin(ph) + s[n].im * $cos(ph)) / N;
      end
    end
    if (wait_idle) begin
      // let the transmitter drain completely
      while (!(dut.state == 1'b0 /* C_IDLE */ && !dut.u_buf.full && (&dut.ifft_idle) && !out_valid
               && !dut.u_pp.v1 && !dut.u_pp.v2)) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    f.timed = wait_idle;
    for (int n = 0; n < N; n++) begin
      while (gaps && ($urandom % 4 == 0)) begin
        in_valid = 0;
        n_gap++;
        @(negedge clk);
      end
      in_valid = 1;
      in_sym   = s[n];
      in_cfg   = (n == 0) ? cfg : alpha_t'($urandom % 3);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      if (n == N - 1) begin
        f.last_cyc = cyc;
        frames.push_back(f);
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    alpha_t prev;
    static alpha_t seq [NFRAMES] = '{ALPHA_1, ALPHA_2_3, ALPHA_1_2, ALPHA_1, ALPHA_1_2, ALPHA_2_3,
                              ALPHA_2_3, ALPHA_1_2, ALPHA_1_2, ALPHA_1, ALPHA_1, ALPHA_2_3,
                              ALPHA_1, ALPHA_2_3, ALPHA_1_2, ALPHA_1, ALPHA_1_2, ALPHA_2_3,
                              ALPHA_2_3, ALPHA_1_2, ALPHA_1_2, ALPHA_1, ALPHA_1, ALPHA_2_3};
    foreach (n_alpha[a]) n_alpha[a] = 0;
    in_valid = 0; in_sym = '0; in_cfg = ALPHA_1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prev = ALPHA_1;
    for (int f = 0; f < NFRAMES; f++) begin
      if (f > 0 && seq[f] != prev) n_switch++;
      n_alpha[int'(seq[f])]++;
      prev = seq[f];
      // first six frames timed from idle, then streaming with and without gaps
      send_frame(seq[f], f >= 12 && f % 2 == 0, f % 3 == 2, f < 6);
    end
    // drain
    while (frames.size() > 0 || out_k != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(frames.size() == 0, "all frames output");
    check(n_alpha[0] > 0, "alpha = 1 used");
    check(n_alpha[1] > 0, "alpha = 2/3 used");
    check(n_alpha[2] > 0, "alpha = 1/2 used");
    check(n_switch > 0, "ratio switched between frames");
    check(n_zero_ins > 0, "zero inserted at an IFFT input");
    check(n_disabled > 0, "an IFFT disabled");
    check(n_backpressure > 0, "input back-pressure");
    check(n_gap > 0, "gap in the input");
    check(n_overlap > 0, "next frame loaded while the IFFTs were busy");
    check(n_latency == 6, "latency measured for every timed frame");
    $display("AGU mode %0d: frames a1/a23/a12 %0d/%0d/%0d, switches %0d, zero inserts %0d, disabled-IFFT cycles %0d,",
             AGU_MODE, n_alpha[0], n_alpha[1], n_alpha[2], n_switch, n_zero_ins, n_disabled);
    $display("  back-pressure %0d, gaps %0d, overlapped loads %0d, latency checks %0d, max error %f LSB",
             n_backpressure, n_gap, n_overlap, n_latency, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


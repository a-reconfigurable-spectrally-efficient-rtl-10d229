// tb_sefdm_spectrum - bandwidth-compression workload: 64 QPSK sub-carriers at
// alpha = 1, 2/3 and 1/2, run through the full-size transmitter.
//
// For each ratio FRAMES symbols of random QPSK data are sent back to back.
// Each output symbol X[0..N-1] is transformed with an N-point DFT in floating
// point, and the energy per DFT bin is accumulated.  Sub-carrier n of an SEFDM
// symbol sits at n*alpha bins, so the energy should stay in bins
// 0 .. alpha*N (plus two bins of leakage on either side, which wrap to the
// top bins), and the occupied band should shrink with alpha:
//   * the energy outside that band is below 10 % for every ratio;
//   * above bin 0.7*N + 2 (excluding the two wrap-around leakage bins) alpha = 1
//     carries over 20 % of its energy, while alpha = 2/3 and 1/2 carry under 10 %;
//   * above bin 0.5*N + 2 alpha = 2/3 carries over 15 %, alpha = 1/2 under 10 %.
// Every output sample is also compared with the exact SEFDM symbol (4 LSB).
module tb_sefdm_spectrum;
  import sefdm_pkg::*;

  localparam int  N      = 64;
  localparam int  AW     = $clog2(N);
  localparam int  FRAMES = 16;
  localparam real TOL    = 4.0;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  cplx_t in_sym;
  alpha_t in_cfg, out_cfg;
  logic [AW-1:0] out_idx;
  cplx_out_t out_sample;

  int checks = 0, failures = 0;

  real bin_energy [3][N];
  real exp_re [$], exp_im [$];
  int  n_out = 0;
  real xr [N], xi [N];

  sefdm_tx dut (.*);

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

  // collect output symbols and accumulate their DFT energy per ratio
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real er, ei;
      er = exp_re.pop_front();
      ei = exp_im.pop_front();
      check(fabs(out_sample.re - er) <= TOL && fabs(out_sample.im - ei) <= TOL,
            $sformatf("sample %0d got %0d %0dj exp %f %fj", n_out, out_sample.re, out_sample.im, er, ei));
      xr[out_idx] = out_sample.re;
      xi[out_idx] = out_sample.im;
      if (out_idx == AW'(N - 1)) begin
        for (int m = 0; m < N; m++) begin
          real zr, zi, ph;
          zr = 0.0;
          zi = 0.0;
          for (int k = 0; k < N; k++) begin
            ph = -2.0 * PI * real'((m * k) % N) / N;
            zr += xr[k] * $cos(ph) - xi[k] * $sin(ph);
            zi += xr[k] * $sin(ph) + xi[k] * $cos(ph);
          end
          bin_energy[int'(out_cfg)][m] += zr * zr + zi * zi;
        end
      end
      n_out++;
    end
  end

  function automatic real frac(int a, int lo, int hi);
    real tot = 0.0, part = 0.0;
    for (int m = 0; m < N; m++) begin
      tot += bin_energy[a][m];
      if (m >= lo && m <= hi) part += bin_energy[a][m];
    end
    return part / tot;
  endfunction

  initial begin
    static alpha_t cfgs [3] = '{ALPHA_1, ALPHA_2_3, ALPHA_1_2};
    foreach (bin_energy[a, m]) bin_energy[a][m] = 0.0;
    in_valid = 0; in_sym = '0; in_cfg = ALPHA_1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (cfgs[a]) begin
      int b, c;
      b = alpha_b(cfgs[a]);
      c = alpha_c(cfgs[a]);
      for (int f = 0; f < FRAMES; f++) begin
        cplx_t s [N];
        for (int n = 0; n < N; n++) begin
          s[n].re = ($urandom % 2 != 0) ? 12'sd1024 : -12'sd1024;
          s[n].im = ($urandom % 2 != 0) ? 12'sd1024 : -12'sd1024;
        end
        for (int k = 0; k < N; k++) begin
          real er, ei, ph;
          er = 0.0;
          ei = 0.0;
          for (int n = 0; n < N; n++) begin
            ph = 2.0 * PI * real'((n * k * b) % (c * N)) / real'(c * N);
            er += (s[n].re * $cos(ph) - s[n].im * $sin(ph)) / N;
            ei += (s[n].re * $sin(ph) + s[n].im * $cos(ph)) / N;
          end
          exp_re.push_back(er);
          exp_im.push_back(ei);
        end
        for (int n = 0; n < N; n++) begin
          in_valid = 1;
          in_sym   = s[n];
          in_cfg   = cfgs[a];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
        in_valid = 0;
      end
    end
    while (exp_re.size() > 0) @(negedge clk);
    check(n_out == 3 * FRAMES * N, $sformatf("%0d samples out", n_out));
    begin
      real oob [3], hi70 [3], hi50 [3];
      foreach (cfgs[a]) begin
        int edge_bin;
        edge_bin = (int'(cfgs[a]) == 1) ? (2 * N) / 3 : (int'(cfgs[a]) == 2) ? N / 2 : N - 1;
        oob[a]  = 1.0 - frac(int'(cfgs[a]), 0, edge_bin + 2) - frac(int'(cfgs[a]), N - 2, N - 1)
                  + ((edge_bin + 2 >= N - 2) ? frac(int'(cfgs[a]), N - 2, edge_bin + 2) : 0.0);
        hi70[a] = frac(int'(cfgs[a]), (7 * N) / 10 + 3, N - 3);
        hi50[a] = frac(int'(cfgs[a]), N / 2 + 3, N - 3);
        $display("alpha code %0d: energy outside band %f, above 0.7N %f, above 0.5N %f",
                 cfgs[a], oob[a], hi70[a], hi50[a]);
        check(oob[a] < 0.10, $sformatf("alpha code %0d out-of-band energy %f", cfgs[a], oob[a]));
      end
      check(hi70[0] > 0.20, "alpha = 1 occupies the top of the band");
      check(hi70[1] < 0.10, "alpha = 2/3 leaves the top 30 % empty");
      check(hi70[2] < 0.10, "alpha = 1/2 leaves the top 30 % empty");
      check(hi50[1] > 0.15, "alpha = 2/3 occupies beyond half the band");
      check(hi50[2] < 0.10, "alpha = 1/2 leaves the top half empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

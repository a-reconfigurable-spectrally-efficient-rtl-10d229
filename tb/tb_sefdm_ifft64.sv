// tb_sefdm_ifft64 - checks the 64-point IFFT against a floating-point inverse
// DFT scaled by 1/64.
//
// Frames of random complex words (with random gaps in in_valid) and a few
// single-tone and impulse frames are loaded; each output Y[k] must be within
// TOL LSB of the exact value and arrive in natural order on 64 consecutive
// cycles, the first 17 cycles after the last input word (latency check).  The
// test also disables the block and checks that the output register reads
// 0 + j0 and that nothing is output while disabled.
module tb_sefdm_ifft64;
  import sefdm_pkg::*;

  localparam int  N   = 64;
  localparam real TOL = 2.0;

  logic clk = 0, rst_n = 0;
  logic en, in_valid, in_ready, out_valid, idle;
  logic [5:0] out_idx;
  cplx_t in_data, out_data;

  int checks = 0, failures = 0;
  int cyc = 0;
  int last_in_cyc;

  sefdm_ifft64 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  task automatic run_frame(input cplx_t x [N], input bit gaps);
    real er [N], ei [N];
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real ph = 2.0 * PI * real'((n * k) % N) / N;
        er[k] += (x[n].re * $cos(ph) - x[n].im * $sin(ph)) / N;
        ei[k] += (x[n].re * $sin(ph) + x[n].im * $cos(ph)) / N;
      end
    end
    #1 check(idle && in_ready, $sformatf("idle before frame cyc=%0d en=%0d idle=%0d", cyc, en, idle));
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (gaps && ($urandom % 4 == 0)) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_data  = x[n];
      @(posedge clk);
      #1 last_in_cyc = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    check(!in_ready, "busy after frame");
    for (int k = 0; k < N; k++) begin
      @(posedge clk); #1;
      while (!out_valid && cyc - last_in_cyc < 200) begin
        @(posedge clk); #1;
      end
      if (k == 0)
        check(cyc - last_in_cyc == 17, $sformatf("latency %0d", cyc - last_in_cyc));
      check(out_valid && out_idx == 6'(k), $sformatf("order k=%0d idx=%0d", k, out_idx));
      check(fabs(out_data.re - er[k]) <= TOL && fabs(out_data.im - ei[k]) <= TOL,
            $sformatf("k=%0d got %0d %0dj exp %f %fj", k, out_data.re, out_data.im, er[k], ei[k]));
    end
    @(posedge clk); #1;
    check(!out_valid, "valid ends after 64 samples");
  endtask

  initial begin
    cplx_t x [N];
    en = 1; in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // impulse, then single tones, then random frames
    for (int t = 0; t < 14; t++) begin
      for (int n = 0; n < N; n++) begin
        case (t)
          0: begin x[n].re = (n == 0) ? 12'sd2000 : 12'sd0; x[n].im = (n == 0) ? -12'sd1500 : 12'sd0; end
          1: begin x[n].re = (n == 5) ? 12'sd1024 : 12'sd0; x[n].im = 0; end
          2: begin x[n].re = 12'sd700; x[n].im = -12'sd700; end
          default: begin
            // random QPSK-like and full-range words
            if (t % 2 == 0) begin
              x[n].re = ($urandom % 2 != 0) ? 12'sd1024 : -12'sd1024;
              x[n].im = ($urandom % 2 != 0) ? 12'sd1024 : -12'sd1024;
            end else begin
              x[n].re = SAMPLE_W'($urandom % 2048) - 12'sd1024;
              x[n].im = SAMPLE_W'($urandom % 2048) - 12'sd1024;
            end
          end
        endcase
      end
      run_frame(x, t > 3);
    end
    // disable: output register cleared, state held
    @(negedge clk);
    en = 0;
    repeat (3) @(posedge clk);
    #1;
    check(out_data == '0 && !out_valid && !in_ready, "disabled outputs are zero");
    @(negedge clk);
    en = 1;
    for (int n = 0; n < N; n++) begin x[n].re = 12'(n * 16); x[n].im = -12'(n * 8); end
    run_frame(x, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

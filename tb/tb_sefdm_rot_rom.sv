// tb_sefdm_rot_rom - checks the rotation coefficients for every ratio and
// index against e^{j*2*pi*r*k/(c*N)} computed in floating point (within 1
// LSB), one cycle after the address, and that alpha = 1 yields 1 + j0 on
// both outputs (masked addresses).  Both storage options are checked: full
// tables (dut) and quarter-wave tables with folded addressing (dut_q).
module tb_sefdm_rot_rom;
  import sefdm_pkg::*;

  localparam int N = 64;

  logic clk = 0;
  alpha_t cfg;
  logic [$clog2(N)-1:0] k;
  ccoef_t coef1, coef2;
  ccoef_t coef1_q, coef2_q;

  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  sefdm_rot_rom #(.N(N)) dut (.*);
  sefdm_rot_rom #(.N(N), .QUARTER_WAVE(1'b1)) dut_q (
    .clk (clk), .cfg (cfg), .k (k), .coef1 (coef1_q), .coef2 (coef2_q)
  );

  always #5 clk = ~clk;

  task automatic expect_coef(string what, ccoef_t got, real ph);
    real sc = real'(1 << COEF_FRAC);
    checks++;
    if (fabs(real'(got.re) - $cos(ph) * sc) > 1.0 || fabs(real'(got.im) - $sin(ph) * sc) > 1.0) begin
      failures++;
      if (failures < 10) $display("FAIL %s cfg=%0d k=%0d got %0d %0dj", what, cfg, k, got.re, got.im);
    end
  endtask

  initial begin
    static alpha_t cfgs [3] = '{ALPHA_1, ALPHA_2_3, ALPHA_1_2};
    foreach (cfgs[a]) begin
      for (int i = 0; i < N; i++) begin
        int c;
        @(negedge clk);
        cfg = cfgs[a];
        k   = ($clog2(N))'(i);
        c   = alpha_c(cfg);
        @(posedge clk); #1;
        case (cfg)
          ALPHA_1: begin
            expect_coef("coef1", coef1, 0.0);
            expect_coef("coef2", coef2, 0.0);
          end
          ALPHA_1_2: expect_coef("coef1", coef1, 2.0 * PI * i / (2.0 * N));
          default: begin
            expect_coef("coef1", coef1, 2.0 * PI * i / (3.0 * N));
            expect_coef("coef2", coef2, 2.0 * PI * 2.0 * i / (3.0 * N));
          end
        endcase
        case (cfg)
          ALPHA_1: begin
            expect_coef("coef1_q", coef1_q, 0.0);
            expect_coef("coef2_q", coef2_q, 0.0);
          end
          ALPHA_1_2: expect_coef("coef1_q", coef1_q, 2.0 * PI * i / (2.0 * N));
          default: begin
            expect_coef("coef1_q", coef1_q, 2.0 * PI * i / (3.0 * N));
            expect_coef("coef2_q", coef2_q, 2.0 * PI * 2.0 * i / (3.0 * N));
          end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

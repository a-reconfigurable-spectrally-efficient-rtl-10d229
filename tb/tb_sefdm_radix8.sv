// tb_sefdm_radix8 - checks the radix-8 inverse butterfly against an 8-point
// inverse DFT computed in floating point, for random and extreme inputs.
// Every output component must be within 1 LSB of the exact value.
module tb_sefdm_radix8;
  import sefdm_pkg::*;

  localparam int IW = SAMPLE_W;
  localparam int OW = SAMPLE_W + 4;

  logic signed [IW-1:0] x_re [8], x_im [8];
  logic signed [OW-1:0] y_re [8], y_im [8];

  int checks = 0, failures = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  sefdm_radix8 #(.IW(IW), .OW(OW)) dut (.*);

  task automatic check_once();
    #1;
    for (int k = 0; k < 8; k++) begin
      real er = 0.0, ei = 0.0;
      for (int n = 0; n < 8; n++) begin
        real ph = 2.0 * PI * n * k / 8.0;
        er += x_re[n] * $cos(ph) - x_im[n] * $sin(ph);
        ei += x_re[n] * $sin(ph) + x_im[n] * $cos(ph);
      end
      checks++;
      if (fabs(real'(y_re[k]) - er) > 1.01 || fabs(real'(y_im[k]) - ei) > 1.01) begin
        failures++;
        if (failures < 10)
          $display("FAIL k=%0d got %0d %0dj exp %f %fj", k, y_re[k], y_im[k], er, ei);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < 8; n++) begin
        x_re[n] = IW'($urandom);
        x_im[n] = IW'($urandom);
        if (t < 4) begin  // extremes
          x_re[n] = (t[0]) ? -(2**(IW-1)) : 2**(IW-1) - 1;
          x_im[n] = (t[1]) ? -(2**(IW-1)) : 2**(IW-1) - 1;
        end
      end
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

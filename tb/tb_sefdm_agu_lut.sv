// tb_sefdm_agu_lut - checks the address look-up table for alpha = 1, 2/3 and
// 1/2 against an explicitly built zero-padded matrix: the c*N-entry vector
// holding symbol n at position n*b is arranged column-major into c rows, and
// for every column l and row r the unit must report a zero or the index of
// the symbol found there.  It also checks that every symbol is addressed
// exactly once per frame.
module tb_sefdm_agu_lut;
  import sefdm_pkg::*;

  localparam int N  = 64;
  localparam int AW = $clog2(N);

  alpha_t cfg;
  logic [AW-1:0] col;
  logic [AW-1:0] addr [C_MAX];
  logic [C_MAX-1:0] nz;

  int checks = 0, failures = 0;

  sefdm_agu_lut #(.N(N)) dut (.*);

  initial begin
    static alpha_t cfgs [3] = '{ALPHA_1, ALPHA_2_3, ALPHA_1_2};
    foreach (cfgs[a]) begin
      int b, c;
      int padded [C_MAX*N];     // -1: inserted zero, else symbol index
      int seen [N];
      b = (cfgs[a] == ALPHA_2_3) ? 2 : 1;
      c = (cfgs[a] == ALPHA_2_3) ? 3 : (cfgs[a] == ALPHA_1_2) ? 2 : 1;
      foreach (padded[i]) padded[i] = -1;
      for (int n = 0; n < N; n++) padded[n * b] = n;
      foreach (seen[n]) seen[n] = 0;
      for (int l = 0; l < N; l++) begin
        cfg = cfgs[a];
        col = AW'(l);
        #1;
        for (int r = 0; r < C_MAX; r++) begin
          int e;
          e = (r < c) ? padded[l * c + r] : -1;
          checks++;
          if ((e < 0 && nz[r]) || (e >= 0 && (!nz[r] || int'(addr[r]) != e))) begin
            failures++;
            if (failures < 20)
              $display("FAIL cfg=%0d l=%0d r=%0d exp %0d got nz=%b addr=%0d", a, l, r, e, nz[r], addr[r]);
          end
          if (nz[r]) seen[addr[r]]++;
        end
      end
      foreach (seen[n]) begin
        checks++;
        if (seen[n] != 1) begin
          failures++;
          $display("FAIL cfg=%0d symbol %0d addressed %0d times", a, n, seen[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

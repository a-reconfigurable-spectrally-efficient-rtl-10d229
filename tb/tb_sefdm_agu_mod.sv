// tb_sefdm_agu_mod - checks the counter-based address generator for every
// ratio b/c with 1 <= b <= c <= 3 against an explicitly built zero-padded
// matrix (symbol n at position n*b of a c*N vector, arranged column-major
// into c rows), column by column as the counter steps, including columns
// where step is held low, and a restart with clear.
module tb_sefdm_agu_mod;
  import sefdm_pkg::*;

  localparam int N     = 64;
  localparam int AW    = $clog2(N);
  localparam int R_MAX = C_MAX;
  localparam int BCW   = $clog2(R_MAX + 1);

  logic clk = 0, rst_n = 0;
  logic clear, step;
  logic [BCW-1:0] b, c;
  logic [AW-1:0] addr [R_MAX];
  logic [R_MAX-1:0] nz;

  int checks = 0, failures = 0;

  sefdm_agu_mod #(.N(N), .R_MAX(R_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    clear = 1; step = 0; b = 1; c = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cc = 1; cc <= R_MAX; cc++)
      for (int bb = 1; bb <= cc; bb++)
        for (int pass = 0; pass < 2; pass++) begin
          int padded [R_MAX*N];
          foreach (padded[i]) padded[i] = -1;
          for (int n = 0; n < N; n++) padded[n * bb] = n;
          @(negedge clk);
          b = BCW'(bb); c = BCW'(cc); clear = 1; step = 0;
          @(negedge clk);
          clear = 0;
          for (int l = 0; l < N; l++) begin
            for (int r = 0; r < R_MAX; r++) begin
              int e;
              e = (r < cc) ? padded[l * cc + r] : -1;
              checks++;
              if ((e < 0 && nz[r]) || (e >= 0 && (!nz[r] || int'(addr[r]) != e))) begin
                failures++;
                if (failures < 20)
                  $display("FAIL b/c=%0d/%0d l=%0d r=%0d exp %0d got nz=%b addr=%0d", bb, cc, l, r, e, nz[r], addr[r]);
              end
            end
            // hold the column for a random number of cycles
            step = 1'b0;
            while ($urandom % 4 == 0) @(negedge clk);
            step = 1'b1;
            @(negedge clk);
            step = 1'b0;
          end
        end
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

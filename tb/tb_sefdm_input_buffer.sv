// tb_sefdm_input_buffer - loads frames of random symbols with random gaps and
// checks that in_ready drops after exactly N symbols, that the frame's ratio
// is taken from its first symbol (the unused code reading as alpha = 1), that
// every word reads back through all read ports at random addresses, that
// symbols offered while full are ignored, and that release empties the
// buffer for the next frame.
module tb_sefdm_input_buffer;
  import sefdm_pkg::*;

  localparam int N  = 64;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, full, release_buf;
  cplx_t in_data;
  alpha_t in_cfg, frame_cfg;
  logic [AW-1:0] rd_addr [C_MAX];
  cplx_t rd_data [C_MAX];

  int checks = 0, failures = 0;

  sefdm_input_buffer #(.N(N), .NPORT(C_MAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    cplx_t ref_mem [N];
    static alpha_t cfgs [4] = '{ALPHA_1_2, ALPHA_2_3, ALPHA_1, alpha_t'(2'd3)};
    in_valid = 0; in_data = '0; in_cfg = ALPHA_1; release_buf = 0;
    foreach (rd_addr[p]) rd_addr[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      int n;
      n = 0;
      @(negedge clk);
      check(in_ready && !full, "empty at frame start");
      while (n < N) begin
        in_valid = ($urandom % 3 != 0);
        in_data  = cplx_t'($urandom);
        in_cfg   = (n == 0) ? cfgs[f % 4] : alpha_t'($urandom % 3);
        if (in_valid) begin
          ref_mem[n] = in_data;
          n++;
        end
        @(negedge clk);
        check(full == (n == N), $sformatf("full after %0d symbols", n));
      end
      // offered while full: ignored
      in_valid = 1; in_data = '1;
      @(negedge clk);
      in_valid = 0;
      check(!in_ready && full && frame_cfg == ((f % 4 == 3) ? ALPHA_1 : cfgs[f % 4]), "frame ratio and full");
      for (int t = 0; t < 3 * N; t++) begin
        int a [C_MAX];
        foreach (a[p]) begin
          a[p] = (t < N && p == 0) ? t : int'($urandom % N);
          rd_addr[p] = AW'(a[p]);
        end
        #1;
        foreach (a[p]) check(rd_data[p] == ref_mem[a[p]], $sformatf("read port %0d addr %0d", p, a[p]));
      end
      @(negedge clk);
      release_buf = 1;
      @(negedge clk);
      release_buf = 0;
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

// tb_sefdm_tx - end-to-end test of the transmitter at its default size
// (N = 64, look-up-table address generator).  See sefdm_tx_tb_body.svh for
// what is driven and checked.
module tb_sefdm_tx;
  import sefdm_pkg::*;

  localparam int CMAC_ST  = 1;
  localparam int AGU_MODE = 0;

  `include "sefdm_tx_tb_body.svh"

  sefdm_tx dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_sym     (in_sym),
    .in_cfg     (in_cfg),
    .out_valid  (out_valid),
    .out_idx    (out_idx),
    .out_cfg    (out_cfg),
    .out_sample (out_sample)
  );

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

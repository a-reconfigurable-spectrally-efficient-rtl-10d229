// tb_sefdm_tx_mod - end-to-end test of the transmitter built with the
// counter-based (modulo arithmetic) address generator instead of the
// look-up table, with quarter-wave rotation tables and with three pipeline
// stages per CMAC.  Same stimulus and
// checks as tb_sefdm_tx.
module tb_sefdm_tx_mod;
  import sefdm_pkg::*;

  localparam int CMAC_ST  = 3;
  localparam int AGU_MODE = 1;

  `include "sefdm_tx_tb_body.svh"

  sefdm_tx #(.AGU_MODULO(1'b1), .ROM_QUARTER(1'b1), .CMAC_STAGES(CMAC_ST)) dut (
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

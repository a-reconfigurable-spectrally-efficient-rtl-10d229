// sefdm_postproc - post-processing: rotates and sums the parallel IFFT outputs
// into the serial SEFDM samples.
//
//   X[k] = Y0[k] + W1[k]*Y1[k] + W2[k]*Y2[k],   k = 0..N-1
//
// Y0..Y2 are the outputs of the three row IFFTs, presented together one index
// k per cycle (in_valid, in_idx).  W1, W2 come from the rotation ROMs for the
// frame's ratio cfg (full tables, or quarter-wave tables with ROM_QUARTER).
// Rows that the ratio does not use are 0 + j0 (their IFFTs are disabled),
// so no other reconfiguration is needed here.  The samples leave serially in
// k order, one per cycle, which is the parallel-to-serial output of the
// transmitter.
//
// Pipeline (1 + 2*CMAC_STAGES cycles, 3 by default, independent of cfg):
//   1  ROM read of W1, W2; Y0..Y2, k and cfg registered alongside
//   2  CMAC 1: Y0 + W1*Y1              (CMAC_STAGES cycles)
//   3  CMAC 2: (Y0 + W1*Y1) + W2*Y2    (CMAC_STAGES cycles; Y2 and W2 are
//      delayed to meet it)
// out_idx and out_cfg travel with the data.  Output samples are OUT_W bits per
// component, two bits wider than the IFFT words, with no further scaling.
// The c-1 = 2 CMACs, the ROMs and the option to pipeline the CMACs follow the
// reference design; the pipeline depth and widths are this design's own
// choices.
module sefdm_postproc
  import sefdm_pkg::*;
#(
  parameter int N            = 64,
  parameter bit ROM_QUARTER  = 1'b0,
  parameter int CMAC_STAGES  = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [$clog2(N)-1:0]  in_idx,
  input  alpha_t                in_cfg,
  input  cplx_t                 y0,
  input  cplx_t                 y1,
  input  cplx_t                 y2,
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_idx,
  output alpha_t                out_cfg,
  output cplx_out_t             out_data
);

  localparam int AW = $clog2(N);
  localparam int L  = (CMAC_STAGES < 1) ? 1 : CMAC_STAGES;   // CMAC latency

  ccoef_t         coef1, coef2;
  logic           v1, v2;
  logic [AW-1:0]  idx1;
  alpha_t         cfg1;
  cplx_t          y0_1, y1_1, y2_1;
  cplx_out_t      acc1_in, acc2;

  sefdm_rot_rom #(.N(N), .QUARTER_WAVE(ROM_QUARTER)) u_rom (
    .clk   (clk),
    .cfg   (in_cfg),
    .k     (in_idx),
    .coef1 (coef1),
    .coef2 (coef2)
  );

  // stage 1: align the samples with the ROM output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      idx1 <= '0;
      cfg1 <= ALPHA_1;
      y0_1 <= '0;
      y1_1 <= '0;
      y2_1 <= '0;
    end else begin
      v1   <= in_valid;
      idx1 <= in_idx;
      cfg1 <= in_cfg;
      y0_1 <= y0;
      y1_1 <= y1;
      y2_1 <= y2;
    end
  end

  assign acc1_in.re = OUT_W'(y0_1.re);
  assign acc1_in.im = OUT_W'(y0_1.im);

  // CMAC 1: row 1
  sefdm_cmac #(.STAGES(L)) u_cmac1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .acc_in    (acc1_in),
    .data      (y1_1),
    .coef      (coef1),
    .out_valid (v2),
    .acc_out   (acc2)
  );

  // row 2 and its coefficient wait L cycles for CMAC 1; index and ratio wait
  // 2L cycles for both CMACs
  cplx_t          y2_d    [L];
  ccoef_t         coef2_d [L];
  logic [AW-1:0]  idx_d   [2*L];
  alpha_t         cfg_d   [2*L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) begin
        y2_d[i]    <= '0;
        coef2_d[i] <= '0;
      end
      for (int i = 0; i < 2*L; i++) begin
        idx_d[i] <= '0;
        cfg_d[i] <= ALPHA_1;
      end
    end else begin
      y2_d[0]    <= y2_1;
      coef2_d[0] <= coef2;
      idx_d[0]   <= idx1;
      cfg_d[0]   <= cfg1;
      for (int i = 1; i < L; i++) begin
        y2_d[i]    <= y2_d[i-1];
        coef2_d[i] <= coef2_d[i-1];
      end
      for (int i = 1; i < 2*L; i++) begin
        idx_d[i] <= idx_d[i-1];
        cfg_d[i] <= cfg_d[i-1];
      end
    end
  end

  // CMAC 2: row 2
  sefdm_cmac #(.STAGES(L)) u_cmac2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v2),
    .acc_in    (acc2),
    .data      (y2_d[L-1]),
    .coef      (coef2_d[L-1]),
    .out_valid (out_valid),
    .acc_out   (out_data)
  );

  assign out_idx = idx_d[2*L-1];
  assign out_cfg = cfg_d[2*L-1];

endmodule

// sefdm_tx - reconfigurable SEFDM baseband transmitter (top level).
//
// An SEFDM symbol packs N sub-carriers at a spacing of alpha = b/c times the
// OFDM spacing:
//   X[k] = (1/N) sum_{n=0..N-1} s_n e^{j*2*pi*n*k*b/(c*N)},   k = 0..N-1
// It is computed as c N-point IFFTs over the rows of a zero-padded c x N
// symbol matrix, whose outputs are rotated and summed.  Three ratios are
// supported and can change from one symbol to the next: alpha = 1 (OFDM),
// 2/3 and 1/2.
//
// Data path:
//   sefdm_input_buffer  N symbols arrive serially (in_valid/in_ready) with the
//                       symbol's ratio in_cfg on its first word
//   sefdm_agu_lut       (or sefdm_agu_mod when AGU_MODULO = 1) picks, for each
//                       IFFT input l and each row r, a buffer word or a zero
//   sefdm_ifft64 x3     one IFFT per row; rows r >= c are disabled and output
//                       zeros
//   sefdm_postproc      X[k] = Y0 + W1*Y1 + W2*Y2, one sample per cycle;
//                       rotation tables stored in full, or folded into a
//                       quarter wave when ROM_QUARTER = 1
//
// Frame control: when the buffer holds a frame and all IFFTs are idle, the
// controller latches the frame's ratio, sets the IFFT enables (row r enabled
// when r < c), and feeds the IFFTs for N cycles, one column per cycle, all
// rows in parallel.  It then releases the buffer, which may already load the
// next frame while the IFFTs compute and unload.  The IFFTs are always
// started together, so the latency does not depend on alpha: from the cycle
// the last symbol is accepted by an idle transmitter to the first output
// sample it is N + 19 + 2*CMAC_STAGES cycles (N + 21 by default), and
// X[0..N-1] then leave on N consecutive cycles (out_valid, out_idx = k,
// out_cfg = the frame's ratio).  In steady state a frame takes 2N + 18
// cycles.  CMAC_STAGES sets the pipeline depth of each post-processing CMAC.
//
// The structure (single N-word buffer, address generator, c parallel
// 64-point IFFTs with enables, c-1 CMACs with three rotation ROMs) follows the
// reference design.  The frame controller, handshakes and timing are this
// design's own choices; the IFFT is fixed at 64 points, so N must be 64.
module sefdm_tx
  import sefdm_pkg::*;
#(
  parameter int N          = 64,
  parameter bit AGU_MODULO = 1'b0,
  parameter bit ROM_QUARTER = 1'b0,
  parameter int CMAC_STAGES = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // serial symbol input
  input  logic                  in_valid,
  output logic                  in_ready,
  input  cplx_t                 in_sym,
  input  alpha_t                in_cfg,
  // serial sample output
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_idx,
  output alpha_t                out_cfg,
  output cplx_out_t             out_sample
);

  localparam int AW = $clog2(N);

  typedef enum logic {C_IDLE, C_FEED} ctrl_t;

  ctrl_t             state;
  logic [AW-1:0]     col;
  alpha_t            cur_cfg;
  logic [C_MAX-1:0]  ifft_en;

  logic              buf_full, buf_release;
  alpha_t            buf_cfg;
  logic [AW-1:0]     rd_addr [C_MAX];
  cplx_t             rd_data [C_MAX];
  logic [C_MAX-1:0]  nz;

  logic [C_MAX-1:0]  ifft_idle, ifft_ovalid, ifft_iready;
  logic [5:0]        ifft_oidx [C_MAX];
  cplx_t             ifft_in   [C_MAX];
  cplx_t             ifft_out  [C_MAX];

  logic              start_frame;

  // ---------------------------------------------------------------- buffer
  sefdm_input_buffer #(.N(N), .NPORT(C_MAX)) u_buf (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_data     (in_sym),
    .in_cfg      (in_cfg),
    .full        (buf_full),
    .frame_cfg   (buf_cfg),
    .release_buf (buf_release),
    .rd_addr     (rd_addr),
    .rd_data     (rd_data)
  );

  // ----------------------------------------------------- address generation
  if (AGU_MODULO) begin : g_agu_mod
    localparam int BCW = $clog2(C_MAX + 1);
    logic           agu_clear, agu_step;
    logic [BCW-1:0] agu_b, agu_c;
    always_comb begin
      agu_clear = (state == C_IDLE);
      agu_step  = (state == C_FEED);
      case (cur_cfg)
        ALPHA_2_3: begin agu_b = BCW'(2); agu_c = BCW'(3); end
        ALPHA_1_2: begin agu_b = BCW'(1); agu_c = BCW'(2); end
        default:   begin agu_b = BCW'(1); agu_c = BCW'(1); end
      endcase
    end
    sefdm_agu_mod #(.N(N), .R_MAX(C_MAX)) u_agu (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (agu_clear),
      .step  (agu_step),
      .b     (agu_b),
      .c     (agu_c),
      .addr  (rd_addr),
      .nz    (nz)
    );
  end else begin : g_agu_lut
    sefdm_agu_lut #(.N(N)) u_agu (
      .cfg  (cur_cfg),
      .col  (col),
      .addr (rd_addr),
      .nz   (nz)
    );
  end

  // ------------------------------------------------------------ controller
  assign start_frame = (state == C_IDLE) && buf_full && (&ifft_idle);
  assign buf_release = (state == C_FEED) && (col == AW'(N-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      col     <= '0;
      cur_cfg <= ALPHA_1;
      ifft_en <= '1;
    end else begin
      case (state)
        C_IDLE: if (start_frame) begin
          state   <= C_FEED;
          col     <= '0;
          cur_cfg <= buf_cfg;
          for (int r = 0; r < C_MAX; r++)
            ifft_en[r] <= (r < int'(alpha_c(buf_cfg)));
        end
        C_FEED: begin
          col <= col + 1'b1;
          if (col == AW'(N-1)) state <= C_IDLE;
        end
      endcase
    end
  end

  // ------------------------------------------------------------------ IFFTs
  for (genvar r = 0; r < C_MAX; r++) begin : g_ifft
    assign ifft_in[r] = nz[r] ? rd_data[r] : '0;

    sefdm_ifft64 u_ifft (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (ifft_en[r]),
      .in_valid  (state == C_FEED),
      .in_ready  (ifft_iready[r]),
      .in_data   (ifft_in[r]),
      .out_valid (ifft_ovalid[r]),
      .out_idx   (ifft_oidx[r]),
      .out_data  (ifft_out[r]),
      .idle      (ifft_idle[r])
    );
  end

  // ------------------------------------------------------- post-processing
  sefdm_postproc #(.N(N), .ROM_QUARTER(ROM_QUARTER), .CMAC_STAGES(CMAC_STAGES)) u_pp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ifft_ovalid[0]),
    .in_idx    (AW'(ifft_oidx[0])),
    .in_cfg    (cur_cfg),
    .y0        (ifft_out[0]),
    .y1        (ifft_out[1]),
    .y2        (ifft_out[2]),
    .out_valid (out_valid),
    .out_idx   (out_idx),
    .out_cfg   (out_cfg),
    .out_data  (out_sample)
  );

  // the row IFFTs are started together and must stay in step
  property p_rows_in_step;
    @(posedge clk) disable iff (!rst_n)
      (state == C_FEED) |-> (ifft_iready & ifft_en) == ifft_en;
  endproperty
  a_rows_in_step: assert property (p_rows_in_step);

  property p_outputs_in_step;
    @(posedge clk) disable iff (!rst_n)
      ((ifft_ovalid ^ {C_MAX{ifft_ovalid[0]}}) & ifft_en) == '0;
  endproperty
  a_outputs_in_step: assert property (p_outputs_in_step);

endmodule

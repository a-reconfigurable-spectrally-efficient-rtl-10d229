// sefdm_input_buffer - serial-to-parallel symbol buffer of N complex words.
//
// The symbols of one SEFDM frame arrive serially, one per accepted cycle
// (in_valid && in_ready), and are written in order to words 0..N-1.  The
// compression ratio of the frame is taken from in_cfg together with its first
// symbol; the unused code 2'd3 is read as alpha = 1.  After the N-th symbol the buffer is full: in_ready drops and the
// frame is offered to the transmitter's reordering logic, which reads C_MAX
// words per cycle through combinational read ports at addresses chosen by the
// address generator.  A one-cycle release pulse empties the buffer so that the
// next frame can be loaded.
//
// This single N-word buffer replaces the c*N-word zero-padded matrix of the
// algorithm: zeros are inserted at the IFFT inputs instead of being stored.
// The buffer size and its role follow the reference design; the handshake,
// the frame-level configuration input and the register-file form are this
// design's own choices.
module sefdm_input_buffer
  import sefdm_pkg::*;
#(
  parameter int N     = 64,
  parameter int NPORT = C_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // serial symbol input
  input  logic                   in_valid,
  output logic                   in_ready,
  input  cplx_t                  in_data,
  input  alpha_t                 in_cfg,
  // frame held
  output logic                   full,
  output alpha_t                 frame_cfg,
  input  logic                   release_buf,
  // read ports
  input  logic [$clog2(N)-1:0]   rd_addr [NPORT],
  output cplx_t                  rd_data [NPORT]
);

  localparam int AW = $clog2(N);

  cplx_t          mem [N];
  logic [AW-1:0]  wr_ptr;

  assign in_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      full      <= 1'b0;
      frame_cfg <= ALPHA_1;
    end else if (release_buf) begin
      wr_ptr <= '0;
      full   <= 1'b0;
    end else if (in_valid && !full) begin
      // the unused code 2'd3 is treated as alpha = 1
      if (wr_ptr == '0)
        frame_cfg <= (in_cfg == ALPHA_2_3 || in_cfg == ALPHA_1_2) ? in_cfg : ALPHA_1;
      if (wr_ptr == AW'(N-1)) begin
        wr_ptr <= '0;
        full   <= 1'b1;
      end else begin
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !full && !release_buf) mem[wr_ptr] <= in_data;
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) rd_data[p] = mem[rd_addr[p]];
  end

endmodule

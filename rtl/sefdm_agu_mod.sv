// sefdm_agu_mod - address generation for an arbitrary ratio b/c by modulo
// arithmetic on a counter.
//
// This is the general form of the address generator, meant for a test bed in
// which b and c are run-time inputs rather than presets.  A counter base holds
// l*c for the current IFFT input index l: clear sets it to 0 and every step
// adds c, so it never needs more than log2(c*N) bits.  For each row r the
// matrix element is i = base + r; it carries a symbol when r < c,
// i mod b = 0 and i / b < N, and its buffer address is then i / b.  Otherwise
// a zero is inserted at that IFFT input.
//
// Interface: clear/step control the counter (clear wins); addr[r] and nz[r]
// describe the current column and are combinational from the counter, b and c.
// With b/c equal to 1/1, 2/3 or 1/2 the outputs equal those of sefdm_agu_lut.
// Rows beyond R_MAX (the number of parallel IFFTs) are not produced, so
// c <= R_MAX; 1 <= b <= c is required.  The counter-based scheme follows the
// reference design; the incremental base and the port set are this design's
// own choices.
module sefdm_agu_mod
  import sefdm_pkg::*;
#(
  parameter int N     = 64,
  parameter int R_MAX = C_MAX,
  parameter int BCW   = $clog2(R_MAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    step,
  input  logic [BCW-1:0]          b,
  input  logic [BCW-1:0]          c,
  output logic [$clog2(N)-1:0]    addr [R_MAX],
  output logic [R_MAX-1:0]        nz
);

  localparam int AW = $clog2(N);
  localparam int IW = $clog2(R_MAX * N) + 1;   // one spare bit for base + r

  logic [IW-1:0] base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     base <= '0;
    else if (clear) base <= '0;
    else if (step)  base <= base + IW'(c);
  end

  always_comb begin
    for (int r = 0; r < R_MAX; r++) begin
      logic [IW-1:0] i, q, m;
      i = base + IW'(r);
      q = (b != '0) ? i / IW'(b) : '0;
      m = (b != '0) ? i % IW'(b) : '1;
      nz[r]   = (IW'(r) < IW'(c)) && (m == '0) && (q < IW'(N));
      addr[r] = AW'(q);
    end
  end

endmodule

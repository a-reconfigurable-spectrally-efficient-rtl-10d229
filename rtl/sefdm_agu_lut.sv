// sefdm_agu_lut - address generation unit for the preset compression ratios.
//
// The SEFDM symbol X[k] = sum_n s_n e^{j*2*pi*n*k*b/(c*N)} is the first N
// outputs of a c*N-point inverse DFT of the sequence s' that holds s_n at
// position n*b and zeros elsewhere.  Splitting that transform by i = r + l*c
// gives c N-point IFFTs, one per row r of the c x N matrix into which s' is
// arranged in column-major order.
//
// For column l (the IFFT input index) and row r (the IFFT number) this unit
// returns whether matrix element i = r + l*c holds a symbol (nz[r]) and, if
// so, its buffer address i/b (addr[r]).  An element is a symbol when r < c,
// i mod b = 0 and i/b < N; everything else is an inserted zero.  The answers
// for alpha = 1, 2/3 and 1/2 are held in a look-up table indexed by
// {cfg, l}, filled at elaboration from that rule.
//
// Interface: cfg and col in, addr/nz for C_MAX rows out, combinational.
// That the ASIC variant uses a LUT of addresses follows the reference design;
// the table layout is this design's own choice.
module sefdm_agu_lut
  import sefdm_pkg::*;
#(
  parameter int N = 64
) (
  input  alpha_t                  cfg,
  input  logic [$clog2(N)-1:0]    col,
  output logic [$clog2(N)-1:0]    addr [C_MAX],
  output logic [C_MAX-1:0]        nz
);

  localparam int AW   = $clog2(N);
  localparam int NCFG = 3;
  localparam int EW   = C_MAX * (AW + 1);          // one entry: nz and addr per row

  typedef logic [NCFG*N-1:0][EW-1:0] lut_t;

  function automatic lut_t make_lut();
    lut_t t;
    for (int a = 0; a < NCFG; a++)
      for (int l = 0; l < N; l++) begin
        int unsigned b, c;
        b = alpha_b(alpha_t'(a));
        c = alpha_c(alpha_t'(a));
        t[a*N + l] = '0;
        for (int r = 0; r < C_MAX; r++) begin
          int unsigned i;
          i = r + l * c;
          if (r < c && (i % b) == 0 && (i / b) < N) begin
            t[a*N + l][r*(AW+1) + AW]      = 1'b1;
            t[a*N + l][r*(AW+1) +: AW]     = AW'(i / b);
          end
        end
      end
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [EW-1:0] entry;
  assign entry = LUT[int'(cfg) * N + int'(col)];

  always_comb begin
    for (int r = 0; r < C_MAX; r++) begin
      nz[r]   = entry[r*(AW+1) + AW];
      addr[r] = entry[r*(AW+1) +: AW];
    end
  end

endmodule

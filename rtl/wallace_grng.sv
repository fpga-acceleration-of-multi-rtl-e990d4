// Wallace Gaussian random number generator, one sample per cycle.
//
// A pool of POOL fixed-point values with unit mean square is kept in
// registers. Every fourth sample, four pool entries (one from each quarter
// of the pool, at offsets chosen by a 32-bit LFSR) are replaced by the
// orthogonal transform
//     t = (a + b + c + d) / 2,   a' = t - a,  b' = t - b,  c' = t - c,  d' = t - d
// which keeps their sum of squares and, applied over and over, drives the
// pool towards a normal distribution. The four new values are the next four
// output samples. After reset the pool is filled with +1.0/-1.0 values in
// pairs of opposite sign (so the pool sum, which the transform preserves, is
// zero), each pair's sign from the LFSR started at `seed`. The fill takes
// POOL cycles; `valid`
// rises when that is done. `next` consumes the current sample; a new one is
// shown in the following cycle.
//
// The architecture only names a Wallace generator producing one 5.27
// fixed-point sample per cycle; the pool size, the address selection, the
// +/-1 start pool and the absence of a chi-square correction are this
// design's own choices.
module wallace_grng
  import cdo_pkg::*;
#(
  parameter int unsigned POOL = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  input  logic        next,
  output logic        valid,
  output fx_t         sample
);
  localparam int unsigned Q  = POOL / 4;
  localparam int unsigned PW = $clog2(POOL);
  localparam int unsigned QW = $clog2(Q);
  localparam fx_t ONE = fx_t'(1 << FX_FRAC);

  fx_t               pool [POOL];
  fx_t               outq [4];
  logic [1:0]        ph;
  logic [31:0]       lfsr;
  logic              init;
  logic [PW-1:0]     init_cnt;
  logic [QW-1:0]     grp;

  // Galois LFSR, polynomial x^32 + x^22 + x^2 + x + 1
  function automatic logic [31:0] lfsr_step(logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  logic [PW-1:0] addr [4];
  fx_t           newv [4];

  always_comb begin
    logic signed [FX_W+2:0] sum;
    logic signed [FX_W+2:0] t;
    logic signed [FX_W+2:0] d;
    for (int j = 0; j < 4; j++)
      addr[j] = PW'(j * Q) + PW'(QW'(grp + QW'(lfsr >> (8 * j))));
    sum = '0;
    for (int j = 0; j < 4; j++) sum += (FX_W+3)'(pool[addr[j]]);
    t = sum >>> 1;
    for (int j = 0; j < 4; j++) begin
      d = t - (FX_W+3)'(pool[addr[j]]);
      // keep the result inside the 5.27 range
      if (d > (FX_W+3)'(32'sh7fff_ffff))       newv[j] = fx_t'(32'sh7fff_ffff);
      else if (d < -(FX_W+3)'(32'sh7fff_ffff)) newv[j] = -fx_t'(32'sh7fff_ffff);
      else                                      newv[j] = fx_t'(d);
    end
  end

  logic advance;
  assign advance = valid && next;
  assign valid   = !init;
  assign sample  = outq[ph];

  logic seeded;
  logic init_bit, pair_bit;
  // entries 2m and 2m+1 get opposite signs, so the pool sum (which the
  // transform preserves) is zero and the samples have zero mean
  assign init_bit = init_cnt[0] ? ~pair_bit : lfsr[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init     <= 1'b1;
      pair_bit <= 1'b0;
      seeded   <= 1'b0;
      init_cnt <= '0;
      lfsr     <= 32'h1;
      ph       <= '0;
      grp      <= '0;
      for (int j = 0; j < 4; j++) outq[j] <= '0;
    end else if (!seeded) begin
      // first cycle after reset loads the seed
      lfsr   <= seed | 32'h1;
      seeded <= 1'b1;
    end else if (init) begin
      lfsr     <= lfsr_step(lfsr);
      pair_bit <= init_bit;
      outq[init_cnt[1:0]] <= init_bit ? -ONE : ONE;
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == PW'(POOL - 1)) init <= 1'b0;
    end else if (advance) begin
      ph <= ph + 1'b1;
      if (ph == 2'd3) begin
        for (int j = 0; j < 4; j++) outq[j] <= newv[j];
        lfsr <= lfsr_step(lfsr);
        grp  <= grp + 1'b1;
      end
    end
  end

  // pool storage (no reset: filled by the start-up sweep)
  always_ff @(posedge clk) begin
    if (seeded && init) pool[init_cnt] <= init_bit ? -ONE : ONE;
    else if (advance && ph == 2'd3)
      for (int j = 0; j < 4; j++) pool[addr[j]] <= newv[j];
  end
endmodule

// prng: the processor's hardware pseudorandom number generator.
//
// A 32-bit Galois linear feedback shift register with the maximal-length
// polynomial x^32 + x^22 + x^2 + x + 1 (period 2^32 - 1). `value` is the
// current number; `next` advances it by one step per clock, and `seed_we`
// loads `seed` (a zero seed, which would lock the register, is replaced by
// 1). It serves the processor's two random-number instructions, read-and-
// advance and seed. Only the existence of the generator and its use by two
// instructions are given; the LFSR, its polynomial and the seed port are
// this design's choices. Resets to 1.
module prng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next,
  input  logic        seed_we,
  input  logic [31:0] seed,
  output logic [31:0] value
);

  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lfsr_q <= 32'd1;
    else if (seed_we) lfsr_q <= (seed == 32'd0) ? 32'd1 : seed;
    else if (next)    lfsr_q <= (lfsr_q >> 1) ^ (lfsr_q[0] ? TAPS : 32'd0);
  end

  assign value = lfsr_q;

endmodule

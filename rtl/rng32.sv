// rng32 -- 32-bit xorshift pseudo-random generator for the genetic operators.
//
// Advances once per clock (x ^= x<<13; x ^= x>>17; x ^= x<<5) from a
// non-zero SEED set at reset. Used to pick operators, genes, pins,
// crossover points and reintroduction events. Output is registered.
// The generator type is this implementation's choice; the design only
// asks for random choices.
module rng32 #(
  parameter logic [31:0] SEED = 32'h1234_5679
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] r
);
  logic [31:0] a, b, c;
  always_comb begin
    a = r ^ (r << 13);
    b = a ^ (a >> 17);
    c = b ^ (b << 5);
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r <= SEED;
    else        r <= c;
endmodule

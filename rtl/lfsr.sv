// lfsr: internal-type (Galois) linear feedback shift register.
//
// Stage i is state[i]; stage 0 is loaded from the top stage, and every
// stage i > 0 takes stage i-1, XORed with the top stage where POLY[i] is set.
// The defaults are the test pattern generator of the reference setup:
// 16 bits, x^16 + x^15 + x^13 + x^4 + 1, seed 1010...1010.
//
// Interface: init loads SEED (it wins over en); en advances one step per
// clock. rst_n is asynchronous and also loads SEED. state is the register
// itself, so the phase shifter sees a new value one clock after en.
// Driving the design's primary-input generator from a second instance with
// another seed is this design's own choice of that generator.
module lfsr #(
  parameter int unsigned       WIDTH = lbist_pkg::TPG_LFSR_W,
  parameter logic [WIDTH-1:0]  POLY  = lbist_pkg::TPG_LFSR_POLY,
  parameter logic [WIDTH-1:0]  SEED  = lbist_pkg::TPG_LFSR_SEED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic [WIDTH-1:0] nxt;

  always_comb begin
    nxt = {state[WIDTH-2:0], 1'b0};
    if (state[WIDTH-1]) nxt = nxt ^ POLY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (init) state <= SEED;
    else if (en)   state <= nxt;
  end

endmodule

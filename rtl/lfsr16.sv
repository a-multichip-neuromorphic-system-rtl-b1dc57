// lfsr16: 16-bit maximal-length Galois LFSR (taps x^16+x^14+x^13+x^11+1)
// used as the random source for probabilistic synaptic transmission. The state
// advances by one step on every cycle `step` is high; `rnd` is the current
// state. Reset loads SEED, which must be non-zero. The document gives only
// "the probability of sending an event"; the random source is this design's.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [15:0] rnd
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    rnd <= SEED;
    else if (step) rnd <= {1'b0, rnd[15:1]} ^ (rnd[0] ? 16'hB400 : 16'h0000);
endmodule

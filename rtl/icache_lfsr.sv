// Pseudo-random number source for the pseudo-random replacement policy.
//
// A 16-bit maximal-length Galois LFSR (polynomial x^16+x^14+x^13+x^11+1,
// taps 0xB400) that advances every cycle and never reaches the all-zero
// state. Its low bits pick the victim way when a set has no free way and the
// cache is configured for pseudo-random replacement. The document names the
// policy only; the LFSR, its polynomial and its seed are this design's choice.
module icache_lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic [15:0] rnd_o
);

  logic [15:0] lfsr_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        lfsr_q <= (SEED == '0) ? 16'h0001 : SEED;
    else if (lfsr_q[0]) lfsr_q <= (lfsr_q >> 1) ^ 16'hB400;
    else                lfsr_q <= lfsr_q >> 1;
  end

  assign rnd_o = lfsr_q;

endmodule

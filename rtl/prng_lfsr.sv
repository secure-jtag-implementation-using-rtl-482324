// prng_lfsr: 192-bit pseudo-random number generator for the Schnorr nonces.
//
// A Galois-form LFSR that multiplies its state by x modulo the feedback
// polynomial x^192 + x^191 + x^189 + x^80 + 1 every clock. The polynomial is
// primitive (checked against the prime factors of 2^192 - 1), so the state
// runs through all 2^192 - 1 non-zero values before repeating. The state
// advances every clock and is read in parallel as the 192-bit random number;
// a consumer that needs independent numbers waits W clocks between reads.
// reseed loads a new seed (for example when request_unlock rises) so that
// the sequence does not restart from the same value after every power-up;
// an all-zero seed is replaced by 1 to keep the register out of its lock-up
// state. The polynomial choice and the seed source are this design's own.
//
// Interface: rnd is the current state; reseed is sampled on the clock edge.
// Reset asynchronous, active low, to SEED0.
module prng_lfsr #(
  parameter int unsigned W     = 192,
  parameter logic [W-1:0] POLY = W'((192'b1 << 191) | (192'b1 << 189) | (192'b1 << 80) | 192'b1),
  parameter logic [W-1:0] SEED0 = W'(192'h1f2e3d4c5b6a79880123456789abcdeffedcba9876543210)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         reseed,
  input  logic [W-1:0] seed,
  output logic [W-1:0] rnd
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd <= SEED0;
    end else if (reseed) begin
      rnd <= (seed == '0) ? W'(1) : seed;
    end else begin
      rnd <= {rnd[W-2:0], 1'b0} ^ (rnd[W-1] ? POLY : '0);
    end
  end
endmodule

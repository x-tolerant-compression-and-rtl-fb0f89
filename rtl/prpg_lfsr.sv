// prpg_lfsr: the pseudo-random pattern generator of the decompressor, a
// LEN-bit Fibonacci LFSR that is re-seeded in parallel from the PRPG shadow.
//
// Bit i of the state is element t+i of the sequence s with
// s[t+LEN] = s[t+k] ^ s[t], i.e. characteristic polynomial x^LEN + x^k + 1
// with k = xdbist_pkg::prpg_tap(LEN) (105 for 479 bits). On a cycle with
// shift_en high the state steps once (state[i] <= state[i+1], the top bit
// takes the feedback). On the capture cycle (load high) the state is replaced
// by the seed from the shadow, so re-seeding costs no cycle; load wins over
// shift_en. Reset (synchronous, active low) sets the state to 1, a non-zero
// value.
//
// The 479-bit length is the reference design's; the 257-bit alternative is
// selected with LEN = 257. The feedback polynomial is this design's choice.
// x^257 + x^12 + 1 is primitive (maximum period 2^257 - 1). x^479 + x^105 + 1
// is irreducible; its primitivity was not established, but its period divides
// 2^479 - 1, whose prime factors are all of the form 958k + 1, so the period
// is at least 959 steps, far more than the 40 steps run per seed.
module prpg_lfsr #(
  parameter int unsigned LEN = xdbist_pkg::PRPG_LEN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           load,
  input  logic [LEN-1:0] seed,
  output logic [LEN-1:0] state
);
  localparam int unsigned TAP = xdbist_pkg::prpg_tap(LEN);

  always_ff @(posedge clk) begin
    if (!rst_n)        state <= LEN'(1);
    else if (load)     state <= seed;
    else if (shift_en) state <= {state[TAP] ^ state[0], state[LEN-1:1]};
  end
endmodule

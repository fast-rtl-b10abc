// tausworthe_rng: parallel Tausworthe uniform random number generator.
//
// The bit sequence is the linear recurrence of the primitive trinomial x^P + x^Q + 1
// over GF(2): a[k] = a[k-P] xor a[k-P+Q]. A plain LFSR needs L shifts per L-bit number;
// here the register is advanced by L shifts in every enabled clock, so a new L-bit
// number is ready each cycle. The L-step update is written as an unrolled loop; it is
// the same function as splitting the register into L interleaved smaller registers.
// The L newest sequence bits form the output, so successive outputs are disjoint blocks
// of L consecutive bits of the sequence.
//
// Interface: `step` high for one clock advances the generator; `rnd` is the current
// number (valid from reset on, changes on the clock after `step`).
// P = 127, Q = 1, L = 16 are the values the design uses. The seed is a parameter
// (any nonzero value); the seed and the bit order of the output are this design's choice.
module tausworthe_rng #(
  parameter int unsigned     P    = 127,
  parameter int unsigned     Q    = 1,
  parameter int unsigned     L    = 16,
  parameter logic [P-1:0]    SEED = {{(P-1){1'b0}}, 1'b1}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [L-1:0] rnd
);

  // s[j] holds a[k-1-j]: s[0] is the newest bit, s[P-1] the oldest.
  logic [P-1:0] s, s_next;

  always_comb begin
    s_next = s;
    for (int unsigned i = 0; i < L; i++) begin
      s_next = {s_next[P-2:0], s_next[P-1] ^ s_next[P-1-Q]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= SEED;
    else if (step) s <= s_next;
  end

  assign rnd = s[L-1:0];

`ifndef SYNTHESIS
  initial assert (SEED != '0) else $error("tausworthe_rng: SEED must be nonzero");
  initial assert (Q > 0 && Q < P && L < P) else $error("tausworthe_rng: bad P/Q/L");
`endif

endmodule

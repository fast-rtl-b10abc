// wrr_selector: selection logic of the weighted round-robin scheduler.
//
// There is one control element (CTRLEL) per guaranteed-bit-rate (GBR) queue, joined in a
// ring by a token (carry) line. The element that sent during the previous cell-time
// injects the token into the next one; an element that receives the token blocks it
// (is selected) when its queue is not EMPTY and, in the first round, not out of credit
// (ZERO); otherwise it passes the token on, like the carry of a ripple adder. The ring
// is too long for one clock, so the elements are evaluated in groups of GROUP per clock,
// with the carry held in a flip-flop between groups: one round over NQ elements takes
// NQ/GROUP clocks and ends with the initiating element itself. If the first round finds
// nothing, the ABR queue is taken when it holds a cell; otherwise a second round runs in
// which any non-empty GBR queue blocks the token regardless of its credit.
//
// Implementation: at `start` the EMPTY and ZERO bits are captured rotated so that the
// element after the initiator is at position 0; groups are then consecutive positions
// from the initiator, and the chosen position is rotated back into a queue number.
// The initiator is the last GBR queue this selector chose (queue NQ-1 after reset), so
// the token starts at queue 0 after reset; an ABR choice leaves it unchanged.
//
// Timing: `start` is sampled on a clock edge; each following clock evaluates one group.
// `done` is high for one cycle after the last group evaluated: k clocks after `start`
// when the choice is made in group k, at most 2*NQ/GROUP (16) when nothing is found.
// `found`, `sel_abr`, `sel_q` and `sel_round2` hold until the next `start`.
// The token chain, grouping, rounds and ABR rule follow the document; capturing the
// bits rotated, and keeping the first-round flag as one result bit rather than a
// flip-flop in every element, are this design's choices.
module wrr_selector #(
  parameter int unsigned NQ    = 32,
  parameter int unsigned GROUP = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NQ-1:0]         empty,      // EMPTY register
  input  logic [NQ-1:0]         zero,       // ZERO register (no credit left)
  input  logic                  abr_empty,
  output logic                  busy,
  output logic                  done,
  output logic                  found,
  output logic                  sel_abr,
  output logic [$clog2(NQ)-1:0] sel_q,
  output logic                  sel_round2  // chosen in the second round
);
  localparam int unsigned QW     = $clog2(NQ);
  localparam int unsigned NGROUP = NQ / GROUP;
  localparam int unsigned GW     = (NGROUP > 1) ? $clog2(NGROUP) : 1;

  logic [QW-1:0] last;                 // initiating element
  logic [NQ-1:0] r_empty, r_zero;      // rotated snapshots
  logic          r_abr_empty;
  logic          round2;
  logic [GW-1:0] grp;

  function automatic logic [NQ-1:0] rot(input logic [NQ-1:0] v, input logic [QW-1:0] sh);
    logic [2*NQ-1:0] d;
    d = {v, v} >> sh;
    return d[NQ-1:0];   // upper half of d is the wrapped copy, not needed
  endfunction

  // one group of control elements: the carry flip-flop feeds the first element, and
  // each element passes the carry on unless it blocks it
  logic [GROUP-1:0]         elig;
  logic                     hit;
  logic [$clog2(GROUP)-1:0] hit_pos;

  always_comb begin
    logic carry;
    carry   = 1'b1;
    hit     = 1'b0;
    hit_pos = '0;
    for (int i = 0; i < GROUP; i++) begin
      elig[i] = !r_empty[int'(grp) * GROUP + i] &&
                (round2 || !r_zero[int'(grp) * GROUP + i]);
      if (carry && elig[i]) begin
        hit     = 1'b1;
        hit_pos = ($clog2(GROUP))'(i);
      end
      carry = carry && !elig[i];
    end
  end

  logic [QW-1:0] hit_q;
  assign hit_q = QW'(last + 1'b1 + QW'(int'(grp) * GROUP) + QW'(hit_pos));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last        <= QW'(NQ - 1);
      r_empty     <= '1;
      r_zero      <= '1;
      r_abr_empty <= 1'b1;
      round2      <= 1'b0;
      grp         <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      found       <= 1'b0;
      sel_abr     <= 1'b0;
      sel_q       <= '0;
      sel_round2  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        r_empty     <= rot(empty, QW'(last + 1'b1));
        r_zero      <= rot(zero,  QW'(last + 1'b1));
        r_abr_empty <= abr_empty;
        round2      <= 1'b0;
        grp         <= '0;
        busy        <= 1'b1;
        found       <= 1'b0;
        sel_abr     <= 1'b0;
        sel_round2  <= 1'b0;
      end else if (busy) begin
        if (hit) begin                      // token blocked: this queue sends
          busy       <= 1'b0;
          done       <= 1'b1;
          found      <= 1'b1;
          sel_q      <= hit_q;
          sel_round2 <= round2;
          last       <= hit_q;
        end else if (grp == GW'(NGROUP - 1)) begin
          if (!round2 && !r_abr_empty) begin  // no GBR queue with credit: ABR sends
            busy    <= 1'b0;
            done    <= 1'b1;
            found   <= 1'b1;
            sel_abr <= 1'b1;
          end else if (!round2) begin         // second round, credits ignored
            round2 <= 1'b1;
            grp    <= '0;
          end else begin                      // nothing to send
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          grp <= grp + 1'b1;
        end
      end
    end
  end

`ifndef SYNTHESIS
  initial assert (NQ % GROUP == 0 && (NQ & (NQ - 1)) == 0)
    else $error("wrr_selector: NQ must be a power of two and a multiple of GROUP");
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  assert property (@(posedge clk) disable iff (!rst_n) (done && sel_abr) |-> !sel_round2);
`endif

endmodule

// cascade_tx: sending side of the board-to-board cell link of an output port.
//
// Boards are cascaded through a 20-line connector per output port: 16 data lines and 4
// control lines. Cells the output port transmits are queued in a small FIFO and sent
// one 16-bit word per cell with a four-phase handshake: the sender drives the word and
// raises REQ (control line 0); the receiver takes the word and raises ACK (control
// line 1); the sender drops REQ, and the receiver drops ACK, which ends the transfer.
// The two boards need not share a clock: ACK is passed through two flip-flops. Control
// lines 2 and 3 are not used by this protocol and are driven low.
// A cell that finds the FIFO full is dropped and counted in `overflow`.
//
// Interface: `in_valid` for one clock queues `in_word`. A transfer takes at least six
// clocks (two per synchroniser crossing plus the handshake steps), well under a
// cell-time. The 16+4 line split follows the document; the four-phase protocol, the
// FIFO and its depth are this design's choices.
module cascade_tx #(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] in_word,
  output logic [15:0] lnk_data,
  output logic [3:0]  lnk_ctrl_out,   // [0] REQ, [3:2] unused (low)
  input  logic        lnk_ack,        // control line 1 from the receiver
  output logic        idle,
  output logic [15:0] overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0]  fifo [DEPTH];
  logic [AW:0]  wr, rd;
  logic         ack_s1, ack_s2, req;
  logic         empty, full;

  typedef enum logic [1:0] {T_IDLE, T_WAIT_ACK, T_WAIT_NACK} tstate_t;
  tstate_t st;

  assign empty = (wr == rd);
  assign full  = (wr - rd) == (AW+1)'(DEPTH);

  always_ff @(posedge clk) begin
    if (in_valid && !full) fifo[wr[AW-1:0]] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr <= '0; rd <= '0; ack_s1 <= 1'b0; ack_s2 <= 1'b0; req <= 1'b0;
      lnk_data <= '0; overflow <= '0; st <= T_IDLE;
    end else begin
      ack_s1 <= lnk_ack;
      ack_s2 <= ack_s1;
      if (in_valid) begin
        if (!full) wr <= wr + 1'b1;
        else       overflow <= overflow + 1'b1;
      end
      unique case (st)
        T_IDLE: if (!empty && !ack_s2) begin
          lnk_data <= fifo[rd[AW-1:0]];
          req      <= 1'b1;
          st       <= T_WAIT_ACK;
        end
        T_WAIT_ACK: if (ack_s2) begin
          req <= 1'b0;
          rd  <= rd + 1'b1;
          st  <= T_WAIT_NACK;
        end
        T_WAIT_NACK: if (!ack_s2) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

  assign lnk_ctrl_out = {2'b00, 1'b0, req};
  assign idle         = empty && (st == T_IDLE);

`ifndef SYNTHESIS
  // data must not change while REQ is high
  assert property (@(posedge clk) disable iff (!rst_n) (req && $past(req)) |-> $stable(lnk_data))
    else $error("cascade_tx: data changed during a transfer");
`endif

endmodule

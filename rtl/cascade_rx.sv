// cascade_rx: receiving side of the board-to-board cell link, in a traffic generator.
//
// A traffic generator can take its cells from outside instead of generating them: from
// the output port of another board or from an external source. The words arrive on 16
// data lines with the four-phase REQ/ACK handshake of cascade_tx (REQ on control line
// 0 in, ACK on control line 1 out). REQ passes through two flip-flops; the word is taken
// once REQ is seen high, then ACK is raised until REQ falls. Received words are held in
// a FIFO in the generator's local memory until the generator forwards them, one per
// cell-time, to its input module. A word that finds the FIFO full is dropped and counted.
//
// Interface: `out_valid` says a word is waiting in `out_word`; `pop` for one clock
// removes it. `level` is the number of words held. Buffering in local memory follows
// the document; the protocol and the depth are this design's choices.
module cascade_rx #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [15:0]             lnk_data,
  input  logic                    lnk_req,     // control line 0 from the sender
  output logic                    lnk_ack,     // control line 1 to the sender
  input  logic                    pop,
  output logic                    out_valid,
  output logic [15:0]             out_word,
  output logic [$clog2(DEPTH):0]  level,
  output logic [15:0]             overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0] fifo [DEPTH];
  logic [AW:0] wr, rd;
  logic        req_s1, req_s2, take;

  assign take      = req_s2 && !lnk_ack;
  assign out_valid = (wr != rd);
  assign out_word  = fifo[rd[AW-1:0]];
  assign level     = wr - rd;

  always_ff @(posedge clk) begin
    if (take && level != (AW+1)'(DEPTH)) fifo[wr[AW-1:0]] <= lnk_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr <= '0; rd <= '0; req_s1 <= 1'b0; req_s2 <= 1'b0; lnk_ack <= 1'b0; overflow <= '0;
    end else begin
      req_s1 <= lnk_req;
      req_s2 <= req_s1;
      if (take) begin
        lnk_ack <= 1'b1;
        if (level != (AW+1)'(DEPTH)) wr <= wr + 1'b1;
        else                         overflow <= overflow + 1'b1;
      end else if (!req_s2) begin
        lnk_ack <= 1'b0;
      end
      if (pop && out_valid) rd <= rd + 1'b1;
    end
  end

endmodule

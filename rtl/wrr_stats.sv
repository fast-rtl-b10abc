// wrr_stats: statistics module of the output-port scheduler.
//
// For every transmitted cell the sender reports the cell's queueing delay (cell-times
// from its arrival timestamp to its transmission) and the queue it came from. The module
// keeps the count of transmitted cells, the sum and the maximum of their delays, a
// histogram of delays in power-of-two bins (bin 0: delay 0, bin b: 2^(b-1) <= delay <
// 2^b) and the number of cells sent from each queue.
//
// Interface: `ev` high for one clock records one cell. Counters are read through the
// combinational port `rd_addr`/`rd_data`: 0x00 cells sent, 0x01/0x02 delay sum low/high
// word, 0x03 maximum delay, 0x10+b histogram bin b, 0x40+q cells sent from queue q.
// `clear` zeroes all counters in one clock. That delays are recorded follows the document; which
// counters, and the logarithmic bins, are this design's choice.
module wrr_stats #(
  parameter int unsigned TS_W = 16,
  parameter int unsigned NQ   = 33    // queues counted separately (GBR queues + ABR)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  ev,
  input  logic [TS_W-1:0]       delay,
  input  logic [$clog2(NQ)-1:0] q,
  input  logic [7:0]            rd_addr,
  output logic [31:0]           rd_data
);
  localparam int unsigned NBINS = TS_W + 1;

  logic [31:0]     sent;
  logic [63:0]     delay_sum;
  logic [TS_W-1:0] max_delay;
  logic [31:0]     hist  [NBINS];
  logic [31:0]     per_q [NQ];

  function automatic int unsigned bin_of(input logic [TS_W-1:0] d);
    int unsigned b;
    b = 0;
    for (int i = 0; i < TS_W; i++) if (d[i]) b = i + 1;
    return b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent      <= '0;
      delay_sum <= '0;
      max_delay <= '0;
      for (int b = 0; b < NBINS; b++) hist[b] <= '0;
      for (int i = 0; i < NQ; i++)    per_q[i] <= '0;
    end else if (clear) begin
      sent      <= '0;
      delay_sum <= '0;
      max_delay <= '0;
      for (int b = 0; b < NBINS; b++) hist[b] <= '0;
      for (int i = 0; i < NQ; i++)    per_q[i] <= '0;
    end else if (ev) begin
      sent      <= sent + 1'b1;
      delay_sum <= delay_sum + 64'(delay);
      if (delay > max_delay) max_delay <= delay;
      hist[bin_of(delay)] <= hist[bin_of(delay)] + 1'b1;
      if (int'(q) < NQ) per_q[q] <= per_q[q] + 1'b1;
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr == 8'h00)      rd_data = sent;
    else if (rd_addr == 8'h01) rd_data = delay_sum[31:0];
    else if (rd_addr == 8'h02) rd_data = delay_sum[63:32];
    else if (rd_addr == 8'h03) rd_data = 32'(max_delay);
    else if (rd_addr >= 8'h10 && rd_addr < 8'h10 + 8'(NBINS)) rd_data = hist[($clog2(NBINS))'(rd_addr - 8'h10)];
    else if (rd_addr >= 8'h40 && rd_addr < 8'h40 + 8'(NQ))    rd_data = per_q[($clog2(NQ))'(rd_addr - 8'h40)];
  end

endmodule

// output_module: concentration and weighted round-robin scheduling for one output port.
//
// Cells from the four input modules are queued by VCI: a table in control memory maps
// each VCI to one of NQ guaranteed-bit-rate (GBR) queues or to the ABR queue. All
// queues are linked lists in one cell memory of NCELLS buffers, so the buffer space is
// fully shared. Each buffer holds the cell and its arrival timestamp; a separate
// next-pointer memory links buffers into queues and free buffers into the free pool.
// Head and tail pointers of every queue sit in control memory. Freed buffers are pushed
// onto the free list; buffers never used yet are handed out from a fill pointer, so the
// free list needs no initialisation pass. A cell that finds no free buffer is dropped.
//
// Bandwidth is shared in frames of `frame_len` cell-times counted by the down-counter
// TIMER. GBR queue i may send n_i cells (its credit, written by the host) per frame with
// priority; the wrr_selector chooses the queue using the EMPTY and ZERO registers. At
// a frame start ZERO is cleared (except for queues given no credit) and every RESTART
// bit is set; a queue's credit counter is reloaded from n_i only when it first sends in
// the frame, which is what RESTART records, so the counters can live in memory.
//
// One cell-time (`cell_start` sampled on a clock edge, `now` is the current cell-time):
//   edge 0   capture the four input paths; frame TIMER/ZERO/RESTART update
//   clk 1-4  receiver: one input per clock, allocate a buffer, timestamp, link to its
//            queue; the selector starts in clock 1 on the EMPTY/ZERO values of clock 1
//   wait     until the selector is done (it needs 1 to 16 clocks)
//   send     sender: unlink the head of the chosen queue, free the buffer, update credit,
//            ZERO, EMPTY and statistics, present the cell on `tx_cell`, raise `done`
// A cell therefore waits at least one cell-time in its queue. `tx_*` hold until the
// next cell-time's send clock.
//
// Host port (addr[15:12]): 0 VCI map entry addr[7:0], bits {abr, queue[4:0]}; 1 credit
// n_i of GBR queue addr[4:0]; 2 registers (addr 0: frame length, addr 1: write clears
// statistics); 3 statistics read, addr[7:0] as in wrr_stats; 4 counters (read): 0 cells
// received, 1 cells dropped, 2 frames started, 3 buffers in use.
// The queue organisation, registers and scheduling rule follow the document; the cell
// schedule above, the fill pointer, the drop on overflow, the VCI map format and the
// register map are this design's choices.
module output_module
  import fast_pkg::*;
#(
  parameter int unsigned NCELLS = 32768,
  parameter int unsigned NQ     = 32,
  parameter int unsigned TS_W   = 16,
  parameter logic [15:0] FRAME_LEN_RESET = 16'd64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cell_start,
  input  logic [TIME_W-1:0]  now,
  input  path_t              in_path [N_PORTS],
  output logic               done,
  output cell_t              tx_cell,
  output logic [5:0]         tx_queue,      // 0..NQ-1 GBR, NQ = ABR
  output logic               tx_round2,     // sent in the second round (no credit)
  output logic [TS_W-1:0]    tx_delay,
  output logic               frame_start,   // pulse: a new frame began this cell-time
  input  logic               host_we,
  input  logic [HADDR_W-1:0] host_addr,
  input  logic [HDATA_W-1:0] host_wdata,
  output logic [HRD_W-1:0]   host_rdata
);
  localparam int unsigned BW  = $clog2(NCELLS);   // buffer pointer width
  localparam int unsigned QW  = $clog2(NQ);
  localparam int unsigned NQA = NQ + 1;            // GBR queues + ABR queue
  localparam int unsigned ABR = NQ;

  typedef struct packed {
    logic [VCI_W-1:0] vci;
    logic [TS_W-1:0]  ts;
  } buf_t;

  typedef struct packed {
    logic          abr;
    logic [QW-1:0] q;
  } qmap_t;

  typedef enum logic [2:0] {S_IDLE, S_RECV, S_WAIT, S_SEND} state_t;

  // cell memory and control memory
  buf_t           cell_mem [NCELLS];
  logic [BW-1:0]  next_mem [NCELLS];
  qmap_t          qmap     [1 << VCI_W];
  logic [15:0]    credit_max [NQ];
  logic [15:0]    credit     [NQ];
  logic [BW-1:0]  head [NQA];
  logic [BW-1:0]  tail [NQA];

  // registers of the selection logic
  logic [NQA-1:0] empty_r;                 // EMPTY (bit NQ: ABR queue)
  logic [NQ-1:0]  zero_r;                  // ZERO
  logic [NQ-1:0]  restart_r;               // RESTART
  logic [NQ-1:0]  nocredit_r;              // queues whose n_i is 0
  logic [15:0]    timer, frame_len;

  // free buffer pool
  logic [BW-1:0]  free_head;
  logic [BW:0]    free_cnt, fill;

  state_t         state;
  logic [1:0]     rx_i;
  cell_t          in_c [N_PORTS];
  logic [31:0]    rx_count, drop_count, frame_count;

  // ---------------------------------------------------------------- selector
  logic          sel_start, sel_busy, sel_done, sel_found, sel_abr, sel_round2;
  logic [QW-1:0] sel_q;

  assign sel_start = (state == S_RECV) && (rx_i == 2'd0);

  wrr_selector #(.NQ(NQ), .GROUP(4)) u_sel (
    .clk, .rst_n,
    .start(sel_start),
    .empty(empty_r[NQ-1:0]), .zero(zero_r), .abr_empty(empty_r[ABR]),
    .busy(sel_busy), .done(sel_done), .found(sel_found),
    .sel_abr, .sel_q, .sel_round2);

  // ---------------------------------------------------------------- receiver
  cell_t         rc;
  qmap_t         rq_map;
  logic [5:0]    rq;
  logic          r_take_free, r_take_fill, r_alloc;
  logic [BW-1:0] r_buf;

  always_comb begin
    rc          = in_c[rx_i];
    rq_map      = qmap[rc.vci];
    rq          = rq_map.abr ? 6'(ABR) : 6'(rq_map.q);
    r_take_free = (free_cnt != '0);
    r_take_fill = !r_take_free && (fill < (BW+1)'(NCELLS));
    r_alloc     = (state == S_RECV) && rc.valid && (r_take_free || r_take_fill);
    r_buf       = r_take_free ? free_head : fill[BW-1:0];
  end

  // ---------------------------------------------------------------- sender
  logic [5:0]    sq;
  logic [BW-1:0] s_buf;
  buf_t          s_cell;
  logic          s_do;
  logic [15:0]   s_credit;

  always_comb begin
    sq       = sel_abr ? 6'(ABR) : 6'(sel_q);
    s_buf    = head[sq];
    s_cell   = cell_mem[s_buf];
    s_do     = (state == S_SEND) && sel_found;
    s_credit = restart_r[sel_q] ? credit_max[sel_q] : credit[sel_q];
  end

  // ---------------------------------------------------------------- statistics
  logic [31:0] stat_rdata;
  logic        stat_clear;

  assign stat_clear = host_we && host_addr[15:12] == 4'h2 && host_addr[3:0] == 4'd1;

  wrr_stats #(.TS_W(TS_W), .NQ(NQA)) u_stats (
    .clk, .rst_n,
    .clear(stat_clear),
    .ev(s_do),
    .delay(TS_W'(now) - s_cell.ts),
    .q(sq),
    .rd_addr(host_addr[7:0]),
    .rd_data(stat_rdata));

  // ---------------------------------------------------------------- memories
  always_ff @(posedge clk) begin
    if (r_alloc) cell_mem[r_buf] <= '{vci: rc.vci, ts: TS_W'(now)};
    // one write port on the next-pointer memory: link on receive, free-list push on send
    if (r_alloc && !empty_r[rq])  next_mem[tail[rq]] <= r_buf;
    else if (s_do)                next_mem[s_buf]    <= free_head;
    if (r_alloc) tail[rq] <= r_buf;
    if (r_alloc && empty_r[rq]) head[rq] <= r_buf;
    else if (s_do && head[sq] != tail[sq]) head[sq] <= next_mem[s_buf];
    if (s_do && !sel_abr && !sel_round2) credit[sel_q] <= s_credit - 1'b1;
    if (host_we && host_addr[15:12] == 4'h0) qmap[host_addr[VCI_W-1:0]] <= qmap_t'(host_wdata[QW:0]);
    if (host_we && host_addr[15:12] == 4'h1) credit_max[host_addr[QW-1:0]] <= host_wdata;
  end

  // ---------------------------------------------------------------- control unit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rx_i        <= '0;
      done        <= 1'b0;
      empty_r     <= '1;
      zero_r      <= '1;
      restart_r   <= '1;
      nocredit_r  <= '1;
      timer       <= '0;
      frame_len   <= FRAME_LEN_RESET;
      free_head   <= '0;
      free_cnt    <= '0;
      fill        <= '0;
      rx_count    <= '0;
      drop_count  <= '0;
      frame_count <= '0;
      frame_start <= 1'b0;
      tx_cell     <= '0;
      tx_queue    <= '0;
      tx_round2   <= 1'b0;
      tx_delay    <= '0;
      for (int p = 0; p < N_PORTS; p++) in_c[p] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cell_start) begin
          for (int p = 0; p < N_PORTS; p++) in_c[p] <= path_to_cell(in_path[p]);
          rx_i  <= '0;
          state <= S_RECV;
          frame_start <= (timer == '0);
          if (timer == '0) begin               // frame boundary
            timer       <= frame_len - 1'b1;
            zero_r      <= nocredit_r;
            restart_r   <= '1;
            frame_count <= frame_count + 1'b1;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        S_RECV: begin
          if (rc.valid) begin
            rx_count <= rx_count + 1'b1;
            if (!r_alloc) drop_count <= drop_count + 1'b1;
          end
          if (r_alloc) begin
            empty_r[rq] <= 1'b0;
            if (r_take_free) begin
              free_head <= next_mem[free_head];
              free_cnt  <= free_cnt - 1'b1;
            end else begin
              fill <= fill + 1'b1;
            end
          end
          rx_i <= rx_i + 1'b1;
          if (rx_i == 2'd3) state <= S_WAIT;
        end
        S_WAIT: if (!sel_busy) state <= S_SEND;
        S_SEND: begin
          tx_cell   <= '0;
          tx_round2 <= 1'b0;
          if (s_do) begin
            tx_cell   <= '{valid: 1'b1, vci: s_cell.vci};
            tx_queue  <= sq;
            tx_round2 <= sel_round2;
            tx_delay  <= TS_W'(now) - s_cell.ts;
            if (head[sq] == tail[sq]) empty_r[sq] <= 1'b1;
            free_head <= s_buf;
            free_cnt  <= free_cnt + 1'b1;
            if (!sel_abr && !sel_round2) begin
              restart_r[sel_q] <= 1'b0;
              if (s_credit <= 16'd1) zero_r[sel_q] <= 1'b1;
            end
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (host_we && host_addr[15:12] == 4'h1) nocredit_r[host_addr[QW-1:0]] <= (host_wdata == '0);
      if (host_we && host_addr[15:12] == 4'h2 && host_addr[3:0] == 4'd0) begin
        frame_len <= host_wdata;
        timer     <= '0;                       // next cell-time starts a new frame
      end
    end
  end

  always_comb begin
    host_rdata = '0;
    unique case (host_addr[15:12])
      4'h0: host_rdata = 32'(qmap[host_addr[VCI_W-1:0]]);
      4'h1: host_rdata = 32'(credit_max[host_addr[QW-1:0]]);
      4'h2: host_rdata = 32'(frame_len);
      4'h3: host_rdata = stat_rdata;
      4'h4: case (host_addr[1:0])
              2'd0: host_rdata = rx_count;
              2'd1: host_rdata = drop_count;
              2'd2: host_rdata = frame_count;
              2'd3: host_rdata = 32'(fill - free_cnt);
              default: host_rdata = '0;
            endcase
      default: host_rdata = '0;
    endcase
  end

`ifndef SYNTHESIS
  initial assert (NQ == 32 || NQ == 16 || NQ == 8 || NQ == 4)
    else $error("output_module: NQ must be 4, 8, 16 or 32");
  assert property (@(posedge clk) disable iff (!rst_n) free_cnt <= fill)
    else $error("output_module: free pool larger than the buffers handed out");
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_SEND && sel_found) |-> !empty_r[sq])
    else $error("output_module: selected an empty queue");
  assert property (@(posedge clk) disable iff (!rst_n) (state != S_IDLE) |-> !cell_start)
    else $error("output_module: cell_start while busy");
`endif

endmodule

// output_module_tb: runs the scheduler of one output port against a cell-level model
// written independently in the testbench: per-queue FIFOs, the credit/frame rule
// (credit n_i per frame, reloaded at the first send of a frame), the token order of the
// weighted round robin, ABR after the first round and the second round without credit,
// and a finite shared buffer. Every cell-time it compares the transmitted cell, its
// queue, round and queueing delay, and checks that the cell-time finishes within
// 1 + 4 + 16 + 1 clocks. Phases with light load, overload (buffer overflow and drops)
// and idle drain are run; at the end the counters and statistics are compared.
module output_module_tb;
  import fast_pkg::*;
  localparam int unsigned NCELLS = 48, NQ = 32, TS_W = 16;
  localparam int unsigned ABRQ = NQ;

  logic clk = 0, rst_n = 0, cell_start = 0, done, tx_round2, frame_start;
  logic [TIME_W-1:0] now = '0;
  path_t in_path [N_PORTS];
  cell_t tx_cell;
  logic [5:0] tx_queue;
  logic [TS_W-1:0] tx_delay;
  logic host_we = 0;
  logic [HADDR_W-1:0] host_addr = '0;
  logic [HDATA_W-1:0] host_wdata = '0;
  logic [HRD_W-1:0] host_rdata;
  int checks = 0, failures = 0;

  output_module #(.NCELLS(NCELLS), .NQ(NQ), .TS_W(TS_W)) dut (.*);
  always #5 clk = ~clk;

  // ------------------------------------------------------------- model state
  typedef struct { int unsigned vci; int unsigned ts; } mcell_t;
  mcell_t mq [NQ+1][$];
  int unsigned qmap_q [256];
  bit          qmap_abr [256];
  int unsigned nmax [NQ], cred [NQ];
  bit          restart [NQ], zero [NQ];
  int unsigned timer = 0, frame_len = 0, last = NQ - 1;
  int unsigned m_rx = 0, m_drop = 0, m_sent = 0, m_frames = 0, m_r2 = 0, m_abr = 0;
  longint unsigned m_dsum = 0;

  task automatic hw(input logic [15:0] a, input logic [15:0] d);
    host_we = 1; host_addr = a; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  function automatic int unsigned used();
    int unsigned n = 0;
    for (int q = 0; q <= NQ; q++) n += mq[q].size();
    return n;
  endfunction

  task automatic cell_time(input int unsigned load_pct, input bit hot);
    cell_t c [N_PORTS];
    bit e_found = 0, e_abr = 0, e_r2 = 0;
    int unsigned e_q = 0, cyc = 0;
    now = now + 1;
    for (int p = 0; p < N_PORTS; p++) begin
      c[p].valid = ($urandom_range(0, 99) < load_pct);
      c[p].vci = hot ? 8'($urandom_range(0, 7)) : 8'($urandom);
      in_path[p] = cell_to_path(c[p]);
    end
    // model: frame boundary
    if (timer == 0) begin
      timer = frame_len - 1;
      for (int q = 0; q < NQ; q++) begin zero[q] = (nmax[q] == 0); restart[q] = 1; end
      m_frames++;
    end else timer--;
    // model: selection on the queues as they were before this cell-time's arrivals
    for (int o = 0; o < NQ && !e_found; o++) begin
      int unsigned q = (last + 1 + o) % NQ;
      if (mq[q].size() != 0 && !zero[q]) begin e_found = 1; e_q = q; end
    end
    if (!e_found && mq[ABRQ].size() != 0) begin e_found = 1; e_abr = 1; e_q = ABRQ; end
    for (int o = 0; o < NQ && !e_found; o++) begin
      int unsigned q = (last + 1 + o) % NQ;
      if (mq[q].size() != 0) begin e_found = 1; e_r2 = 1; e_q = q; end
    end
    // model: arrivals, inputs in port order
    for (int p = 0; p < N_PORTS; p++) if (c[p].valid) begin
      int unsigned q = qmap_abr[c[p].vci] ? ABRQ : qmap_q[c[p].vci];
      m_rx++;
      if (used() < NCELLS) mq[q].push_back('{vci: c[p].vci, ts: now % 65536});
      else m_drop++;
    end
    // run the cell-time
    cell_start = 1; @(negedge clk); cell_start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc + 1 > 1 + 4 + 16 + 1) begin failures++; $display("FAIL cell-time took %0d clocks", cyc + 1); end
    // compare the transmission
    checks++;
    if (tx_cell.valid !== e_found) begin
      failures++; if (failures < 8) $display("FAIL t=%0d tx valid %0d exp %0d", now, tx_cell.valid, e_found);
    end else if (e_found) begin
      mcell_t m = mq[e_q].pop_front();
      int unsigned d = (now - m.ts) % 65536;
      checks++;
      if (tx_queue !== 6'(e_q) || tx_cell.vci !== 8'(m.vci) || tx_round2 !== e_r2 || tx_delay !== 16'(d)) begin
        failures++;
        if (failures < 8) $display("FAIL t=%0d got q=%0d vci=%0d r2=%0d d=%0d exp q=%0d vci=%0d r2=%0d d=%0d",
          now, tx_queue, tx_cell.vci, tx_round2, tx_delay, e_q, m.vci, e_r2, d);
      end
      m_sent++; m_dsum += d;
      if (e_r2) m_r2++;
      if (e_abr) m_abr++;
      if (!e_abr) last = e_q;
      if (!e_abr && !e_r2) begin
        if (restart[e_q]) begin cred[e_q] = nmax[e_q]; restart[e_q] = 0; end
        cred[e_q]--;
        if (cred[e_q] == 0) zero[e_q] = 1;
      end
    end
  endtask

  task automatic rd_check(input logic [15:0] a, input longint unsigned e, input string w);
    host_addr = a; #1; checks++;
    if (host_rdata != 32'(e)) begin failures++; $display("FAIL %s got %0d exp %0d", w, host_rdata, e); end
  endtask

  initial begin
    for (int p = 0; p < N_PORTS; p++) in_path[p] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // VCI map: mostly GBR queues, every sixth VCI best effort
    for (int v = 0; v < 256; v++) begin
      qmap_abr[v] = (v % 6 == 5);
      qmap_q[v] = $urandom_range(0, NQ - 1);
      if (v < 8 && !qmap_abr[v]) qmap_q[v] = v;
      hw(16'(v), {10'h0, qmap_abr[v], 5'(qmap_q[v])});
    end
    for (int q = 0; q < NQ; q++) begin
      nmax[q] = (q % 9 == 4) ? 0 : $urandom_range(1, 3);
      hw(16'h1000 | 16'(q), 16'(nmax[q]));
    end
    frame_len = 12;
    hw(16'h2000, 16'(frame_len));
    for (int t = 0; t < 300; t++)  cell_time(15, 0);   // light load
    for (int t = 0; t < 400; t++)  cell_time(60, 1);   // overload on few VCs: credit runs out, drops
    for (int t = 0; t < 300; t++)  cell_time(20, 0);
    for (int t = 0; t < 100; t++)  cell_time(0, 0);    // drain
    // change the frame and credits mid-run, as the host would between runs
    frame_len = 5;
    timer = 0;                                          // a new frame starts next
    hw(16'h2000, 16'(frame_len));
    for (int t = 0; t < 400; t++)  cell_time(40, 0);
    rd_check(16'h4000, m_rx, "received");
    rd_check(16'h4001, m_drop, "dropped");
    rd_check(16'h4002, m_frames, "frames");
    rd_check(16'h4003, used(), "buffers in use");
    rd_check(16'h3000, m_sent, "sent");
    rd_check(16'h3001, m_dsum & 32'hffffffff, "delay sum");
    $display("sent %0d second-round %0d abr %0d dropped %0d frames %0d", m_sent, m_r2, m_abr, m_drop, m_frames);
    checks++;
    if (m_r2 == 0 || m_abr == 0 || m_drop == 0) begin failures++; $display("FAIL a mechanism never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fast_top_tb: end-to-end run of the whole board at its full size (32K-cell buffers,
// 32 GBR queues per port), as the host would drive it.
//
// The host loads alias tables that give each traffic generator a chosen load with VCIs
// spread evenly, VC translation tables for the input modules (some VCIs unmapped), VCI
// maps and credits for the output modules, and then runs the simulation in several
// phases: light load; a link delay on one generator; a hot spot sending all traffic to
// output 0 until its buffer overflows; a master run that waits on a slave board; and a
// run in which the generators forward the cells that the output ports sent out over
// the cascade connectors, looped back by cables; a run with ON-OFF sources, checked
// cell by cell against a model of the source; a run with Markov sources; and a slave
// run started from outside.
//
// Monitors check every cell-time: each cell a traffic generator produced appears in the
// next cell-time on exactly the input-to-output path its VC table names, and each
// output port's transmitted cell, queue, round and delay equal a cell-level model of the
// weighted round-robin scheduler fed with the cells that reached that port.
// At the end the module counters read by the host are compared with the model, and
// every mechanism (first-round, ABR and second-round sends, frame starts, buffer
// overflow, unmapped-VCI drops, link delay, refused host write, waiting on a slave
// board, slave-mode start, cells taken from the cascade connector, ON-OFF and Markov cells) must have happened at least once.
// The longest cell-time must stay within 42 clocks (about 3 us at 14 MHz).
module fast_top_tb;
  import fast_pkg::*;
  localparam int unsigned NCELLS = 32768, NQ = 32, ABRQ = 32;

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  logic [19:0] host_addr = '0;
  logic [15:0] host_wdata = '0;
  logic [31:0] host_rdata;
  logic host_err;
  logic [15:0] host_refused;
  logic ext_start = 0, ext_done = 1, sync_start, board_done, running;
  logic [31:0] now;
  cell_t tx_cell [N_PORTS];
  logic [5:0] tx_queue [N_PORTS];
  logic tx_round2 [N_PORTS];
  logic [15:0] tx_delay [N_PORTS];
  logic frame_start [N_PORTS];
  logic [15:0] lnk_out_data [N_PORTS], lnk_in_data [N_PORTS];
  logic [3:0] lnk_out_ctrl [N_PORTS];
  logic lnk_out_ack [N_PORTS], lnk_in_req [N_PORTS], lnk_in_ack [N_PORTS];
  int checks = 0, failures = 0;

  fast_top dut (.*);

  // cascade cables looped back: output port p feeds traffic generator p
  for (genvar p = 0; p < N_PORTS; p++) begin : g_loop
    assign lnk_in_data[p] = lnk_out_data[p];
    assign lnk_in_req[p]  = lnk_out_ctrl[p][0];
    assign lnk_out_ack[p] = lnk_in_ack[p];
  end
  always #5 clk = ~clk;

  // ------------------------------------------------------------ host view of the tables
  logic [2:0]  im_tbl [N_PORTS][256];     // {enable, port}
  bit          om_abr [256];
  int unsigned om_q   [256];
  int unsigned nmax   [NQ];
  int unsigned frame_len = 20;

  // ------------------------------------------------------------ mechanism counters
  int unsigned n_r1 = 0, n_abr = 0, n_r2 = 0, n_frames = 0, n_overflow = 0, n_unmapped = 0;
  int unsigned n_delayed = 0, n_refused = 0, n_ext_wait = 0, n_slave = 0, n_celltimes = 0;
  int unsigned n_ext = 0, n_onoff = 0, n_markov = 0;
  bit markov_on = 0;
  // ON-OFF phase: per-generator model of the source (constant tables ON 8, OFF 4 + g,
  // burst 5), VCI 16*g + 1
  bit onoff_on = 0, oo_first = 0;
  bit oo_on [N_PORTS];
  int unsigned oo_tl [N_PORTS], oo_bl [N_PORTS];
  bit delay_on = 0, ext_on = 0;

  task automatic hw(input int unsigned sel, input logic [15:0] a, input logic [15:0] d);
    host_we = 1; host_addr = {4'(sel), a}; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  task automatic hr(input int unsigned sel, input logic [15:0] a, output logic [31:0] d);
    host_addr = {4'(sel), a}; @(negedge clk); d = host_rdata;
  endtask

  task automatic rd_check(input int unsigned sel, input logic [15:0] a, input longint unsigned e, input string w);
    logic [31:0] d;
    hr(sel, a, d); checks++;
    if (d != 32'(e)) begin failures++; $display("FAIL %s: read %0d expected %0d", w, d, e); end
  endtask

  // alias tables for load `pct`% with uniformly distributed VCIs: codes 256..511 are
  // valid cells (VCI = code - 256), codes 0..255 are "no cell"
  task automatic load_tg(input int unsigned g, input int unsigned pct);
    for (int i = 0; i < 512; i++) begin
      logic [15:0] f, l;
      if (pct < 50) begin
        if (i >= 256) begin f = 16'((2 * pct * 65536) / 100); l = 16'(i - 256); end
        else          begin f = 16'hFFFF;                     l = 16'(i); end
      end else begin
        if (i >= 256) begin f = 16'hFFFF;                             l = 16'(i); end
        else          begin f = 16'((2 * (100 - pct) * 65536) / 100); l = 16'(i + 256); end
      end
      if (pct == 100 && i < 256) f = 16'h0000;
      hw(g, 16'(i), f);
      hw(g, 16'h0200 | 16'(i), l);
    end
    hw(g, 16'h1001, 16'h1);
  endtask

  task automatic set_im(input bit hot);
    for (int i = 0; i < N_PORTS; i++)
      for (int v = 0; v < 256; v++) begin
        im_tbl[i][v] = {(v % 16 != 15), hot ? 2'd0 : 2'(v + i)};
        hw(4 + i, 16'(v), 16'(im_tbl[i][v]));
      end
  endtask

  task automatic set_frame(input int unsigned fl);
    frame_len = fl;
    for (int p = 0; p < N_PORTS; p++) hw(8 + p, 16'h2000, 16'(fl));
    for (int p = 0; p < N_PORTS; p++) m_timer[p] = 0;
  endtask

  task automatic run_cells(input int unsigned n);
    hw(12, 16'h1, 16'(n32 + n)); hw(12, 16'h2, 16'((n32 + n) >> 16));
    n32 += n;
    hw(12, 16'h0, 16'b11);
    @(negedge clk);
    while (running) @(negedge clk);
  endtask
  int unsigned n32 = 0;

  // ------------------------------------------------------------ scheduler model
  typedef struct { int unsigned vci; int unsigned ts; } mcell_t;
  mcell_t      mq [N_PORTS][NQ+1][$];
  int unsigned m_used [N_PORTS];
  int unsigned m_cred [N_PORTS][NQ];
  bit          m_restart [N_PORTS][NQ], m_zero [N_PORTS][NQ];
  int unsigned m_timer [N_PORTS], m_last [N_PORTS];
  int unsigned m_rx [N_PORTS], m_drop [N_PORTS], m_sent [N_PORTS];
  bit          e_valid [N_PORTS], e_r2 [N_PORTS];
  int unsigned e_q [N_PORTS], e_vci [N_PORTS], e_d [N_PORTS];
  cell_t       prev_tg [N_PORTS];
  cell_t       prev_exp [N_PORTS][N_PORTS];   // [input][output], routed with the table in force
  bit          have_prev = 0;

  task automatic model_port(input int unsigned p, input cell_t c [N_PORTS], input int unsigned t);
    bit found = 0, abr = 0, r2 = 0;
    int unsigned q = 0;
    if (m_timer[p] == 0) begin
      m_timer[p] = frame_len - 1;
      for (int k = 0; k < NQ; k++) begin m_zero[p][k] = (nmax[k] == 0); m_restart[p][k] = 1; end
      if (p == 0) n_frames++;
    end else m_timer[p]--;
    for (int o = 0; o < NQ && !found; o++) begin
      int unsigned k = (m_last[p] + 1 + o) % NQ;
      if (mq[p][k].size() != 0 && !m_zero[p][k]) begin found = 1; q = k; end
    end
    if (!found && mq[p][ABRQ].size() != 0) begin found = 1; abr = 1; q = ABRQ; end
    for (int o = 0; o < NQ && !found; o++) begin
      int unsigned k = (m_last[p] + 1 + o) % NQ;
      if (mq[p][k].size() != 0) begin found = 1; r2 = 1; q = k; end
    end
    for (int j = 0; j < N_PORTS; j++) if (c[j].valid) begin
      int unsigned k = om_abr[c[j].vci] ? ABRQ : om_q[c[j].vci];
      m_rx[p]++;
      if (m_used[p] < NCELLS) begin mq[p][k].push_back('{vci: c[j].vci, ts: t % 65536}); m_used[p]++; end
      else begin m_drop[p]++; n_overflow++; end
    end
    e_valid[p] = found; e_r2[p] = r2; e_q[p] = q;
    if (found) begin
      mcell_t m = mq[p][q].pop_front();
      m_used[p]--;
      e_vci[p] = m.vci; e_d[p] = (t - m.ts) % 65536;
      m_sent[p]++;
      if (abr) n_abr++; else if (r2) n_r2++; else n_r1++;
      if (!abr) m_last[p] = q;
      if (!abr && !r2) begin
        if (m_restart[p][q]) begin m_cred[p][q] = nmax[q]; m_restart[p][q] = 0; end
        m_cred[p][q]--;
        if (m_cred[p][q] == 0) m_zero[p][q] = 1;
      end
    end
  endtask

  always @(posedge clk) if (rst_n && dut.cell_start) begin
    cell_t inc [N_PORTS];
    n_celltimes++;
    for (int p = 0; p < N_PORTS; p++) begin
      // transmission of the previous cell-time
      checks++;
      if (tx_cell[p].valid !== e_valid[p] || (e_valid[p] &&
          (tx_queue[p] !== 6'(e_q[p]) || tx_cell[p].vci !== 8'(e_vci[p]) ||
           tx_round2[p] !== e_r2[p] || tx_delay[p] !== 16'(e_d[p])))) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d port %0d: tx v=%0d q=%0d vci=%0d r2=%0d d=%0d, model v=%0d q=%0d vci=%0d r2=%0d d=%0d",
                   now, p, tx_cell[p].valid, tx_queue[p], tx_cell[p].vci, tx_round2[p], tx_delay[p],
                   e_valid[p], e_q[p], e_vci[p], e_r2[p], e_d[p]);
      end
      // routing of the cells the generators produced in the previous cell-time
      for (int j = 0; j < N_PORTS; j++) begin
        cell_t got, exp_c;
        got = path_to_cell(dut.om_in[p][j]);
        exp_c = have_prev ? prev_exp[j][p] : '0;
        checks++;
        if (got !== exp_c) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d path in%0d->out%0d got %h exp %h", now, j, p, got, exp_c);
        end
        inc[j] = got;
      end
      model_port(p, inc, now);
    end
    for (int j = 0; j < N_PORTS; j++) begin
      prev_tg[j] = dut.tg_cell[j];
      if (prev_tg[j].valid && !im_tbl[j][prev_tg[j].vci][2]) n_unmapped++;
      for (int p = 0; p < N_PORTS; p++)
        prev_exp[j][p] = (prev_tg[j].valid && im_tbl[j][prev_tg[j].vci][2] &&
                          im_tbl[j][prev_tg[j].vci][1:0] == 2'(p)) ? prev_tg[j] : '0;
      if (delay_on && j == 1 && prev_tg[j].valid) n_delayed++;
      if (ext_on && prev_tg[j].valid) n_ext++;
      if (markov_on && !oo_first) begin
        checks++;
        if (prev_tg[j].valid && prev_tg[j].vci != 8'(16 * j + 2)) begin
          failures++; $display("FAIL t=%0d Markov generator %0d sent VCI %h", now, j, prev_tg[j].vci);
        end
        if (prev_tg[j].valid) n_markov++;
      end
      if (onoff_on && !oo_first) begin
        cell_t e;
        e = (oo_on[j] && oo_bl[j] != 0 && oo_tl[j] != 0) ? cell_t'({1'b1, 8'(16 * j + 1)}) : cell_t'('0);
        if (e.valid) oo_bl[j]--;
        if (oo_tl[j] > 1) oo_tl[j]--;
        else begin
          if (!oo_on[j]) begin oo_tl[j] = 8; oo_bl[j] = 5; end
          else begin oo_tl[j] = 4 + j; oo_bl[j] = 0; end
          oo_on[j] = !oo_on[j];
        end
        checks++;
        if (prev_tg[j] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d ON-OFF generator %0d got %h exp %h", now, j, prev_tg[j], e);
        end
        if (prev_tg[j].valid) n_onoff++;
      end
    end
    // the monitor sees each generator cell one cell-time late: the first one seen in
    // the ON-OFF phase is still from the previous mode
    oo_first = 0;
    have_prev = 1;
  end

  // clocks between successive cell-time starts, stand-alone master runs only
  int unsigned gap = 0, max_gap = 0;
  bit gap_valid = 0;
  always @(posedge clk) begin
    if (dut.cell_start) begin
      if (gap_valid && !slave_board && gap > max_gap) max_gap = gap;
      gap = 1; gap_valid = running;
    end else if (running) gap++;
    else gap_valid = 0;
  end

  // a slave board that answers each start of the master after 40 clocks
  bit slave_board = 0;
  int unsigned slave_cnt = 0;
  always @(posedge clk) begin
    if (slave_board && sync_start) begin ext_done <= 1'b0; slave_cnt <= 40; end
    else if (slave_cnt > 1) slave_cnt <= slave_cnt - 1;
    else if (slave_cnt == 1) begin ext_done <= 1'b1; slave_cnt <= 0; end
    if (slave_board && !ext_done && dut.u_ctrl.busy && (&dut.u_ctrl.got)) n_ext_wait++;
  end

  initial begin
    logic [31:0] d;
    for (int p = 0; p < N_PORTS; p++) begin
      m_used[p] = 0; m_timer[p] = 0; m_last[p] = NQ - 1; m_rx[p] = 0; m_drop[p] = 0; m_sent[p] = 0;
      e_valid[p] = 0; e_r2[p] = 0; e_q[p] = 0; e_vci[p] = 0; e_d[p] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // ---------------- set-up, simulation stopped
    for (int g = 0; g < N_PORTS; g++) load_tg(g, 30);
    set_im(0);
    for (int v = 0; v < 256; v++) begin
      om_abr[v] = (v % 6 == 5);
      om_q[v] = (v / 4) % NQ;
      for (int p = 0; p < N_PORTS; p++) hw(8 + p, 16'(v), {10'h0, om_abr[v], 5'(om_q[v])});
    end
    for (int k = 0; k < NQ; k++) begin
      nmax[k] = (k % 8 == 3) ? 0 : 1 + k % 3;
      for (int p = 0; p < N_PORTS; p++) hw(8 + p, 16'h1000 | 16'(k), 16'(nmax[k]));
    end
    set_frame(20);
    // ---------------- phase 1: light load
    run_cells(400);
    // ---------------- phase 2: link delay of 3 cell-times on generator 1; a table write
    // attempted during the run must be refused
    hw(1, 16'h1000, 16'd3);
    delay_on = 1;
    hw(12, 16'h1, 16'(n32 + 200)); hw(12, 16'h2, 16'((n32 + 200) >> 16));
    n32 += 200;
    hw(12, 16'h0, 16'b11);
    repeat (50) @(negedge clk);
    hw(4, 16'h0007, 16'h0);               // refused: simulation running
    checks++; if (!host_err) begin failures++; $display("FAIL write during run not refused"); end
    else n_refused++;
    while (running) @(negedge clk);
    delay_on = 0;
    hw(1, 16'h1000, 16'd0);
    // ---------------- phase 3: hot spot, everything to output 0, full load
    for (int g = 0; g < N_PORTS; g++) load_tg(g, 100);
    set_im(1);
    set_frame(40);
    run_cells(13000);
    // ---------------- phase 4: back to light load as master with a slave board
    for (int g = 0; g < N_PORTS; g++) load_tg(g, 20);
    set_im(0);
    slave_board = 1;
    run_cells(30);
    slave_board = 0;
    // ---------------- phase 5: generators take the cells looped back from the outputs
    for (int g = 0; g < N_PORTS; g++) hw(g, 16'h1001, 16'h3);
    ext_on = 1;
    run_cells(100);
    ext_on = 0;
    for (int g = 0; g < N_PORTS; g++) hw(g, 16'h1001, 16'h1);
    // ---------------- phase 5b: ON-OFF sources
    for (int g = 0; g < N_PORTS; g++) begin
      for (int i = 0; i < 512; i++) begin
        hw(g, 16'h3000 | 16'(i), 16'h0); hw(g, 16'h3200 | 16'(i), 16'd8);
        hw(g, 16'h3400 | 16'(i), 16'h0); hw(g, 16'h3600 | 16'(i), 16'(4 + g));
        hw(g, 16'h3800 | 16'(i), 16'h0); hw(g, 16'h3a00 | 16'(i), 16'd5);
      end
      hw(g, 16'h1002, 16'(16 * g + 1));
      hw(g, 16'h1001, 16'h5);
      oo_on[g] = 0; oo_tl[g] = 0; oo_bl[g] = 0;
    end
    onoff_on = 1; oo_first = 1;
    run_cells(120);
    onoff_on = 0;
    for (int g = 0; g < N_PORTS; g++) hw(g, 16'h1001, 16'h1);
    // ---------------- phase 5c: Markov sources with random transitions and rates
    for (int g = 0; g < N_PORTS; g++) begin
      for (int i = 0; i < 256; i++) begin
        hw(g, 16'h4000 | 16'(i), 16'($urandom));
        hw(g, 16'h4100 | 16'(i), 16'($urandom_range(0, 15)));
      end
      for (int k = 0; k < 16; k++) hw(g, 16'h4400 | 16'(k), 16'($urandom_range(0, 16'h8000)));
      hw(g, 16'h4410, 16'd4);
      hw(g, 16'h1002, 16'(16 * g + 2));
      hw(g, 16'h1001, 16'h9);
    end
    markov_on = 1; oo_first = 1;
    run_cells(120);
    markov_on = 0;
    for (int g = 0; g < N_PORTS; g++) hw(g, 16'h1001, 16'h1);
    // ---------------- phase 6: slave mode, started from outside
    hw(12, 16'h0, 16'b01);
    for (int k = 0; k < 20; k++) begin
      while (!board_done) @(negedge clk);
      ext_start = 1; @(negedge clk); ext_start = 0;
      n_slave++;
    end
    while (!board_done) @(negedge clk);
    hw(12, 16'h0, 16'b10);
    @(negedge clk);
    // ---------------- counters
    for (int p = 0; p < N_PORTS; p++) begin
      rd_check(8 + p, 16'h4000, m_rx[p], "output module received");
      rd_check(8 + p, 16'h4001, m_drop[p], "output module dropped");
      rd_check(8 + p, 16'h4003, m_used[p], "output module buffers in use");
      rd_check(8 + p, 16'h3000, m_sent[p], "output module sent");
    end
    rd_check(12, 16'h1, n_celltimes, "cell-times");
    checks++; if (host_refused != 16'(n_refused)) failures++;
    $display("cell-times %0d: first-round %0d abr %0d second-round %0d frames %0d overflow drops %0d",
             n_celltimes, n_r1, n_abr, n_r2, n_frames, n_overflow);
    $display("unmapped drops %0d delayed cells %0d refused writes %0d slave waits %0d slave starts %0d looped-back cells %0d ON-OFF cells %0d Markov cells %0d",
             n_unmapped, n_delayed, n_refused, n_ext_wait, n_slave, n_ext, n_onoff, n_markov);
    // the document's output module needed about 3 us per cell at 14 MHz: 42 clocks
    $display("longest cell-time %0d clocks", max_gap);
    checks++; if (max_gap == 0 || max_gap > 42) begin failures++; $display("FAIL cell-time too long"); end
    checks++;
    if (n_r1 == 0 || n_abr == 0 || n_r2 == 0 || n_frames == 0 || n_overflow == 0 || n_unmapped == 0 ||
        n_delayed == 0 || n_refused == 0 || n_ext_wait == 0 || n_slave == 0 || n_ext == 0 ||
        n_onoff == 0 || n_markov == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

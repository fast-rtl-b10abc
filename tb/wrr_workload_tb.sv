// wrr_workload_tb: the 4x4 switch benchmark, run for 4, 8, 16 and 32 VCs per output
// port on the full-size board (default parameters).
//
// For each VC count V the board is reset and set up as follows. Every traffic
// generator sends a cell in every cell-time, with its VCI uniform over the 4V VCs; the
// alias tables give codes 256..256+4V-1 their own entry and alias every other entry
// onto them in turn. VCI v goes to output port v / V and GBR queue v % V there. Queue i
// has credit 1 + i % 3 and the frame is 4 cell-times longer than the credits add up to.
// Each output port therefore sees a load of one cell per cell-time on average.
//
// Monitors check, at every output port and cell-time:
//   - work conservation: no cell-time passes without a send while some queue held a
//     cell when the selection started;
//   - the bandwidth guarantee: over every whole frame in which GBR queue i held a cell
//     at each selection, queue i sent at least its credit in first-round sends.
// At the end of each run the host counters must balance. Per generator: cells sent
// equal the input module's received cells. Per input module: forwarded equals
// received. Per output module: received = sent + dropped + buffered. The cells in
// flight at the stop are allowed for.
// The run length is CT cell-times per VC count, one million as in the benchmark. The
// mean cell-time length is printed for each V. The largest cell-time must stay within
// 42 clocks (about 3 us at 14 MHz) whatever V is.
module wrr_workload_tb;
  import fast_pkg::*;
  localparam int unsigned NQ = 32;
  localparam int unsigned CT = 1000000;

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
  always #5 clk = ~clk;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_tie
    assign lnk_in_data[p] = '0;
    assign lnk_in_req[p]  = 1'b0;
    assign lnk_out_ack[p] = 1'b0;
  end

  initial begin
    repeat (200000000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hw(input int unsigned sel, input logic [15:0] a, input logic [15:0] d);
    host_we = 1; host_addr = {4'(sel), a}; host_wdata = d; @(negedge clk); host_we = 0;
  endtask
  task automatic hr(input int unsigned sel, input logic [15:0] a, output logic [31:0] d);
    host_addr = {4'(sel), a}; @(negedge clk); d = host_rdata;
  endtask

  int unsigned V = 4;
  int unsigned credit [NQ];
  bit mon_on = 0;

  // per-port monitor state
  logic [NQ-1:0] snap [N_PORTS], backlog [N_PORTS];
  bit            snap_any [N_PORTS], in_frame [N_PORTS];
  int unsigned   r1 [N_PORTS][NQ];
  int unsigned   n_frames_checked = 0, n_guarantees = 0, n_r2 = 0, n_idle = 0, n_sent = 0;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_mon
    always @(posedge clk) if (mon_on) begin
      if (dut.g_port[p].u_om.sel_start) begin
        snap[p]     <= ~dut.g_port[p].u_om.empty_r[NQ-1:0];
        snap_any[p] <= ~&dut.g_port[p].u_om.empty_r;
      end
      if (dut.g_port[p].u_om.done) begin
        logic [NQ-1:0] bl;
        bl = backlog[p];
        if (frame_start[p]) begin
          if (in_frame[p]) begin
            n_frames_checked++;
            for (int i = 0; i < int'(V); i++) if (bl[i]) begin
              n_guarantees++;
              checks++;
              if (r1[p][i] < credit[i]) begin
                failures++;
                if (failures < 10) $display("FAIL V=%0d port %0d queue %0d sent %0d of credit %0d in a backlogged frame",
                                            V, p, i, r1[p][i], credit[i]);
              end
            end
          end
          in_frame[p] = 1;
          bl = '1;
          for (int i = 0; i < NQ; i++) r1[p][i] = 0;
        end
        backlog[p] <= bl & snap[p];
        checks++;
        if (!tx_cell[p].valid && snap_any[p]) begin
          failures++;
          if (failures < 10) $display("FAIL V=%0d port %0d idle with cells queued", V, p);
        end
        if (!tx_cell[p].valid) n_idle++;
        else begin
          n_sent++;
          if (tx_round2[p]) n_r2++;
          else if (!tx_queue[p][5]) r1[p][tx_queue[p][4:0]]++;
        end
      end
    end
  end

  // clocks per cell-time
  int unsigned gap = 0, max_gap = 0;
  longint unsigned gap_sum = 0, gap_n = 0;
  always @(posedge clk) begin
    if (dut.cell_start) begin
      if (mon_on && gap > 0) begin
        if (gap > max_gap) max_gap = gap;
        gap_sum += gap; gap_n++;
      end
      gap = 1;
    end else if (running) gap++;
    else gap = 0;
  end

  task automatic setup(input int unsigned nv);
    int unsigned flen;
    V = nv;
    rst_n = 0; repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int g = 0; g < N_PORTS; g++) begin
      for (int i = 0; i < 512; i++) begin
        bit own;
        own = (i >= 256 && i < 256 + 4 * int'(V));
        hw(g, 16'(i), own ? 16'hFFFF : 16'h0);
        hw(g, 16'h0200 | 16'(i), own ? 16'(i) : 16'(256 + (i % (4 * V))));
      end
      hw(g, 16'h1001, 16'h1);
    end
    for (int m = 0; m < N_PORTS; m++)
      for (int v = 0; v < 256; v++)
        hw(4 + m, 16'(v), (v < 4 * int'(V)) ? 16'(3'b100 | (v / V)) : 16'h0);
    flen = 4;
    for (int i = 0; i < NQ; i++) begin
      credit[i] = (i < int'(V)) ? 1 + i % 3 : 0;
      flen += credit[i];
    end
    for (int p = 0; p < N_PORTS; p++) begin
      for (int v = 0; v < 256; v++) hw(8 + p, 16'(v), 16'(v % V));
      for (int i = 0; i < NQ; i++) hw(8 + p, 16'h1000 | 16'(i), 16'(credit[i]));
      hw(8 + p, 16'h2000, 16'(flen));
      in_frame[p] = 0; backlog[p] = '0; snap[p] = '0; snap_any[p] = 0;
    end
  endtask

  task automatic run_and_check();
    logic [31:0] d, a, b, c;
    longint unsigned tg_tot, im_tot;
    int unsigned f0, g0, r20, i0, s0;
    longint unsigned gs0, gn0;
    gs0 = gap_sum; gn0 = gap_n;
    f0 = n_frames_checked; g0 = n_guarantees; r20 = n_r2; i0 = n_idle; s0 = n_sent;
    hw(12, 16'h1, 16'(CT)); hw(12, 16'h2, 16'(CT >> 16));
    mon_on = 1;
    hw(12, 16'h0, 16'b11);
    @(negedge clk);
    while (running) @(negedge clk);
    repeat (3) @(negedge clk);
    mon_on = 0;
    hr(12, 16'h1, d);
    checks++; if (d != CT) begin failures++; $display("FAIL V=%0d ran %0d cell-times", V, d); end
    for (int j = 0; j < N_PORTS; j++) begin
      hr(j, 16'h2000, a); hr(4 + j, 16'h2000, b);
      checks++; if (a - b > 1) begin failures++; $display("FAIL V=%0d TG%0d sent %0d IM received %0d", V, j, a, b); end
      im_tot = 0;
      for (int p = 0; p < N_PORTS; p++) begin hr(4 + j, 16'h2002 + 16'(p), c); im_tot += c; end
      hr(4 + j, 16'h2001, c);
      checks++; if (im_tot + c != b) begin failures++; $display("FAIL V=%0d IM%0d forwarded %0d + dropped %0d != %0d", V, j, im_tot, c, b); end
    end
    for (int p = 0; p < N_PORTS; p++) begin
      logic [31:0] rx, dr, us, se;
      hr(8 + p, 16'h4000, rx); hr(8 + p, 16'h4001, dr); hr(8 + p, 16'h4003, us); hr(8 + p, 16'h3000, se);
      checks++;
      if (rx != se + dr + us) begin failures++; $display("FAIL V=%0d port %0d rx %0d != sent %0d + drop %0d + buffered %0d", V, p, rx, se, dr, us); end
      $display("V=%0d port %0d: received %0d sent %0d dropped %0d buffered at end %0d", V, p, rx, se, dr, us);
    end
    $display("V=%0d: frames checked %0d, backlogged-queue guarantees checked %0d, second-round sends %0d, idle cell-times %0d, sends %0d",
             V, n_frames_checked - f0, n_guarantees - g0, n_r2 - r20, n_idle - i0, n_sent - s0);
    $display("V=%0d: mean cell-time %0.2f clocks", V, real'(gap_sum - gs0) / real'(gap_n - gn0));
    checks++;
    if (n_guarantees - g0 < 100 || n_frames_checked - f0 < 100) begin
      failures++; $display("FAIL V=%0d too few backlogged frames to check the guarantee", V);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      setup(4 << k);
      run_and_check();
    end
    $display("cell-time length: longest %0d clocks, mean %0.2f clocks", max_gap, real'(gap_sum) / real'(gap_n));
    checks++; if (max_gap > 42) begin failures++; $display("FAIL cell-time longer than 42 clocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

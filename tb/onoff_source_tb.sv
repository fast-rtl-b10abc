// onoff_source_tb: loads three random alias tables (ON lengths, OFF lengths, burst
// sizes), ticks the source for 4000 cell-times and predicts every cell with an
// independent model: bit-serial x^127+x+1 sequences for both generators, the alias
// rule, and the ON/OFF/burst rules. Also checks that the next period is drawn within
// five clocks, the table readback, and counts ON periods, bursts ended by their own
// size and bursts cut short by the end of the ON period.
module onoff_source_tb;
  import fast_pkg::*;
  localparam logic [126:0] SA = 127'h0f1e_2d3c_4b5a_6978_8796_a5b4_c3d2_e1f0;
  localparam logic [126:0] SB = 127'h7edc_ba98_7654_3210_0123_4567_89ab_cdef;
  localparam int unsigned N = 512;

  logic clk = 0, rst_n = 0, tick = 0, busy, on;
  logic [VCI_W-1:0] vci = 8'h2a;
  cell_t cell_out;
  logic host_we = 0;
  logic [11:0] host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  onoff_source #(.SEED_A(SA), .SEED_B(SB)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20ms; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  bit ha[$], hb[$];
  function automatic logic [15:0] wa(int unsigned n);
    logic [15:0] w;
    for (int j = 0; j < 16; j++) w[j] = ha[127 + n*16 - 1 - j];
    return w;
  endfunction
  function automatic logic [15:0] wb(int unsigned n);
    logic [15:0] w;
    for (int j = 0; j < 16; j++) w[j] = hb[127 + n*16 - 1 - j];
    return w;
  endfunction

  logic [15:0] F [3][N];
  logic [15:0] A [3][N];

  function automatic int unsigned draw(int t, logic [15:0] u, logic [15:0] i);
    return (u <= F[t][i[8:0]]) ? int'(i[8:0]) : int'(A[t][i[8:0]][8:0]);
  endfunction

  task automatic hw(input logic [11:0] a, input logic [15:0] d);
    host_we = 1; host_addr = a; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  // model state
  bit m_on = 0;
  int unsigned tl = 0, bl = 0, m = 0;
  int unsigned n_on = 0, n_cells = 0, n_full = 0, n_cut = 0;

  initial begin
    bit emit;
    cell_t e;
    int unsigned von, voff, vb;
    for (int i = 126; i >= 0; i--) begin ha.push_back(SA[i]); hb.push_back(SB[i]); end
    for (int n = 127; n < 127 + 4000*16; n++) begin
      ha.push_back(ha[n-127] ^ ha[n-126]);
      hb.push_back(hb[n-127] ^ hb[n-126]);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < N; i++) begin
        F[t][i] = 16'($urandom_range(0, 16'h1800));
        A[t][i] = 16'($urandom_range(0, (t == 0) ? 40 : (t == 1) ? 60 : 25));
        hw(12'((t << 10) | i), F[t][i]);
        hw(12'((t << 10) | 512 | i), A[t][i]);
      end
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < N; i += 37) begin
        host_addr = 12'((t << 10) | 512 | i); #1;
        checks++;
        if (host_rdata !== A[t][i]) begin failures++; $display("FAIL readback t%0d i%0d", t, i); end
        host_addr = 12'((t << 10) | i); #1;
        checks++;
        if (host_rdata !== F[t][i]) begin failures++; $display("FAIL readback F t%0d i%0d", t, i); end
      end
    @(negedge clk);
    for (int c = 0; c < 4000; c++) begin
      if (c == 2000) vci = 8'h91;
      emit = m_on && bl != 0 && tl != 0;
      e = emit ? '{valid: 1'b1, vci: vci} : cell_t'('0);
      if (emit) begin bl--; n_cells++; if (bl == 0) n_full++; end
      if (tl > 1) tl--;
      else begin
        if (m_on && bl != 0) n_cut++;
        von  = draw(0, wa(2*m), wa(2*m + 1));
        voff = draw(1, wa(2*m), wa(2*m + 1));
        vb   = draw(2, wb(2*m), wb(2*m + 1));
        m++;
        if (!m_on) begin tl = (von == 0) ? 1 : von; bl = vb; n_on++; end
        else begin tl = (voff == 0) ? 1 : voff; bl = 0; end
        m_on = !m_on;
      end
      tick = 1; @(negedge clk); tick = 0;
      checks++;
      if (cell_out !== e) begin
        failures++;
        if (failures < 8) $display("FAIL cell-time %0d got %h exp %h", c, cell_out, e);
      end
      repeat (4) @(negedge clk);
      checks++;
      if (busy || on !== m_on) begin failures++; if (failures < 8) $display("FAIL busy/on at %0d", c); end
      repeat (3) @(negedge clk);
    end
    $display("onoff: draws=%0d on_periods=%0d cells=%0d bursts_full=%0d bursts_cut=%0d",
             m, n_on, n_cells, n_full, n_cut);
    checks++;
    if (n_on < 20 || n_full < 5 || n_cut < 5) begin failures++; $display("FAIL too few mechanisms exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

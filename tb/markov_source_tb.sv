// markov_source_tb: loads random transition tables (16 states, 16 entries each) and
// random per-state rates, then ticks the source for 3000 cell-times and predicts every
// cell and every state with an independent model: bit-serial x^127+x+1 sequences for
// both generators, the alias rule, the uniform initial state and the hold counter.
// The hold time is 3 cell-times for the first half and 1 for the second. Also checks
// the register and table readback, that the next state is drawn within five clocks,
// and counts state changes and the states visited.
module markov_source_tb;
  import fast_pkg::*;
  localparam int unsigned NS = 16;
  localparam logic [126:0] SA = 127'h5555_aaaa_3333_cccc_0f0f_f0f0_1234_8765;
  localparam logic [126:0] SB = 127'h0bad_cafe_dead_beef_0123_4567_89ab_cdef;

  logic clk = 0, rst_n = 0, tick = 0, busy;
  logic [3:0] state;
  logic [VCI_W-1:0] vci = 8'h3c;
  cell_t cell_out;
  logic host_we = 0;
  logic [11:0] host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  markov_source #(.NS(NS), .SEED_A(SA), .SEED_B(SB)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  logic [15:0] F [NS*NS];
  logic [15:0] L [NS*NS];
  logic [15:0] R [NS];

  task automatic hw(input logic [11:0] a, input logic [15:0] d);
    host_we = 1; host_addr = a; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  task automatic rd(input logic [11:0] a, input logic [15:0] exp, input string what);
    host_addr = a; #1;
    checks++;
    if (host_rdata !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, host_rdata, exp); end
    @(negedge clk);
  endtask

  bit started = 0;
  int unsigned s = 0, cnt = 0, hold = 3, ma = 0, mb = 0;
  int unsigned n_cells = 0, n_moves = 0, n_draws = 0;
  bit seen [NS];

  initial begin
    cell_t e;
    logic [15:0] u, i;
    logic [7:0] idx;
    int unsigned ns, he, n_seen;
    for (int b = 126; b >= 0; b--) begin ha.push_back(SA[b]); hb.push_back(SB[b]); end
    for (int n = 127; n < 127 + 7000*16; n++) begin
      ha.push_back(ha[n-127] ^ ha[n-126]);
      hb.push_back(hb[n-127] ^ hb[n-126]);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < NS*NS; k++) begin
      F[k] = 16'($urandom); L[k] = 16'($urandom_range(0, NS-1));
      hw(12'(k), F[k]); hw(12'h100 | 12'(k), L[k]);
    end
    for (int k = 0; k < NS; k++) begin
      R[k] = (k % 5 == 0) ? 16'h0 : (k % 5 == 1) ? 16'hffff : 16'($urandom);
      hw(12'h400 | 12'(k), R[k]);
    end
    hw(12'h410, 16'd3);
    for (int k = 0; k < NS*NS; k += 17) begin
      rd(12'(k), F[k], "cutoff readback");
      rd(12'h100 | 12'(k), L[k], "alias readback");
    end
    for (int k = 0; k < NS; k++) rd(12'h400 | 12'(k), R[k], "rate readback");
    rd(12'h410, 16'd3, "hold readback");
    for (int c = 0; c < 3000; c++) begin
      if (c == 1500) begin hw(12'h410, 16'd0); hold = 0; end
      he = (hold == 0) ? 1 : hold;
      if (!started) begin
        s = int'(wa(ma) % NS); ma++; started = 1; cnt = he; e = '0;
      end else begin
        e = (wb(mb) < R[s]) ? cell_t'({1'b1, vci}) : cell_t'('0);
        mb++;
        if (cnt > 1) cnt--;
        else begin
          cnt = he;
          u = wa(ma); i = wa(ma + 1); ma += 2;
          idx = {4'(s), i[3:0]};
          ns = (u <= F[idx]) ? int'(idx[3:0]) : int'(L[idx][3:0]);
          n_draws++;
          if (ns != s) n_moves++;
          s = ns;
        end
      end
      seen[s] = 1;
      if (e.valid) n_cells++;
      tick = 1; @(negedge clk); tick = 0;
      checks++;
      if (cell_out !== e) begin
        failures++;
        if (failures < 8) $display("FAIL cell-time %0d got %h exp %h", c, cell_out, e);
      end
      repeat (4) @(negedge clk);
      checks++;
      if (busy || state !== 4'(s)) begin
        failures++;
        if (failures < 8) $display("FAIL cell-time %0d state %0d exp %0d busy %b", c, state, s, busy);
      end
      if (c % 100 == 0) rd(12'h800, 16'(s), "state readback");
      @(negedge clk);
    end
    n_seen = 0;
    for (int k = 0; k < NS; k++) if (seen[k]) n_seen++;
    $display("markov: draws=%0d moves=%0d cells=%0d states visited=%0d", n_draws, n_moves, n_cells, n_seen);
    checks++;
    if (n_moves < 100 || n_seen < NS / 2 || n_cells < 100) begin failures++; $display("FAIL too few mechanisms exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
